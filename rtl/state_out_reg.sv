// state_out_reg: assembles four finished columns into the 128-bit state.
//
// Each col_valid pulse shifts the new column in at the bottom of the state
// register, so after four columns column 0 sits in the top 32 bits (byte 0
// in [127:120]). A 2-bit counter counts the columns; with the fourth one
// state_valid pulses for one cycle, right after the edge that stores it.
// state_out keeps its value until the next column arrives. The document
// states only that the 128-bit result is available after 16 cycles; the
// shift register is this design's way of collecting it. Asynchronous
// active-low reset.
module state_out_reg
  import aes_mc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    col_valid,
  input  column_t col_in,
  output logic    state_valid,
  output state_t  state_out
);

  logic [1:0] col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q       <= '0;
      state_out   <= '0;
      state_valid <= 1'b0;
    end else begin
      state_valid <= col_valid && (col_q == 2'(STATE_COLS - 1));
      if (col_valid) begin
        state_out <= {state_out[11:0], col_in};
        col_q     <= col_q + 2'd1;
      end
    end
  end

endmodule
