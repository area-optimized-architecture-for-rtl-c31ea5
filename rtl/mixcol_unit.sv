// mixcol_unit: byte-serial MixColumns / InvMixColumns datapath.
//
// One byte of a column enters per enabled clock, row 0 first. The byte is
// multiplied by the four coefficients of the selected matrix (gf_coef_unit)
// and each product is XORed into one of four accumulator registers R1..R4,
// one per output row. Output row i takes coefficient C[(k-i) mod 4] for the
// byte in row k, so a small rotation multiplexer, driven by the byte index
// from the control unit, routes the products. With the fourth byte of a
// column the finished sums go to the 32-bit output register and R1..R4 are
// cleared, so the next column can start on the very next clock: a column
// every 4 cycles, a state every 16, as in the document.
//
// Timing: the byte with `last` set is accepted on a rising edge; col_out and
// col_valid (one-cycle pulse) are valid right after that edge. col_out holds
// its value until the next column completes. Reset (asynchronous, active
// low) clears R1..R4 and the output register; the reset style is this
// design's choice.
module mixcol_unit
  import aes_mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,         // din is a byte of the current column
  input  logic [1:0]  byte_idx,   // row k of din within its column
  input  logic        last,       // din is the 4th byte: complete the column
  input  mc_mode_e    mode,       // direction for this byte
  input  byte_t       din,
  output logic        col_valid,  // one-cycle pulse: col_out updated
  output column_t     col_out     // [3] = row 0
);

  byte_t [3:0] prod;
  column_t     acc_q;             // acc_q[3-i] is register R(i+1), row i
  column_t     acc_next;

  gf_coef_unit u_coef (
    .s    (din),
    .mode (mode),
    .prod (prod)
  );

  // Route C[(k-i) mod 4]*s to row i and add (XOR) it into that row.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] j;
      j = byte_idx - 2'(i);
      acc_next[3-i] = acc_q[3-i] ^ prod[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      col_out   <= '0;
      col_valid <= 1'b0;
    end else begin
      col_valid <= en && last;
      if (en) begin
        if (last) begin
          col_out <= acc_next;
          acc_q   <= '0;
        end else begin
          acc_q   <= acc_next;
        end
      end
    end
  end

endmodule
