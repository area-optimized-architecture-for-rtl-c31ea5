// mixcol_ctrl: control unit of the byte-serial mix column datapath.
//
// A 3-bit counter (width from the document) holds how many bytes of the
// current column have been accepted. Each valid input byte advances it; the
// byte that brings it to four is flagged `last`, which makes the datapath
// load its 32-bit output register and clear R1..R4, and the counter wraps
// to zero. Counting only valid bytes is this design's choice: the source may
// pause (din_valid low) and the column simply waits.
//
// A 2-bit column counter marks the first byte of each 16-byte state. The
// direction input is taken on that byte and held for the whole state, so a
// change of direction takes effect at the next state boundary (also this
// design's choice; the document only says that select signals choose the
// polynomials).
//
// All outputs except mode are decoded from registers; mode follows mode_in
// combinationally on the first byte of a state. Asynchronous active-low
// reset.
module mixcol_ctrl
  import aes_mc_pkg::*;
#(
  parameter int unsigned CNT_W = 3   // byte counter width
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din_valid,
  input  mc_mode_e   mode_in,
  output logic       en,             // pass the byte to the datapath
  output logic [1:0] byte_idx,       // row of this byte in its column
  output logic       last,           // 4th byte of a column
  output logic       state_first,    // 1st byte of a state
  output mc_mode_e   mode            // direction for this byte
);

  logic [CNT_W-1:0] cnt_q;
  logic [1:0]       col_q;
  mc_mode_e         mode_q;

  always_comb begin
    en          = din_valid;
    byte_idx    = cnt_q[1:0];
    last        = (cnt_q == CNT_W'(COL_BYTES - 1));
    state_first = (cnt_q == '0) && (col_q == 2'd0);
    mode        = state_first ? mode_in : mode_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      col_q  <= '0;
      mode_q <= MC_FWD;
    end else if (din_valid) begin
      if (last) begin
        cnt_q <= '0;
        col_q <= col_q + 2'd1;
      end else begin
        cnt_q <= cnt_q + CNT_W'(1);
      end
      if (state_first)
        mode_q <= mode_in;
    end
  end

  // The byte counter never leaves 0..3.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
                                cnt_q < CNT_W'(COL_BYTES));

endmodule
