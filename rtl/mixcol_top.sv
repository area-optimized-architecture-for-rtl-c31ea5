// mixcol_top: byte-serial AES MixColumns / InvMixColumns engine.
//
// A 128-bit AES state is fed in one byte per clock, in the standard byte
// order (column 0 rows 0..3, then column 1, ...). The control unit counts
// the bytes of each column; the mix column unit multiplies each byte by the
// selected matrix coefficients with a shared GF(2^8) multiplier and adds the
// products into four row registers. Every fourth byte a 32-bit mixed column
// comes out, and the state register collects four of them into the full
// mixed state. inv selects InvMixColumns; it is sampled with the first byte
// of a state.
//
// Throughput: one byte per cycle, so one state per 16 cycles with no
// bubbles between states. Latency: col_valid pulses one cycle after the
// 4th byte of a column is presented, state_valid one cycle after the last
// column's col_valid (17 cycles after the first byte of an unbroken state).
// din_valid may drop at any time; the engine then waits. Asynchronous
// active-low reset.
module mixcol_top
  import aes_mc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          din_valid,
  input  logic [7:0]    din,
  input  logic          inv,
  output logic          col_valid,
  output logic [31:0]   col_out,
  output logic          state_valid,
  output logic [127:0]  state_out
);

  logic       en, last, state_first;
  logic [1:0] byte_idx;
  mc_mode_e   mode;
  column_t    col;
  state_t     state;

  mixcol_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .din_valid   (din_valid),
    .mode_in     (inv ? MC_INV : MC_FWD),
    .en          (en),
    .byte_idx    (byte_idx),
    .last        (last),
    .state_first (state_first),
    .mode        (mode)
  );

  mixcol_unit u_mc (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .byte_idx  (byte_idx),
    .last      (last),
    .mode      (mode),
    .din       (din),
    .col_valid (col_valid),
    .col_out   (col)
  );

  state_out_reg u_state (
    .clk         (clk),
    .rst_n       (rst_n),
    .col_valid   (col_valid),
    .col_in      (col),
    .state_valid (state_valid),
    .state_out   (state)
  );

  assign col_out   = col;
  assign state_out = state;

endmodule
