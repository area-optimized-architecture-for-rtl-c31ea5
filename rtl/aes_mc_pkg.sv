// aes_mc_pkg: types and GF(2^8) helpers shared by the byte-serial AES
// MixColumns / InvMixColumns datapath.
//
// The AES state is 16 bytes held column by column. Here a column is packed
// with its row-0 byte in the top bits ([31:24]) and a state with byte 0
// (row 0, column 0) in bits [127:120], the byte order of FIPS-197 test
// vectors. The field is GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1,
// so a multiplication by {02} is a left shift followed by a conditional
// XOR with {1B}.
package aes_mc_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [3:0][7:0]   column_t;   // [3] = row 0 ... [0] = row 3
  typedef logic [15:0][7:0]  state_t;    // [15] = byte 0 ... [0] = byte 15

  // Direction of the transform carried along with each state.
  typedef enum logic {
    MC_FWD = 1'b0,   // MixColumns, matrix circ(02,03,01,01)
    MC_INV = 1'b1    // InvMixColumns, matrix circ(0E,0B,0D,09)
  } mc_mode_e;

  localparam byte_t AES_REDUCE = 8'h1B;
  localparam int    COL_BYTES  = 4;
  localparam int    STATE_COLS = 4;

  // Multiplication by {02}: shift left, fold the carried-out bit back in.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? AES_REDUCE : 8'h00);
  endfunction

endpackage
