// mixcol_unit_tb: checks the byte-serial accumulator datapath on its own.
// The testbench plays the control unit: it presents the four bytes of a
// column with their row index and marks the fourth, with random idle cycles
// in between and a random direction per column. Each col_valid pulse must
// come exactly one cycle after the fourth byte, and col_out must equal the
// reference column product. Starts with the FIPS-197 / standard MixColumns
// test columns (db 13 53 45 -> 8e 4d a1 bc, f2 0a 22 5c -> 9f dc 58 9d).
module mixcol_unit_tb;
  import aes_mc_pkg::*;
  import mc_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        en = 1'b0, last = 1'b0;
  logic [1:0]  byte_idx = '0;
  mc_mode_e    mode = MC_FWD;
  byte_t       din = '0;
  logic        col_valid;
  column_t     col_out;
  int checks = 0, failures = 0;

  mixcol_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(input bit inv, input logic [31:0] c, input logic [31:0] expv);
    for (int k = 0; k < 4; k++) begin
      // random idle cycles between bytes
      while ($urandom_range(0, 3) == 0) begin
        en = 1'b0; din = 8'($urandom);
        @(negedge clk);
        checks++;
        if (col_valid) begin failures++; $display("FAIL col_valid while idle"); end
      end
      en       = 1'b1;
      byte_idx = 2'(k);
      last     = (k == 3);
      mode     = inv ? MC_INV : MC_FWD;
      din      = c[31-8*k -: 8];
      @(negedge clk);
      checks++;
      if (k < 3 && col_valid) begin failures++; $display("FAIL early col_valid k=%0d", k); end
    end
    en = 1'b0; last = 1'b0;
    checks++;
    if (!col_valid || col_out !== expv) begin
      failures++;
      $display("FAIL inv=%0d col=%08h got valid=%0d %08h exp %08h", inv, c, col_valid, col_out, expv);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_col(0, 32'hdb135345, 32'h8e4da1bc);
    check_col(0, 32'hf20a225c, 32'h9fdc589d);
    check_col(1, 32'h8e4da1bc, 32'hdb135345);
    check_col(0, 32'h01010101, 32'h01010101);
    check_col(0, 32'hd4d4d4d5, 32'hd5d5d7d6);
    for (int n = 0; n < 500; n++) begin
      logic [31:0] c;
      bit inv;
      c   = $urandom;
      inv = 1'($urandom);
      check_col(inv, c, mix_col(inv, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
