// mixcol_ctrl_tb: checks the control unit against a cycle-level model.
// din_valid is driven at random (about one idle cycle in four) and mode_in
// toggles at random every cycle. For each cycle the testbench keeps its own
// count of accepted bytes and columns and checks en, byte_idx, last,
// state_first and the direction, which must be the value mode_in had on
// the first byte of the current state. It also counts that every column
// really ends after four accepted bytes.
module mixcol_ctrl_tb;
  import aes_mc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       din_valid = 1'b0;
  mc_mode_e   mode_in = MC_FWD;
  logic       en, last, state_first;
  logic [1:0] byte_idx;
  mc_mode_e   mode;
  int checks = 0, failures = 0;

  mixcol_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    automatic int nbyte = 0;         // bytes accepted in the current column
    automatic int ncol  = 0;         // columns completed in the current state
    automatic int cols_done = 0;
    automatic mc_mode_e held = MC_FWD;
    mc_mode_e exp_mode;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      din_valid = ($urandom_range(0, 3) != 0);
      mode_in   = ($urandom_range(0, 1) != 0) ? MC_INV : MC_FWD;
      #1;
      exp_mode = (nbyte == 0 && ncol == 0) ? mode_in : held;
      expect_eq("en", int'(en), int'(din_valid));
      expect_eq("byte_idx", int'(byte_idx), nbyte);
      expect_eq("last", int'(last), int'(nbyte == 3));
      expect_eq("state_first", int'(state_first), int'(nbyte == 0 && ncol == 0));
      expect_eq("mode", int'(mode), int'(exp_mode));
      if (din_valid) begin
        if (nbyte == 0 && ncol == 0) held = mode_in;
        if (nbyte == 3) begin
          nbyte = 0;
          ncol  = (ncol + 1) % 4;
          cols_done++;
        end else begin
          nbyte++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (cols_done < 500) begin failures++; $display("FAIL too few columns %0d", cols_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
