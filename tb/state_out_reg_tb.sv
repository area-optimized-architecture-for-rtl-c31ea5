// state_out_reg_tb: feeds random columns, with random gaps, into the state
// register and checks that every fourth column raises state_valid for
// exactly one cycle, one cycle after that column's col_valid, with the
// four columns in arrival order (first column in bits [127:96]).
module state_out_reg_tb;
  import aes_mc_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    col_valid = 1'b0;
  column_t col_in = '0;
  logic    state_valid;
  state_t  state_out;
  int checks = 0, failures = 0;

  state_out_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] expv;
    automatic int ncol = 0, nstates = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      col_valid = ($urandom_range(0, 2) == 0);
      col_in    = $urandom;
      @(negedge clk);
      checks++;
      if (col_valid) begin
        expv[127-32*ncol -: 32] = col_in;
        if (ncol == 3) begin
          nstates++;
          if (!state_valid || state_out !== expv) begin
            failures++;
            $display("FAIL state valid=%0d %032h exp %032h", state_valid, state_out, expv);
          end
        end else if (state_valid) begin
          failures++;
          $display("FAIL state_valid after column %0d", ncol);
        end
        ncol = (ncol + 1) % 4;
      end else if (state_valid) begin
        failures++;
        $display("FAIL state_valid without a column");
      end
    end
    checks++;
    if (nstates < 100) begin failures++; $display("FAIL only %0d states", nstates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
