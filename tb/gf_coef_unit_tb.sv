// gf_coef_unit_tb: exhaustive check of the shared coefficient multiplier.
// Every byte value is applied in both directions and the four products are
// compared with shift-and-add multiplications by {02,03,01,01} (forward)
// and {0E,0B,0D,09} (inverse). Also checks the FIPS-197 xtime example
// {57}*{02} = {AE}.
module gf_coef_unit_tb;
  import aes_mc_pkg::*;
  import mc_ref_pkg::*;

  byte_t       s;
  mc_mode_e    mode;
  byte_t [3:0] prod;
  int checks = 0, failures = 0;

  gf_coef_unit dut (.s(s), .mode(mode), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_c;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v++) begin
        s    = 8'(v);
        mode = m[0] ? MC_INV : MC_FWD;
        #1;
        for (int j = 0; j < 4; j++) begin
          exp_c = gmul(coef(m[0], 0, j), s);
          checks++;
          if (prod[j] !== exp_c) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode=%0d s=%02h prod[%0d]=%02h exp %02h", m, s, j, prod[j], exp_c);
          end
        end
      end
    end
    // Known value from FIPS-197 section 4.2.1.
    s = 8'h57; mode = MC_FWD; #1;
    checks++;
    if (prod[0] !== 8'hAE) begin failures++; $display("FAIL 57*02=%02h", prod[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
