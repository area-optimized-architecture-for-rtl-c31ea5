// mixcol_top_tb: end-to-end test of the byte-serial MixColumns engine at
// its only (default) configuration.
//
// A driver streams whole 16-byte states, one byte per cycle, and a monitor
// checks every col_valid and state_valid pulse against the reference model:
// the value, and the exact cycle (a column one cycle after its fourth byte,
// the state one cycle after that). The run covers, and counts:
//   - back-to-back states, where a state must finish every 16 cycles and
//     17 cycles after its first byte;
//   - stalls, din_valid low inside a state;
//   - direction switches between MixColumns and InvMixColumns from one
//     state to the next;
//   - inv toggling inside a state, which must not affect that state;
//   - a reset in the middle of a state, after which the next state must
//     still be exact;
//   - round trips, InvMixColumns applied to a MixColumns result, which must
//     give back the original state.
// Each of these must happen at least once or the test fails.
module mixcol_top_tb;
  import mc_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         din_valid = 1'b0;
  logic [7:0]   din = '0;
  logic         inv = 1'b0;
  logic         col_valid, state_valid;
  logic [31:0]  col_out;
  logic [127:0] state_out;

  mixcol_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_states = 0, n_b2b = 0, n_stall = 0, n_switch = 0;
  int n_midtoggle = 0, n_reset = 0, n_roundtrip = 0, n_inv = 0;

  typedef struct { longint at; logic [31:0] v; }  col_exp_t;
  typedef struct { longint at; logic [127:0] v; } st_exp_t;
  col_exp_t col_q[$];
  st_exp_t  st_q[$];
  logic [127:0] last_result;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_col(input longint at, input logic [31:0] v);
    col_exp_t e;
    e.at = at;
    e.v  = v;
    col_q.push_back(e);
  endtask

  task automatic expect_state(input longint at, input logic [127:0] v);
    st_exp_t e;
    e.at = at;
    e.v  = v;
    st_q.push_back(e);
  endtask

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  // Monitor: outputs are registered, so sample them at the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (col_valid) begin
        checks++;
        if (col_q.size() == 0) fail("unexpected col_valid");
        else begin
          automatic col_exp_t e = col_q.pop_front();
          if (e.at != cyc) fail($sformatf("column at %0d, expected at %0d", cyc, e.at));
          if (e.v !== col_out) fail($sformatf("column %08h expected %08h", col_out, e.v));
        end
      end else if (col_q.size() != 0 && col_q[0].at <= cyc) begin
        checks++;
        fail("missing col_valid");
        void'(col_q.pop_front());
      end
      if (state_valid) begin
        checks++;
        if (st_q.size() == 0) fail("unexpected state_valid");
        else begin
          automatic st_exp_t e = st_q.pop_front();
          if (e.at != cyc) fail($sformatf("state at %0d, expected at %0d", cyc, e.at));
          if (e.v !== state_out) fail($sformatf("state %032h expected %032h", state_out, e.v));
          last_result = state_out;
        end
      end else if (st_q.size() != 0 && st_q[0].at <= cyc) begin
        checks++;
        fail("missing state_valid");
        void'(st_q.pop_front());
      end
    end
  end

  bit    prev_inv = 1'b0;
  longint prev_state_done = -100;

  // Send one state. stall_pct: chance (in %) of an idle cycle before a byte.
  // toggle: flip inv on the bytes after the first.
  task automatic send_state(input logic [127:0] s, input bit dir,
                            input int stall_pct, input bit toggle);
    logic [127:0] r;
    longint first_at = 0;
    bit stalled = 1'b0;
    r = mix_state(dir, s);
    for (int b = 0; b < 16; b++) begin
      while ($urandom_range(0, 99) < stall_pct && b != 0) begin
        din_valid = 1'b0;
        din       = 8'($urandom);
        stalled   = 1'b1;
        @(negedge clk);
      end
      din_valid = 1'b1;
      din       = s[127-8*b -: 8];
      inv       = (b == 0) ? dir : (toggle ? ~inv : inv);
      if (b == 0) first_at = cyc;
      if (b % 4 == 3) expect_col(cyc + 1, r[127-32*(b/4) -: 32]);
      if (b == 15) begin
        expect_state(cyc + 2, r);
        if (!stalled) begin
          checks++;
          if (cyc + 2 - first_at != 17) fail("state latency is not 17 cycles");
        end
        if (!stalled && first_at == prev_state_done - 1) begin
          // previous state's last byte was the cycle before our first byte
          n_b2b++;
        end
        prev_state_done = cyc + 2;
      end
      @(negedge clk);
    end
    din_valid = 1'b0;
    n_states++;
    if (stalled) n_stall++;
    if (toggle) n_midtoggle++;
    if (dir != prev_inv) n_switch++;
    if (dir) n_inv++;
    prev_inv = dir;
  endtask

  function automatic logic [127:0] rand_state();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [127:0] s, fwd;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // FIPS-197 Appendix B, round 1: state after ShiftRows -> after MixColumns.
    checks++;
    if (mix_state(1'b0, 128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5) !==
        128'h046681e5_e0cb199a_48f8d37a_2806264c)
      fail("reference model disagrees with FIPS-197 Appendix B");
    send_state(128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5, 1'b0, 0, 1'b0);
    // Back-to-back random states in both directions, no stalls.
    for (int n = 0; n < 40; n++)
      send_state(rand_state(), 1'($urandom), 0, 1'b0);
    // With stalls and with inv toggling inside the state.
    for (int n = 0; n < 40; n++)
      send_state(rand_state(), 1'($urandom), 30, 1'($urandom));

    // Reset in the middle of a state: 6 bytes (one whole column), then
    // reset, then a full state that must come out exact.
    s = rand_state();
    for (int b = 0; b < 6; b++) begin
      din_valid = 1'b1; din = s[127-8*b -: 8]; inv = 1'b1;
      if (b == 3) expect_col(cyc + 1, mix_col(1'b1, s[127:96]));
      @(negedge clk);
    end
    din_valid = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_reset++;
    send_state(rand_state(), 1'b0, 0, 1'b0);

    // Round trips: forward, then inverse of the result.
    for (int n = 0; n < 10; n++) begin
      s = rand_state();
      send_state(s, 1'b0, 10, 1'b0);
      repeat (3) @(negedge clk);
      fwd = last_result;
      send_state(fwd, 1'b1, 10, 1'b0);
      repeat (3) @(negedge clk);
      checks++;
      if (last_result !== s) fail("InvMixColumns(MixColumns(s)) != s");
      else n_roundtrip++;
    end

    repeat (4) @(negedge clk);
    checks++;
    if (col_q.size() != 0 || st_q.size() != 0) fail("outputs still outstanding");

    $display("states=%0d back_to_back=%0d stalled=%0d dir_switches=%0d inverse=%0d mid_state_toggles=%0d resets=%0d round_trips=%0d",
             n_states, n_b2b, n_stall, n_switch, n_inv, n_midtoggle, n_reset, n_roundtrip);
    checks++; if (n_b2b == 0)       fail("no back-to-back states");
    checks++; if (n_stall == 0)     fail("no stall");
    checks++; if (n_switch == 0)    fail("no direction switch");
    checks++; if (n_inv == 0)       fail("no inverse state");
    checks++; if (n_midtoggle == 0) fail("no mid-state inv toggle");
    checks++; if (n_reset == 0)     fail("no mid-state reset");
    checks++; if (n_roundtrip == 0) fail("no round trip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
