// tb_fc_state_transition: self-checking test of the switch-state machine
// of the four-switch flying-capacitor bridge.
//
// The testbench carries the sixteen-state table of the bridge (output level
// and effect on each capacitor for i>0) as literal data and drives random
// single-step level walks with random capacitor and current-sign bits.
// One edge after each level change it checks that the state produces the
// target level, that exactly one switch changed, and that the chosen state
// has the best capacitor-balance score of all one-switch moves that reach
// the level (score: +1 per capacitor moved towards Vdc, -1 per capacitor
// moved away). It also checks that the state holds while the level holds,
// and that a target two levels away is reached in two edges, one switch at
// a time.
module tb_fc_state_transition;
  import hcc_pkg::*;
  logic clk = 0, rst_n = 0, ca = 0, cb = 0, i_pos = 0;
  logic [4:0] sel;
  sw4_t sw;
  int checks = 0, failures = 0;
  int lvl = 0;

  // Indexed by {S1,S2,S3,S4}.
  //                  0000 0001 0010 0011 0100 0101 0110 0111 1000 1001 1010 1011 1100 1101 1110 1111
  int tv[16]  = '{  0,  -1,  -1,  -2,   1,   0,   0,  -1,   1,   0,   0,  -1,   2,   1,   1,   0};
  int ta[16]  = '{  0,   0,   0,   0,  -1,  -1,  -1,  -1,   1,   1,   1,   1,   0,   0,   0,   0};
  int tb_[16] = '{  0,   1,  -1,   0,   0,   1,  -1,   0,   0,   1,  -1,   0,   0,   1,  -1,   0};

  fc_state_transition dut (.clk, .rst_n, .sel, .cap_a_high(ca), .cap_b_high(cb), .i_pos, .sw);

  always #5 clk = ~clk;
  assign sel = 5'(1 << (lvl + 2));

  function automatic int sc(int s, logic a_hi, logic b_hi, logic ip);
    int g;
    g = ip ? 1 : -1;
    return g * ta[s] * (a_hi ? -1 : 1) + g * tb_[s] * (b_hi ? -1 : 1);
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s (sw=%b lvl=%0d t=%0t)", what, sw, lvl, $time);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw4_t prev_sw;
    int best;
    logic a, b, ip;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (sw !== 4'b0000) fail("reset state");
    for (int step = 0; step < 3000; step++) begin
      if (lvl == 2) lvl = 1;
      else if (lvl == -2) lvl = -1;
      else lvl = lvl + (($urandom_range(0, 1) == 1) ? 1 : -1);
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      ip = 1'($urandom_range(0, 1));
      ca = a; cb = b; i_pos = ip;
      prev_sw = sw;
      best = -100;
      for (int k = 0; k < 4; k++) begin
        int s;
        s = int'(prev_sw ^ 4'(1 << k));
        if (tv[s] == lvl && sc(s, a, b, ip) > best) best = sc(s, a, b, ip);
      end
      @(negedge clk);
      checks++;
      if (tv[sw] != lvl) fail("level not reached");
      checks++;
      if ($countones(sw ^ prev_sw) != 1) fail($sformatf("not adjacent %b -> %b", prev_sw, sw));
      checks++;
      if (sc(int'(sw), a, b, ip) != best) fail("not the best balancing state");
      prev_sw = sw;
      repeat ($urandom_range(0, 3)) begin
        ca = 1'($urandom_range(0, 1));
        cb = 1'($urandom_range(0, 1));
        i_pos = 1'($urandom_range(0, 1));
        @(negedge clk);
        checks++;
        if (sw !== prev_sw) fail("state changed while level held");
      end
    end
    // Two-level jump: reached one switch per edge.
    lvl = (tv[sw] >= 0) ? tv[sw] - 2 : tv[sw] + 2;
    prev_sw = sw;
    @(negedge clk);
    checks++;
    if ($countones(sw ^ prev_sw) != 1 || tv[sw] == tv[prev_sw]) fail("first half of two-level move");
    prev_sw = sw;
    @(negedge clk);
    checks++;
    if ($countones(sw ^ prev_sw) != 1 || tv[sw] != lvl) fail("second half of two-level move");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
