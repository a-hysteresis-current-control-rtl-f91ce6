// tb_simple_state_transition: self-checking test of the switch-state
// machine of the simple five-level structure.
//
// The level performs a random walk of single steps with random dwell times
// while the capacitor and current-sign bits change at random. The
// testbench keeps its own copy of the switch-state table (output level and
// capacitor effect for i>0 of each of the eight states) and checks, one
// edge after every level change:
//   - the new state produces the target level;
//   - at +/-Vdc the chosen state moves the capacitor towards Vdc;
//   - the transition changes one switch, or is one of 000->101, 000->011,
//     111->010, 111->100;
//   - at zero the state is 000 after a positive level, 111 after a
//     negative one;
// and that the state never changes while the level holds.
module tb_simple_state_transition;
  import hcc_pkg::*;
  logic clk = 0, rst_n = 0, cap_high = 0, i_pos = 0;
  logic [4:0] sel;
  sw3_t sw;
  int checks = 0, failures = 0;
  int lvl = 0;
  int n_nonadj = 0, n_charge = 0, n_discharge = 0;

  // Table of the simple structure, indexed by {S1,S2,S3}.
  int tbl_v[8]   = '{0, -2, 1, -1, 1, -1, 2, 0};   // 000 001 010 011 100 101 110 111
  int tbl_cap[8] = '{0,  0, -1, -1, 1, 1, 0, 0};

  simple_state_transition dut (.clk, .rst_n, .sel, .cap_high, .i_pos, .sw);

  always #5 clk = ~clk;

  assign sel = 5'(1 << (lvl + 2));

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
    sw3_t prev_sw;
    int prev_lvl, want;
    logic c, ip;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (sw !== 3'b000) fail("reset state");
    for (int step = 0; step < 3000; step++) begin
      // Pick the next level one step away, within range.
      prev_lvl = lvl;
      if (lvl == 2) lvl = 1;
      else if (lvl == -2) lvl = -1;
      else lvl = lvl + (($urandom_range(0, 1) == 1) ? 1 : -1);
      c  = 1'($urandom_range(0, 1));
      ip = 1'($urandom_range(0, 1));
      cap_high = c;
      i_pos = ip;
      prev_sw = sw;
      @(negedge clk);
      checks++;
      if (tbl_v[sw] != lvl) fail("level not reached");
      checks++;
      if ($countones(sw ^ prev_sw) != 1 &&
          !(prev_sw == 3'b000 && (sw == 3'b101 || sw == 3'b011)) &&
          !(prev_sw == 3'b111 && (sw == 3'b010 || sw == 3'b100)))
        fail($sformatf("illegal transition %b -> %b", prev_sw, sw));
      if ($countones(sw ^ prev_sw) == 2) n_nonadj++;
      if (lvl == 1 || lvl == -1) begin
        // Needed effect for i>0: +1 if Vca must rise.
        want = (c ? -1 : 1) * (ip ? 1 : -1);
        checks++;
        if (tbl_cap[sw] != want) fail("capacitor not driven towards Vdc");
        if (want > 0) n_charge++; else n_discharge++;
      end
      if (lvl == 0) begin
        checks++;
        if (sw != ((prev_lvl > 0) ? 3'b000 : 3'b111)) fail("wrong zero state");
      end
      // Dwell: the state must hold while inputs wander.
      prev_sw = sw;
      repeat ($urandom_range(0, 4)) begin
        cap_high = 1'($urandom_range(0, 1));
        i_pos = 1'($urandom_range(0, 1));
        @(negedge clk);
        checks++;
        if (sw !== prev_sw) fail("state changed while level held");
      end
    end
    checks++;
    if (n_nonadj == 0 || n_charge == 0 || n_discharge == 0) fail("coverage");
    $display("non-adjacent transitions %0d, charge %0d, discharge %0d", n_nonadj, n_charge, n_discharge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
