// tb_level_counter: self-checking test of the up/down level counter.
//
// Directed part: the current leaves the band upwards (level one step down
// on the next edge), stays out while timeout pulses arrive (one more step
// each, saturating at -2), comes back in (level holds), then the same
// downwards. Random part: random comparator waveforms and timeout pulses,
// compared with a behavioural reference of the stepping rules:
//   leaving the band: one step; timeout while out of band: one step;
//   direction down for "above", up for "below"; clamp to -2..+2.
module tb_level_counter;
  import hcc_pkg::*;
  logic clk = 0, rst_n = 0, above = 0, below = 0, timeout = 0;
  level_t level;
  logic leave, out_of_band, step_up, step_dn;
  int checks = 0, failures = 0;
  int ref_level = 0;
  bit prev_above = 0, prev_below = 0;

  level_counter #(.N_LEVELS(5)) dut (.clk, .rst_n, .above, .below, .timeout,
    .level, .leave, .out_of_band, .step_up, .step_dn);

  always #5 clk = ~clk;

  // Reference update at each rising edge, using the values driven in the
  // cycle before it.
  always @(posedge clk) if (rst_n) begin
    int d;
    d = 0;
    if (above && !below && (!prev_above || timeout)) d = -1;
    if (below && !above && (!prev_below || timeout)) d = 1;
    ref_level = ref_level + d;
    if (ref_level > 2) ref_level = 2;
    if (ref_level < -2) ref_level = -2;
    prev_above = above;
    prev_below = below;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(level) != ref_level) begin
      failures++;
      $display("FAIL level=%0d expected %0d at %0t", level, ref_level, $time);
    end
    checks++;
    if (out_of_band !== (above ^ below)) begin
      failures++;
      $display("FAIL out_of_band at %0t", $time);
    end
  end

  task automatic expect_level(input int v, input string what);
    checks++;
    if (int'(level) != v) begin
      failures++;
      $display("FAIL %s: level=%0d expected %0d", what, level, v);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_level(0, "after reset");
    // Leave upwards: one step down on the next edge, leave pulses once.
    above = 1;
    #1 checks++;
    if (!leave) begin failures++; $display("FAIL leave not raised"); end
    @(negedge clk) expect_level(-1, "first step down");
    checks++;
    if (leave) begin failures++; $display("FAIL leave held"); end
    repeat (3) @(negedge clk);
    expect_level(-1, "no step without timeout");
    timeout = 1; @(negedge clk) timeout = 0;
    expect_level(-2, "timeout step");
    timeout = 1; @(negedge clk) timeout = 0;
    expect_level(-2, "saturated at -2");
    above = 0; repeat (3) @(negedge clk);
    expect_level(-2, "hold in band");
    below = 1; @(negedge clk);
    expect_level(-1, "step up on lower band");
    timeout = 1; @(negedge clk);
    expect_level(0, "timeout step up");
    @(negedge clk);
    expect_level(1, "second timeout step up");
    @(negedge clk);
    expect_level(2, "third timeout step up");
    @(negedge clk);
    expect_level(2, "saturated at +2");
    timeout = 0; below = 0;
    // Random waveforms.
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 7))
        0, 1, 2: begin above = 0; below = 0; end
        3, 4:    begin above = 1; below = 0; end
        5, 6:    begin above = 0; below = 1; end
        default: begin above = 1; below = 1; end
      endcase
      timeout = ($urandom_range(0, 3) == 0);
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
