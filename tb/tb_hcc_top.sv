// tb_hcc_top: end-to-end test of the controller at its default parameters.
//
// The controller (time-error period 2600 cycles = 2.6 ms at 1 MHz, the long
// period used to make the time-error action visible) closes the loop
// around the behavioural power stage and R-L load of hcc_env for two
// periods of a 50 Hz, 1.3 A reference with a 200 mA band, including two
// reference reversals. hcc_env checks the level against a reference model,
// the switch-state rules, current tracking and capacitor balance, and that
// every mechanism occurred. With so long a time-error period the level
// never waits at an extreme level, so that count is reported but not
// required, and the capacitors of the four-switch bridge, parked for 2.6 ms
// in one state during a reversal, are allowed a 30% excursion.
module tb_hcc_top;
  import hcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmp_above, cmp_below, cap_high, fc_cap_a_high, fc_cap_b_high, i_pos;
  level_t level;
  sw3_t sw_simple;
  sw4_t sw_fc;
  logic et_expired, done;
  int checks, failures;

  hcc_top dut (.clk, .rst_n, .cmp_above, .cmp_below, .cap_high, .fc_cap_a_high,
               .fc_cap_b_high, .i_pos, .level, .sw_simple, .sw_fc, .et_expired);

  hcc_env #(.ET(2600), .N_CYC(40000), .ERR_LIMIT(1.0), .CAP_TOL(0.3), .NEED_SAT(0)) env (
    .clk, .rst_n, .level, .sw_simple, .sw_fc, .et_expired, .cmp_above, .cmp_below,
    .cap_high, .fc_cap_a_high, .fc_cap_b_high, .i_pos, .checks, .failures, .done);

  always #500 clk = ~clk;   // 1 MHz with a 1 ns time unit

  initial begin : watchdog
    repeat (45000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
