// tb_hcc_top_eq5: end-to-end test of the controller with the time-error
// period set from the band spacing and the largest current slope,
// Et = Delta*L/(2Vdc + Vback) = 0.2 A * 10 mH / (60 V + 25 V) = 23.5 us,
// i.e. 24 cycles at 1 MHz (normal operation, as opposed to the long
// demonstration period of tb_hcc_top).
//
// The controller closes the loop around the behavioural power stage and
// R-L load of hcc_env for two periods of a 50 Hz, 1.3 A reference with a
// 200 mA band, including two reference reversals. hcc_env checks the level
// against a reference model of the stepping rules, the switch-state rules
// of both topologies, current tracking (error under 0.3 A outside the
// reversals, mean under the band) and capacitor balance (within 12%), and
// fails any mechanism that never happened: band steps both ways,
// time-error steps both ways, expiry at an extreme level, the four
// non-adjacent zero-crossing transitions, charging and discharging states,
// both zero states, and all five levels.
module tb_hcc_top_eq5;
  import hcc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmp_above, cmp_below, cap_high, fc_cap_a_high, fc_cap_b_high, i_pos;
  level_t level;
  sw3_t sw_simple;
  sw4_t sw_fc;
  logic et_expired, done;
  int checks, failures;

  hcc_top #(.ET_CYCLES(24)) dut (.clk, .rst_n, .cmp_above, .cmp_below, .cap_high, .fc_cap_a_high,
               .fc_cap_b_high, .i_pos, .level, .sw_simple, .sw_fc, .et_expired);

  hcc_env #(.ET(24), .N_CYC(40000), .ERR_LIMIT(0.3), .CAP_TOL(0.12), .NEED_SAT(1)) env (
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
