// hcc_env: closed-loop environment for the hysteresis current controller.
//
// Behavioural model, not synthesizable. It stands in for everything outside
// the controller's logic:
//   - the simple five-level power stage (flying-capacitor leg S1/S2 over a
//     2*Vdc bus, two-level leg S3) driving an R-L load with a sinusoidal
//     back emf, integrated with forward Euler at one step per clock;
//   - the four analog comparators: current error against +/-Ei, capacitor
//     voltage against Vdc, load-current sign;
//   - a shadow of the four-switch flying-capacitor bridge: its two
//     capacitors are charged by the same load current according to the
//     gate signals sw_fc, and compared against Vdc.
// The plant advances on the falling clock edge, so the comparator outputs
// are stable at the controller's rising edge.
//
// It also checks the controller every cycle:
//   - the level against a reference model of the band/time-error stepping
//     rules (comparator bits delayed by the two synchroniser stages);
//   - both gate vectors produce the level one edge later, every switching
//     is one switch except the four zero-crossing transitions of the simple
//     structure (000->101/011, 111->010/100), and the four-switch bridge
//     always changes exactly one switch;
//   - after start-up the current error stays bounded and all capacitor
//     voltages settle near Vdc. Twice the reference and the back emf flip
//     sign at a peak (a 2.6 A reference step against the back emf), which
//     one level step cannot correct: the recovery
//     exercises the time-error steps and saturation at the extreme levels,
//     and the error check pauses for T_SETTLE after each flip;
// and it counts each mechanism of the controller, failing any that never
// happened. Electrical values (bus, band, reference) follow the experiment
// described for this controller; L, R, C and the back emf are chosen here.
module hcc_env
  import hcc_pkg::*;
#(
  parameter int unsigned ET        = 2600,    // controller's ET_CYCLES
  parameter int          N_CYC     = 40000,   // clock cycles to simulate
  parameter real         T_CLK     = 1.0e-6,  // clock period, s
  parameter real         VDC       = 30.0,    // level step; bus 2*VDC = 60 V
  parameter real         H_BAND    = 0.2,     // band Ei, A
  parameter real         I_MAX     = 1.3,     // reference amplitude, A
  parameter real         F_REF     = 50.0,    // reference frequency, Hz
  parameter real         L_LOAD    = 0.01,    // H
  parameter real         R_LOAD    = 5.0,     // ohm
  parameter real         V_BACK    = 25.0,    // back emf amplitude, V
  parameter real         C_FLY     = 1.0e-3,  // flying capacitors, F
  parameter real         ERR_LIMIT = 1.0,     // allowed |i - iref| after start-up, A
  parameter real         MEAN_LIMIT = 0.2,    // allowed mean |i - iref|, A
  parameter real         CAP_TOL   = 0.12,    // allowed capacitor deviation after 10 ms
  parameter real         T_JUMP1   = 5.0e-3,  // reference phase flips by 180 degrees
  parameter real         T_JUMP2   = 25.0e-3, //   at these two instants
  parameter real         T_SETTLE  = 8.0e-3,  // error checks skipped this long after a flip
  parameter bit          NEED_SAT  = 1        // require an expiry at an extreme level
) (
  input  logic   clk,
  input  logic   rst_n,
  input  level_t level,
  input  sw3_t   sw_simple,
  input  sw4_t   sw_fc,
  input  logic   et_expired,
  output logic   cmp_above,
  output logic   cmp_below,
  output logic   cap_high,
  output logic   fc_cap_a_high,
  output logic   fc_cap_b_high,
  output logic   i_pos,
  output int     checks,
  output int     failures,
  output logic   done
);
  localparam real PI = 3.14159265358979;

  real i_load = 0.0, vca = 28.0, va = 32.0, vb = 28.0;
  real flip = 1.0;
  real t = 0.0, iref = 0.0, err = 0.0, max_err = 0.0, sum_abs_err = 0.0;
  int  n_err = 0;
  real vca_min = 1.0e9, vca_max = -1.0e9, vfc_min = 1.0e9, vfc_max = -1.0e9;
  int  cyc = 0;

  // Mechanism counters.
  int n_band_up = 0, n_band_dn = 0, n_et_up = 0, n_et_dn = 0, n_sat = 0;
  int n_nonadj = 0, n_chg = 0, n_dis = 0, n_fc_chg = 0, n_fc_dis = 0;
  int n_zero_lo = 0, n_zero_hi = 0;
  int visits[5] = '{0, 0, 0, 0, 0};

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s (cycle %0d, t=%0.6f s)", what, cyc, t);
  endtask

  // ---------------------------------------------------------------- plant
  function automatic real leg_a(sw3_t s, real vc);
    if (s[2] && s[1]) return 2.0 * VDC;
    if (s[2])         return 2.0 * VDC - vc;
    if (s[1])         return vc;
    return 0.0;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    cmp_above = 0; cmp_below = 0; cap_high = 0; fc_cap_a_high = 0;
    fc_cap_b_high = 0; i_pos = 0;
  end

  always @(negedge clk) if (rst_n && !done) begin
    real vinv, vback, di;
    bit  settled;
    effect_t ea, eb;
    vinv  = leg_a(sw_simple, vca) - (sw_simple[0] ? 2.0 * VDC : 0.0);
    vback = V_BACK * $sin(2.0 * PI * F_REF * t) * flip;
    di    = (vinv - R_LOAD * i_load - vback) / L_LOAD * T_CLK;
    // Flying capacitor of the simple structure.
    if (sw_simple[2] && !sw_simple[1]) vca = vca + i_load * T_CLK / C_FLY;
    if (sw_simple[1] && !sw_simple[2]) vca = vca - i_load * T_CLK / C_FLY;
    // Shadow capacitors of the four-switch bridge.
    ea = sw4_effect_a(sw_fc);
    eb = sw4_effect_b(sw_fc);
    va = va + real'(ea) * i_load * T_CLK / C_FLY;
    vb = vb + real'(eb) * i_load * T_CLK / C_FLY;
    i_load = i_load + di;
    t    = t + T_CLK;
    flip = ((t >= T_JUMP1) != (t >= T_JUMP2)) ? -1.0 : 1.0;
    iref = I_MAX * $sin(2.0 * PI * F_REF * t) * flip;
    err  = i_load - iref;
    cmp_above     = (err > H_BAND);
    cmp_below     = (err < -H_BAND);
    cap_high      = (vca > VDC);
    fc_cap_a_high = (va > VDC);
    fc_cap_b_high = (vb > VDC);
    i_pos         = (i_load > 0.0);
    // Physical checks after 2 ms of start-up.
    settled = !(t >= T_JUMP1 && t < T_JUMP1 + T_SETTLE) &&
              !(t >= T_JUMP2 && t < T_JUMP2 + T_SETTLE);
    if (t > 2.0e-3 && settled) begin
      real ae;
      ae = (err < 0.0) ? -err : err;
      if (ae > max_err) max_err = ae;
      sum_abs_err += ae;
      n_err++;
    end
    if (t > 10.0e-3 && settled) begin
      if (vca < vca_min) vca_min = vca;
      if (vca > vca_max) vca_max = vca;
      if (va < vfc_min) vfc_min = va;
      if (vb < vfc_min) vfc_min = vb;
      if (va > vfc_max) vfc_max = va;
      if (vb > vfc_max) vfc_max = vb;
    end
  end

  // ------------------------------------------------- reference controller
  // Comparator bits as the controller sees them after two flops.
  logic a1 = 0, a2 = 0, a3 = 0, b1 = 0, b2 = 0, b3 = 0;
  int   ref_lvl = 0, ref_cnt = 0, ref_sat_lvl = 0;
  sw3_t prev_simple = '0;
  sw4_t prev_fc = '0;
  level_t prev_level = '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      a1 <= 0; a2 <= 0; a3 <= 0; b1 <= 0; b2 <= 0; b3 <= 0;
      ref_lvl = 0; ref_cnt = 0;
    end else begin
      logic oob, lv, exp_t;
      int   d;
      oob   = a2 ^ b2;
      lv    = (a2 && !a3 && !b2) || (b2 && !b3 && !a2);
      exp_t = oob && !lv && (ref_cnt == int'(ET) - 1);
      if (lv || !oob || exp_t) ref_cnt = 0;
      else ref_cnt++;
      d = 0;
      if (a2 && !b2 && (!a3 || exp_t)) d = -1;
      if (b2 && !a2 && (!b3 || exp_t)) d = 1;
      if (d != 0) begin
        if (ref_lvl + d > 2 || ref_lvl + d < -2) n_sat++;
        else begin
          ref_lvl += d;
          if (lv && d > 0) n_band_up++;
          if (lv && d < 0) n_band_dn++;
          if (!lv && d > 0) n_et_up++;
          if (!lv && d < 0) n_et_dn++;
        end
      end
      a1 <= cmp_above; a2 <= a1; a3 <= a2;
      b1 <= cmp_below; b2 <= b1; b3 <= b2;
    end
  end

  // ------------------------------------------------------------- checking
  always @(negedge clk) if (rst_n && !done) begin
    cyc++;
    checks++;
    if (int'(level) != ref_lvl) fail($sformatf("level %0d, reference %0d", level, ref_lvl));
    if (int'(level) >= -2 && int'(level) <= 2) visits[int'(level) + 2]++;
    // Gate vectors follow the level of the previous cycle.
    checks++;
    if (sw3_level(sw_simple) != prev_level) fail("simple-structure state does not give the level");
    checks++;
    if (sw4_level(sw_fc) != prev_level) fail("bridge state does not give the level");
    if (sw_simple != prev_simple) begin
      checks++;
      if ($countones(sw_simple ^ prev_simple) == 2) begin
        if ((prev_simple == 3'b000 && (sw_simple == 3'b101 || sw_simple == 3'b011)) ||
            (prev_simple == 3'b111 && (sw_simple == 3'b010 || sw_simple == 3'b100)))
          n_nonadj++;
        else fail($sformatf("illegal transition %b -> %b", prev_simple, sw_simple));
      end else if ($countones(sw_simple ^ prev_simple) != 1)
        fail($sformatf("illegal transition %b -> %b", prev_simple, sw_simple));
      if (sw_simple == 3'b100 || sw_simple == 3'b101) n_chg++;
      if (sw_simple == 3'b010 || sw_simple == 3'b011) n_dis++;
      if (sw_simple == 3'b000) n_zero_lo++;
      if (sw_simple == 3'b111) n_zero_hi++;
    end
    if (sw_fc != prev_fc) begin
      checks++;
      if ($countones(sw_fc ^ prev_fc) != 1) fail($sformatf("bridge transition %b -> %b", prev_fc, sw_fc));
      if (sw4_effect_a(sw_fc) > 0 || sw4_effect_b(sw_fc) > 0) n_fc_chg++;
      if (sw4_effect_a(sw_fc) < 0 || sw4_effect_b(sw_fc) < 0) n_fc_dis++;
    end
    prev_simple = sw_simple;
    prev_fc = sw_fc;
    prev_level = level;
    if (cyc == N_CYC) finish_checks();
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) fail({"mechanism never happened: ", what});
  endtask

  task automatic finish_checks();
    real mean_err;
    mean_err = (n_err > 0) ? sum_abs_err / real'(n_err) : 0.0;
    $display("current error: max %0.3f A, mean %0.3f A (band %0.3f A)", max_err, mean_err, H_BAND);
    $display("capacitor (simple): %0.2f .. %0.2f V; bridge capacitors: %0.2f .. %0.2f V (Vdc %0.1f V)",
             vca_min, vca_max, vfc_min, vfc_max, VDC);
    checks++;
    if (max_err > ERR_LIMIT) fail("current error above limit");
    checks++;
    if (mean_err > MEAN_LIMIT) fail("mean current error above limit");
    checks++;
    if (vca_min < (1.0 - CAP_TOL) * VDC || vca_max > (1.0 + CAP_TOL) * VDC) fail("simple-structure capacitor not balanced");
    checks++;
    if (vfc_min < (1.0 - CAP_TOL) * VDC || vfc_max > (1.0 + CAP_TOL) * VDC) fail("bridge capacitors not balanced");
    $display("mechanisms:");
    need(n_band_up, "level up on lower-band crossing");
    need(n_band_dn, "level down on upper-band crossing");
    need(n_et_up, "level up on time-error expiry");
    need(n_et_dn, "level down on time-error expiry");
    need(n_nonadj, "non-adjacent zero-crossing transition");
    need(n_chg, "capacitor charging state at +/-Vdc");
    need(n_dis, "capacitor discharging state at +/-Vdc");
    need(n_zero_lo, "zero level as 000");
    need(n_zero_hi, "zero level as 111");
    need(n_fc_chg, "bridge state charging a capacitor");
    need(n_fc_dis, "bridge state discharging a capacitor");
    for (int k = 0; k < 5; k++) need(visits[k], $sformatf("cycles at level %0d", k - 2));
    if (NEED_SAT) need(n_sat, "expiry at an extreme level (level held)");
    else $display("  %-40s %0d", "expiry at an extreme level (level held)", n_sat);
    done = 1;
  endtask
endmodule
