// hcc_pkg: shared constants and helper functions of the multilevel
// hysteresis current controller.
//
// The output level is a small signed integer in units of the capacitor
// voltage Vdc (-2..+2 for the five-level inverter). The switch states of
// the simple three-switch structure and of the four-switch flying-capacitor
// bridge are plain bit vectors, S1 in the most significant bit. The
// functions below give the output level each switch state produces and the
// direction in which it moves each flying capacitor for positive load
// current, exactly as tabulated for the two topologies; negative load
// current reverses every capacitor effect.
package hcc_pkg;

  // Width of the signed level for up to 7 levels (-3..+3); 5 are used.
  localparam int LVL_W = 3;
  typedef logic signed [LVL_W-1:0] level_t;

  // Simple structure: S1,S2 switch the flying-capacitor leg, S3 the
  // two-level leg.
  typedef logic [2:0] sw3_t;
  localparam sw3_t SW3_P2   = 3'b110;  // +2Vdc
  localparam sw3_t SW3_P1_C = 3'b100;  // +Vdc, charges Vca for i>0
  localparam sw3_t SW3_P1_D = 3'b010;  // +Vdc, discharges Vca for i>0
  localparam sw3_t SW3_Z_LO = 3'b000;  // 0, all off
  localparam sw3_t SW3_Z_HI = 3'b111;  // 0, all on
  localparam sw3_t SW3_M1_C = 3'b101;  // -Vdc, charges Vca for i>0
  localparam sw3_t SW3_M1_D = 3'b011;  // -Vdc, discharges Vca for i>0
  localparam sw3_t SW3_M2   = 3'b001;  // -2Vdc

  // Full bridge: S1,S2 leg a (capacitor a), S3,S4 leg b (capacitor b).
  typedef logic [3:0] sw4_t;

  // Capacitor effect for positive load current: +1 charge, -1 discharge.
  typedef logic signed [1:0] effect_t;

  // Output level of the simple structure: Vout/Vdc = S1 + S2 - 2*S3.
  function automatic level_t sw3_level(sw3_t s);
    return level_t'(int'(s[2]) + int'(s[1]) - 2 * int'(s[0]));
  endfunction

  // Output level of the full bridge: Vout/Vdc = S1 + S2 - S3 - S4.
  function automatic level_t sw4_level(sw4_t s);
    return level_t'(int'(s[3]) + int'(s[2]) - int'(s[1]) - int'(s[0]));
  endfunction

  // Effect of one leg (upper switch u, lower switch l) on its capacitor for
  // i>0: upper-only charges, lower-only discharges, both or none leave it.
  function automatic effect_t leg_effect(logic u, logic l);
    if (u && !l) return 2'sd1;
    if (l && !u) return -2'sd1;
    return 2'sd0;
  endfunction

  // Leg b is wired the other way round: S4-only charges, S3-only discharges.
  function automatic effect_t sw4_effect_a(sw4_t s);
    return leg_effect(s[3], s[2]);
  endfunction
  function automatic effect_t sw4_effect_b(sw4_t s);
    return leg_effect(s[0], s[1]);
  endfunction

endpackage
