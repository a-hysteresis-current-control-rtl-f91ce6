// hcc_top: digital section of a multilevel hysteresis current controller
// for a single-phase five-level flying-capacitor inverter.
//
// Four analog comparators outside this logic report whether the current
// error is above the upper band (+Ei) or below the lower band (-Ei), whether
// the flying capacitor is above its reference voltage and the sign of the
// load current. Here those bits are synchronised, and:
//   - level_counter steps the output level down/up by one when the current
//     leaves the main band upwards/downwards, and one more step each time
//     error_timer reports that the current has stayed out of band for the
//     time-error period Et;
//   - level_decoder turns the level into one select line per level;
//   - simple_state_transition maps it to the three gate signals of the
//     simple structure (one flying-capacitor leg, one two-level leg),
//     balancing the capacitor at +/-Vdc;
//   - fc_state_transition maps the same level to the four gate signals of
//     the full bridge with a flying capacitor in each leg, balancing both
//     capacitors from their own comparator bits (fc_cap_a_high,
//     fc_cap_b_high). Only one of the two gate outputs drives a given
//     power stage; cap_high belongs to the simple structure.
//
// Timing: a comparator edge reaches the level register after three clock
// edges (two synchroniser flops, then the counter) and the gate outputs one
// edge later. The second step after leaving the band follows the first by
// ET_CYCLES cycles, and further steps by ET_CYCLES each.
// The structure (comparators, timer, up/down counter, decoder, state
// transition with D flip-flops) follows the described controller; the
// synchroniser and the side-by-side four-switch output are this design's
// additions.
module hcc_top
  import hcc_pkg::*;
#(
  parameter int          N_LEVELS  = 5,
  parameter int unsigned ET_CYCLES = 2600
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cmp_above,
  input  logic   cmp_below,
  input  logic   cap_high,
  input  logic   fc_cap_a_high,
  input  logic   fc_cap_b_high,
  input  logic   i_pos,
  output level_t level,
  output sw3_t   sw_simple,
  output sw4_t   sw_fc,
  output logic   et_expired
);
  logic above, below, cap_s, fc_cap_a, fc_cap_b, ipos_s;
  logic leave, out_of_band;
  logic [N_LEVELS-1:0] sel;

  sync2 #(.W(6)) u_sync (
    .clk, .rst_n,
    .d({cmp_above, cmp_below, cap_high, fc_cap_a_high, fc_cap_b_high, i_pos}),
    .q({above, below, cap_s, fc_cap_a, fc_cap_b, ipos_s})
  );

  error_timer #(.ET_CYCLES(ET_CYCLES)) u_timer (
    .clk, .rst_n,
    .clr    (leave || !out_of_band),
    .en     (out_of_band),
    .expire (et_expired)
  );

  level_counter #(.N_LEVELS(N_LEVELS)) u_count (
    .clk, .rst_n,
    .above, .below,
    .timeout (et_expired),
    .level, .leave, .out_of_band, .step_up (), .step_dn ()
  );

  level_decoder #(.N_LEVELS(N_LEVELS)) u_dec (
    .level, .sel
  );

  simple_state_transition u_simple (
    .clk, .rst_n,
    .sel      (sel[4:0]),
    .cap_high (cap_s),
    .i_pos    (ipos_s),
    .sw       (sw_simple)
  );

  fc_state_transition u_fc (
    .clk, .rst_n,
    .sel        (sel[4:0]),
    .cap_a_high (fc_cap_a),
    .cap_b_high (fc_cap_b),
    .i_pos      (ipos_s),
    .sw         (sw_fc)
  );

  initial assert (N_LEVELS == 5) else $error("the switch-state mappers are five-level");
endmodule
