// fc_state_transition: switch-state machine of the five-level single-phase
// bridge with a flying capacitor in each leg (S1/S2 leg a, S3/S4 leg b).
//
// The bridge has sixteen switch states; the output level is S1+S2-S3-S4 in
// units of Vdc, and for positive load current a leg with only its upper
// switch on (S1 alone, S4 alone) charges its capacitor, only its lower
// switch on (S2 alone, S3 alone) discharges it. Negative current reverses
// both. Two states are adjacent when they differ in one switch, and every
// adjacent pair differs by exactly one level.
//
// The switch state sits in D flip-flops. When it does not produce the
// target level from `sel` (+2Vdc, +Vdc, 0, -Vdc, -2Vdc, one hot), exactly
// one switch is changed: of the switches whose change moves the output one
// level towards the target, the one whose resulting state gives the best
// capacitor balance is taken. The balance score adds, for each capacitor,
// +1 if the new state moves it towards Vdc, -1 if away, 0 if it leaves it
// alone. Ties are broken by a scan order that alternates at every change
// (S1 first, then S4 first), so that when the two capacitors want
// opposite things neither leg is always preferred. While the level holds,
// the state holds.
//
// Interface: cap_a_high / cap_b_high are 1 when the capacitor voltage is
// above Vdc, i_pos is 1 for positive load current, `sw` = {S1,S2,S3,S4}.
// Timing: `sw` changes one clock edge after `sel` (one level per edge).
// Reset gives 0000. The state table and the one-switch-per-change rule
// follow the described design; the scoring rule and the alternating tie
// break are this design's simplest way of choosing among the adjacent
// states.
module fc_state_transition
  import hcc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] sel,
  input  logic       cap_a_high,
  input  logic       cap_b_high,
  input  logic       i_pos,
  output sw4_t       sw
);
  level_t cur;
  logic   go_up, hold;
  logic   s4_first;   // scan order for ties, toggles at each change
  sw4_t   next;

  assign cur  = sw4_level(sw);
  assign hold = sel[cur + 2] || (sel == '0);
  assign go_up = (sel[4] && cur < 2) || (sel[3] && cur < 1) ||
                 (sel[2] && cur < 0) || (sel[1] && cur < -1);

  // Score of a candidate state: capacitor moves towards Vdc count +1.
  function automatic int score(sw4_t s);
    int ea, eb, da, db;
    ea = int'(sw4_effect_a(s));
    eb = int'(sw4_effect_b(s));
    if (!i_pos) begin
      ea = -ea;
      eb = -eb;
    end
    da = cap_a_high ? -1 : 1;
    db = cap_b_high ? -1 : 1;
    return ea * da + eb * db;
  endfunction

  always_comb begin
    int   best;
    sw4_t cand;
    logic raises;
    next = sw;
    best = -100;
    for (int j = 0; j < 4; j++) begin
      int k;
      k = s4_first ? j : 3 - j;
      cand = sw;
      cand[k] = !sw[k];
      raises = (k >= 2) ? cand[k] : !cand[k];
      if (raises == go_up && score(cand) > best) begin
        best = score(cand);
        next = cand;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw       <= '0;
      s4_first <= 1'b0;
    end else if (!hold) begin
      sw       <= next;
      s4_first <= !s4_first;
    end
  end

  // Switching rule: never more than one switch per clock edge.
  a_adjacent: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(sw ^ $past(sw)) <= 1)
    else $error("non-adjacent transition %b -> %b", $past(sw), sw);
endmodule
