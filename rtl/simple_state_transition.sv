// simple_state_transition: switch-state machine of the simple five-level
// structure (one flying-capacitor leg S1/S2 and one two-level leg S3).
//
// The decoded level select lines `sel` (+2Vdc, +Vdc, 0, -Vdc, -2Vdc, one
// hot) give the target level. The switch state is held in D flip-flops; in
// each cycle where the held state does not produce the target level, the
// next state is chosen from the held state, the capacitor bit and the load
// current sign:
//   +2Vdc : 110               -2Vdc : 001
//   +Vdc  : 100 charges Vca for i>0, 010 discharges it
//   -Vdc  : 101 charges Vca for i>0, 011 discharges it
//   0     : 000 when coming from a positive level, 111 from a negative one
// At +/-Vdc the state that moves Vca back towards Vdc is taken: charge when
// the capacitor is low and the current positive or it is high and the
// current negative, discharge otherwise. Every transition between
// neighbouring levels is then a single switch change except the four the
// topology forces, 000->101/011 and 111->010/100, which change two switches
// and occur only when the output crosses zero. While the level holds the
// state holds, so there are no extra switchings.
//
// Interface: cap_high is 1 when Vca is above its reference Vdc; i_pos is 1
// when the load current is positive. `sw` = {S1,S2,S3}, 1 = on.
// Timing: `sw` changes one clock edge after `sel`. Reset gives 000.
// The state table and the allowed transitions follow the described design;
// holding the state until the level changes is this design's reading of
// "decision at the next switching time".
module simple_state_transition
  import hcc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] sel,
  input  logic       cap_high,
  input  logic       i_pos,
  output sw3_t       sw
);
  logic charge;   // take the state that raises Vca
  sw3_t next;

  assign charge = (cap_high != i_pos);

  always_comb begin
    next = sw;
    unique case (1'b1)
      sel[4]: next = SW3_P2;
      sel[3]: next = charge ? SW3_P1_C : SW3_P1_D;
      sel[2]: next = sw[0] ? SW3_Z_HI : SW3_Z_LO;
      sel[1]: next = charge ? SW3_M1_C : SW3_M1_D;
      sel[0]: next = SW3_M2;
      default: next = sw;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sw <= SW3_Z_LO;
    else if (!sel[sw3_level(sw) + 2]) sw <= next;
  end

  // Switching rule: one switch per change, except the four zero-crossing
  // transitions that this structure cannot avoid.
  a_adjacent: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(sw ^ $past(sw)) <= 1 ||
    ($past(sw) == SW3_Z_LO && (sw == SW3_M1_C || sw == SW3_M1_D)) ||
    ($past(sw) == SW3_Z_HI && (sw == SW3_P1_C || sw == SW3_P1_D)))
    else $error("non-adjacent transition %b -> %b", $past(sw), sw);
endmodule
