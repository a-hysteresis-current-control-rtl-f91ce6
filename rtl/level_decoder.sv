// level_decoder: turns the signed level from the counter into one select
// line per voltage level.
//
// Bit k of `sel` is set when level == k - (N_LEVELS-1)/2, so for five
// levels sel[4..0] select +2Vdc, +Vdc, 0, -Vdc, -2Vdc. Exactly one bit is
// set for any level in range; a level out of range sets none. Purely
// combinational. The decoder between counter and state transition circuit
// is as described; the one-hot coding is this design's choice.
module level_decoder
  import hcc_pkg::*;
#(
  parameter int N_LEVELS = 5
) (
  input  level_t              level,
  output logic [N_LEVELS-1:0] sel
);
  localparam int MAXL = (N_LEVELS - 1) / 2;

  always_comb begin
    for (int k = 0; k < N_LEVELS; k++)
      sel[k] = (level == level_t'(k - MAXL));
  end
endmodule
