// level_counter: up/down counter holding the inverter's output voltage level.
//
// Inputs are the synchronised band comparators: `above` when the load current
// is above the upper band (Iref + h), `below` when it is under the lower band
// (Iref - h). Inside the main band neither is set and the level holds.
//   - The cycle the current leaves the band (rising edge of above/below) the
//     level moves one step: down for above, up for below. This is the
//     ordinary hysteresis action between two adjacent levels.
//   - While the current stays out of band, each `timeout` pulse from the
//     time-error timer moves the level one more step in the same direction,
//     so the pair of levels used for tracking shifts (band change by time
//     limit).
//   - The level saturates at +/-(N_LEVELS-1)/2.
// `leave` pulses in the cycle the current leaves the band so the timer can
// restart; `out_of_band` enables it. Both comparators set at once cannot
// happen with a positive band width; the counter then holds.
//
// Timing: the level register changes one clock edge after the event.
// The up/down counter and its two count sources follow the described
// controller; edge detection on the comparator bits is this design's way of
// making one crossing give one step.
module level_counter
  import hcc_pkg::*;
#(
  parameter int N_LEVELS = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   above,
  input  logic   below,
  input  logic   timeout,
  output level_t level,
  output logic   leave,
  output logic   out_of_band,
  output logic   step_up,
  output logic   step_dn
);
  localparam int MAXL = (N_LEVELS - 1) / 2;

  logic above_q, below_q;
  logic inc, dec;

  assign out_of_band = above ^ below;
  assign leave   = (above && !above_q && !below) || (below && !below_q && !above);
  assign dec     = above && !below && ((!above_q) || timeout);
  assign inc     = below && !above && ((!below_q) || timeout);
  assign step_dn = dec && (level > level_t'(-MAXL));
  assign step_up = inc && (level < level_t'(MAXL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above_q <= 1'b0;
      below_q <= 1'b0;
      level   <= '0;
    end else begin
      above_q <= above;
      below_q <= below;
      if (step_up)      level <= level + level_t'(1);
      else if (step_dn) level <= level - level_t'(1);
    end
  end

  initial assert (N_LEVELS % 2 == 1 && N_LEVELS >= 3 && N_LEVELS <= 7)
    else $error("N_LEVELS must be odd, 3..7");
endmodule
