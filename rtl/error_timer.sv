// error_timer: resettable time-error timer.
//
// While `en` is high (the load current is outside the main band) the timer
// counts clock cycles. When it has counted ET_CYCLES cycles it raises
// `expire` for one cycle and starts again from zero, so a current that stays
// out of band produces one pulse every ET_CYCLES cycles. `clr` (the current
// is back inside the band, or has just left it) has priority and returns the
// count to zero; with `en` low the count holds.
//
// Timing: after a cycle with clr=1, the ET_CYCLES-th following cycle with
// en=1 shows expire=1 (combinational from the count register).
//
// The behaviour follows the described resettable timer. The period Et comes
// from the ratio of the band spacing to the largest current slope, Et =
// Delta*L/(2Vdc+Vback); it is set here as a cycle count, and the default of
// 2600 cycles is the 2.6 ms period used in the experiments at an assumed
// 1 MHz clock.
module error_timer #(
  parameter int unsigned ET_CYCLES = 2600,
  localparam int unsigned CW = $clog2(ET_CYCLES)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output logic expire
);
  logic [CW-1:0] count;

  assign expire = en && !clr && (count == CW'(ET_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (clr)     count <= '0;
    else if (expire)  count <= '0;
    else if (en)      count <= count + 1'b1;
  end

  initial assert (ET_CYCLES >= 2) else $error("ET_CYCLES must be at least 2");
endmodule
