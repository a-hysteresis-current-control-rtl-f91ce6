// sync2: two-flop synchroniser for a bundle of asynchronous bits.
//
// The comparator outputs of the analog front end change at arbitrary times
// relative to the controller clock; each bit goes through two flip-flops
// before any logic reads it, so the logic sees it two clock edges late.
// Reset clears both stages. Synchronising the inputs is this design's own
// choice; it is not part of the described controller.
module sync2 #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
