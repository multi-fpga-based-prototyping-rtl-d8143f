// Reset synchronizer for one clock domain of a ScalableCore Unit.
//
// Every unit runs from its own oscillator, so the board reset is
// asynchronous to each of its clocks.  Reset asserts at once and is released
// after STAGES rising edges of clk, so that no flop leaves reset close to a
// clock edge.  Interface: arst_n (board reset, active low), rst_n (reset for
// this domain, active low).
// The description only lists "Clock and Reset" among the basic system
// functions; the two-stage synchronizer is this design's choice.
// Lint reports the chain as flopped both synchronously and asynchronously:
// that is what a reset synchronizer is (asynchronous assertion, clocked
// release), so the warning stands.
module sc_reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync <= '0;
    else         sync <= {sync[STAGES-2:0], 1'b1};
  end

  assign rst_n = sync[STAGES-1];
endmodule
