// Interface register (IR) placed on a boundary between emulated components.
//
// During a virtual cycle the emulated components produce new outputs
// before their neighbours have finished with the old ones.  An interface
// register holds the value the neighbour may see and takes the new value
// only on the update strobe, which the virtual-cycle controller raises once
// per simulated cycle.  Interface: d/q of width W, load (update strobe),
// synchronous update, asynchronous reset to RESET_VAL.
// Follows the description's rule that interface registers are updated at
// the end of a simulated cycle; width and reset value are parameters.
module sc_ifreg #(
  parameter int unsigned W         = 8,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (load) q <= d;
  end
endmodule
