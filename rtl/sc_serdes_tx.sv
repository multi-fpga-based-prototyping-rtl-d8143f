// Serializer of an inter-FPGA link, with parity and NRZI line coding.
//
// A frame is one start bit (1), the W payload bits LSB first and one even
// parity bit over the payload.  Every frame bit is NRZI coded on the line:
// a 1 toggles the line level, a 0 holds it, so the idle line (all zeros)
// never toggles and the start bit always makes an edge.  One bit is sent per
// clock (80 Mbps at the 80 MHz SerDes clock).
// Interface: in_valid/in_data offer a payload (for instance the head of an
// asynchronous FIFO); in_pop is high for one cycle when it is taken.  busy
// is high while a frame is on the line.  Frame time is W+2 clocks.
// The description names NRZI and parity; frame layout, bit order and parity
// sense are this design's choices.
module sc_serdes_tx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_pop,
  output logic         busy,
  output logic         line_o
);
  localparam int unsigned FW = W + 2;          // start + payload + parity
  localparam int unsigned CW = $clog2(FW + 1);

  logic [FW-1:0] shreg;
  logic [CW-1:0] left;

  assign busy   = (left != '0);
  assign in_pop = in_valid && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      left   <= '0;
      line_o <= 1'b0;
    end else begin
      if (busy) begin
        line_o <= line_o ^ shreg[0];
        shreg  <= shreg >> 1;
        left   <= left - 1'b1;
      end else if (in_valid) begin
        // start bit goes out now, payload and parity follow
        line_o <= ~line_o;
        shreg  <= {1'b0, ^in_data, in_data};
        left   <= CW'(FW - 1);
      end
    end
  end

endmodule
