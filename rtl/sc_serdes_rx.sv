// Deserializer of an inter-FPGA link: NRZI decoding, frame capture and
// parity check.
//
// The line is brought into the local SerDes clock with two flops.  A bit is
// decoded as 1 when the sampled level differs from the previous sample.
// While idle, the first 1 is a start bit; the next W bits are the payload
// (LSB first) and the bit after them is even parity.  A good frame is
// presented on out_data with a one-cycle out_valid; a frame with a parity
// error is dropped and counted on err_count (saturating).
// Timing: out_valid rises W+1 clocks after the start bit was sampled, plus
// the two synchronizer flops.  The receiver samples once per bit, so both
// ends must run the SerDes clock at the same frequency.
// The description names NRZI and parity; one sample per bit and the
// dropping of bad frames are this design's choices.
module sc_serdes_rx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         line_i,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic [7:0]   err_count
);
  localparam int unsigned CW = $clog2(W + 2);

  logic          s1, s2, prev;
  logic          bit_now;
  logic [W:0]    shreg;
  logic [CW-1:0] cnt;
  logic          active;

  assign bit_now = s2 ^ prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; prev <= 1'b0;
    end else begin
      s1 <= line_i; s2 <= s1; prev <= s2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      active    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      err_count <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!active) begin
        if (bit_now) begin
          active <= 1'b1;
          cnt    <= '0;
        end
      end else begin
        shreg <= {bit_now, shreg[W:1]};
        cnt   <= cnt + 1'b1;
        if (cnt == CW'(W)) begin
          active <= 1'b0;
          // {bit_now, shreg[W:1]} is {parity, payload}
          if ((^shreg[W:1]) == bit_now) begin
            out_valid <= 1'b1;
            out_data  <= shreg[W:1];
          end else if (err_count != 8'hFF) begin
            err_count <= err_count + 1'b1;
          end
        end
      end
    end
  end

endmodule
