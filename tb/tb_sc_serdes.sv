// Self-checking test of the serial link: serializer -> line -> deserializer.
// Random payloads are sent back to back; every one must arrive intact, in
// order, one frame every W+2 SerDes clocks.  Then the line is inverted from
// inside a frame on: the parity check must drop that frame and count it.
module tb_sc_serdes;
  localparam int W = 41;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_pop, busy, line, rx_v, inject;
  logic [W-1:0] in_data, rx_d;
  logic [7:0] errs;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, nrx = 0, last_rx = -1, gap_bad = 0, cyc = 0;

  sc_serdes_tx #(.W(W)) u_tx (.clk, .rst_n, .in_valid, .in_data, .in_pop, .busy, .line_o(line));
  sc_serdes_rx #(.W(W)) u_rx (.clk, .rst_n, .line_i(line ^ inject), .out_valid(rx_v),
                              .out_data(rx_d), .err_count(errs));
  always #6 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_pop) begin
      sent.push_back(in_data);
      in_data <= {$urandom(), $urandom()};
    end
    if (rx_v) begin
      checks++;
      if (sent.size() == 0 || sent[0] != rx_d) begin
        failures++; $display("FAIL frame %0d: got %h", nrx, rx_d);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      if (last_rx >= 0 && inject == 0 && cyc - last_rx != W + 2) gap_bad++;
      last_rx <= cyc;
      nrx++;
    end
  end

  initial begin
    in_valid = 0; inject = 0; in_data = 41'h1_2345_6789;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    in_valid = 1;
    repeat (20 * (W + 2)) @(posedge clk);
    in_valid = 0;
    repeat (2 * (W + 2)) @(posedge clk);
    checks++;
    if (nrx < 19 || gap_bad != 0) begin
      failures++; $display("FAIL rate: %0d frames, %0d wrong gaps", nrx, gap_bad);
    end
    // corrupt one bit of the next frame
    in_valid = 1;
    @(posedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    // a lasting inversion of the line is one decoded bit error
    inject = 1;
    repeat (2 * (W + 2)) @(posedge clk);
    checks++;
    if (errs != 1) begin failures++; $display("FAIL parity error count %0d", errs); end
    checks++;
    if (sent.size() != 1) begin failures++; $display("FAIL corrupted frame delivered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
