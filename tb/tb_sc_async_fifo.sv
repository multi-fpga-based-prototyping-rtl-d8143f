// Self-checking test of the asynchronous FIFO with unrelated write (10 ns)
// and read (7 ns) clocks.  A counting sequence is pushed and popped with
// random gaps; it must come out complete and in order.  With the reader
// stopped, full must rise after exactly DEPTH pushes.
module tb_sc_async_fifo;
  localparam int W = 16, DEPTH = 4, N = 300;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0, nexp = 0, nw = 0;
  bit rd_go = 1;

  sc_async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  bit wgo;
  always_ff @(posedge wclk) begin
    wgo <= ($urandom_range(0, 3) != 0);
    if (wr_en) nw <= nw + 1;
  end
  always_comb begin
    wr_en   = wrst_n && nw < N && !full && wgo;
    wr_data = W'(nw);
  end
  always_comb rd_en = rd_go && !empty && ($urandom_range(0, 2) != 0);
  always_ff @(posedge rclk) begin
    if (rd_en) begin
      checks++;
      if (rd_data != W'(nexp)) begin failures++; $display("FAIL got %0d expected %0d", rd_data, nexp); end
      nexp <= nexp + 1;
    end
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    wait (nexp == N);
    // fill with the reader stopped
    rd_go = 0;
    @(negedge wclk);
    nw = N - 10;
    nexp = N - 10;
    repeat (40) @(posedge wclk);
    checks++;
    if (!full || nw != N - 10 + DEPTH) begin
      failures++; $display("FAIL full=%0d after %0d pushes", full, nw - (N - 10));
    end
    rd_go = 1;
    repeat (80) @(posedge wclk);
    checks++;
    if (nexp != N) begin failures++; $display("FAIL drained to %0d", nexp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
