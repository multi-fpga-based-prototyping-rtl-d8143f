// Self-checking test of the reset synchronizer: reset must assert at once
// (without a clock edge) and release exactly STAGES rising edges after the
// asynchronous reset is removed.
module tb_sc_reset_sync;
  logic clk = 0, arst_n = 0, rst_n;
  int checks = 0, failures = 0, n;
  sc_reset_sync #(.STAGES(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int round = 0; round < 4; round++) begin
      repeat (3) @(posedge clk);
      #2 arst_n = 1;
      n = 0;
      while (!rst_n) begin @(posedge clk); #1 n++; end
      checks++;
      if (n != 2) begin failures++; $display("FAIL released after %0d edges", n); end
      repeat (2) @(posedge clk);
      #3 arst_n = 0;
      #1 checks++;
      if (rst_n) begin failures++; $display("FAIL reset not asserted at once"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
