// Self-checking test of the interface register: it must show its reset
// value, ignore its input while load is low and take it on load.
module tb_sc_ifreg;
  logic clk = 0, rst_n = 0, load = 0;
  logic [11:0] d, q;
  logic [11:0] model;
  int checks = 0, failures = 0;
  sc_ifreg #(.W(12), .RESET_VAL(12'h5A5)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    d = 12'hFFF;
    repeat (2) @(posedge clk);
    #1 checks++; if (q != 12'h5A5) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = 12'h5A5;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 12'($urandom);
      load = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q != model) begin failures++; $display("FAIL step %0d: %h vs %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
