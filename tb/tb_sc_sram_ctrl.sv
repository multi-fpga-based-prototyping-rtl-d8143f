// Self-checking test of the SRAM controller with a behavioural 8-bit SRAM.
// Random words are written to random addresses and read back; each word
// must land as four little-endian bytes, read back intact, and each access
// must take eight clocks from request to done.
module tb_sc_sram_ctrl;
  localparam int AW = 17;
  logic clk = 0, rst_n = 0;
  logic req, we, busy, done;
  logic [AW-1:0] addr;
  logic [31:0] wdata, rdata;
  logic [AW+1:0] sram_addr;
  logic [7:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int checks = 0, failures = 0;
  logic [31:0] model [int];

  sc_sram_ctrl #(.AW(AW)) dut (.*);
  sram_model #(.AW(AW + 2)) u_sram (.clk, .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
                                    .dq_i(sram_dq_i), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));
  always #5 clk = ~clk;

  task automatic access(input logic w, input logic [AW-1:0] a, input logic [31:0] d, output int cyc);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    logic [AW-1:0] a;
    logic [31:0] d;
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      a = AW'($urandom); d = $urandom;
      access(1, a, d, cyc);
      model[int'(a)] = d;
      checks++;
      if (cyc != 8) begin failures++; $display("FAIL write took %0d", cyc); end
      checks++;
      if (u_sram.mem[{a, 2'd0}] != d[7:0] || u_sram.mem[{a, 2'd3}] != d[31:24]) begin
        failures++; $display("FAIL byte order at %h", a);
      end
    end
    foreach (model[k]) begin
      access(0, AW'(k), 0, cyc);
      checks++;
      if (rdata != model[k] || cyc != 8) begin
        failures++; $display("FAIL read %h: %h vs %h in %0d", k, rdata, model[k], cyc);
      end
    end
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
