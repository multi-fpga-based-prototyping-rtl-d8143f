// Self-checking test of the DMA controller.  Two controllers, nodes A (0,0)
// and B (1,0), are joined link to link (no router), each with its own
// 1-cycle memory.  Through the memory-mapped registers A does a PUT of 8
// words into B's memory, then a GET of 4 words of B's memory into its own.
// Checked: the copied words, B's received-word counter, the busy flag, and
// the PUT rate of one word every two cycles.
module tb_mcore_dmac;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic        re [2], we [2];
  logic [3:0]  ra [2];
  logic [31:0] wd [2], rq [2], rdd [2];
  mreq_t       rdq [2], wrq [2];
  link_t       lo [2];
  logic        busy [2];
  logic [31:0] mem [2][1024];
  int checks = 0, failures = 0;

  for (genvar n = 0; n < 2; n++) begin : g_n
    mcore_dmac dut (
      .clk, .rst_n, .en, .my_x(XW'(n)), .my_y(YW'(0)),
      .reg_re(re[n]), .reg_we(we[n]), .reg_addr(ra[n]), .reg_wdata(wd[n]), .reg_rdata(rq[n]),
      .rd_req(rdq[n]), .rd_rdata(rdd[n]), .wr_req(wrq[n]),
      .net_out(lo[n]), .net_in(lo[1-n]), .busy(busy[n])
    );
    always_ff @(posedge clk) begin
      if (rdq[n].re) rdd[n] <= mem[n][rdq[n].addr[9:0]];
      if (wrq[n].we) mem[n][wrq[n].addr[9:0]] <= wrq[n].wdata;
    end
  end
  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wreg(input int n, input int a, input logic [31:0] v);
    @(negedge clk);
    re[n] = 0; we[n] = 1; ra[n] = 4'(a); wd[n] = v;
    @(negedge clk);
    we[n] = 0;
  endtask

  task automatic rreg(input int n, input int a, output logic [31:0] v);
    @(negedge clk);
    re[n] = 1; we[n] = 0; ra[n] = 4'(a);
    @(negedge clk);
    re[n] = 0;
    v = rq[n];
  endtask

  initial begin
    logic [31:0] v;
    int t0, t1;
    for (int n = 0; n < 2; n++) begin
      re[n] = 0; we[n] = 0; ra[n] = 0; wd[n] = 0;
      for (int i = 0; i < 1024; i++) mem[n][i] = 32'(n * 'h10000 + i * 3 + 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // PUT: A[16..23] -> B[100..107]
    wreg(0, R_DMA_DST, 32'h10);
    wreg(0, R_DMA_LADDR, 16);
    wreg(0, R_DMA_RADDR, 100);
    wreg(0, R_DMA_LEN, 8);
    wreg(0, R_DMA_CTRL, 1);
    t0 = $time;
    rreg(0, R_DMA_CTRL, v);
    check("busy after start", v, 1);
    wait (lo[0].valid && lo[0].flit.tail);
    t1 = $time;
    // the tail leaves 19 edges after the control write: 1 to take the
    // command, 1 each for head and address flit, 2 per data word (8 words).
    // t0 lies half a cycle after the write edge, so 18.5 cycles elapse.
    check("PUT duration (cycles)", 32'((t1 - t0) / 10), 18);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 8; i++) check($sformatf("PUT word %0d", i), mem[1][100 + i], 32'(16 + i) * 3 + 1);
    rreg(1, R_DMA_RCNT, v);
    check("B received count", v, 8);
    rreg(0, R_DMA_CTRL, v);
    check("busy cleared", v, 0);
    // GET: B[200..203] -> A[50..53]
    wreg(0, R_DMA_LADDR, 50);
    wreg(0, R_DMA_RADDR, 200);
    wreg(0, R_DMA_LEN, 4);
    wreg(0, R_DMA_CTRL, 2);
    repeat (40) @(posedge clk);
    for (int i = 0; i < 4; i++) check($sformatf("GET word %0d", i), mem[0][50 + i], 32'('h10000 + (200 + i) * 3 + 1));
    rreg(0, R_DMA_RCNT, v);
    check("A received count", v, 4);
    rreg(1, R_NODE_ID, v);
    check("node id", v, 32'h10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
