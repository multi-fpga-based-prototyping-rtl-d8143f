// Test of the cycle-accuracy manager.
// 1. The Fig. 4.7 sequence: two reads issued in clock 1 are passed on in
//    clock 1, DRIVE falls in clock 2 (port 0 ready), rises in clock 3
//    (port 1 ready), and clock 0 and 1 have DRIVE high.
// 2. A simulated design that advances only on DRIVE issues a random read or
//    write per port per simulated cycle; the cache answers after a random
//    1..4 clocks.  Every read must return what an ideal one-cycle memory
//    would, in the simulated cycle after the read.
module tb_cycle_accuracy_manager;
  localparam int NP = 2, AW = 17, DW = 32, NS = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic drive;
  logic [AW-1:0] l_addr [NP], c_addr [NP];
  logic [DW-1:0] l_wdata [NP], l_rdata [NP], c_wdata [NP], c_rdata [NP];
  logic [NP-1:0] l_we, l_re, c_we, c_re, c_rdy;
  int checks = 0, failures = 0;

  cycle_accuracy_manager dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // random-test state
  bit          directed = 1;
  int          s = 0;                          // simulated cycle
  logic [1:0]  op_k [NS][NP];                  // 0 none, 1 read, 2 write
  logic [AW-1:0] op_a [NS][NP];
  logic [DW-1:0] op_d [NS][NP], op_x [NS][NP];  // write data, expected read
  logic [DW-1:0] mem [1 << 8];                 // cache model contents
  int cnt [NP];
  bit busy [NP];
  int stalls = 0;
  logic [NP-1:0] dre = '0;                      // directed-test read enables

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      if (!directed && s < NS) begin
        l_addr[p] = op_a[s][p]; l_wdata[p] = op_d[s][p];
        l_re[p] = (op_k[s][p] == 1); l_we[p] = (op_k[s][p] == 2);
      end else begin
        l_addr[p] = '0; l_wdata[p] = '0; l_re[p] = dre[p]; l_we[p] = 1'b0;
      end
    end
  end

  // cache model
  always @(negedge clk) if (!directed) begin
    for (int p = 0; p < NP; p++) begin
      c_rdy[p] = 0;
      if (busy[p]) begin
        if (cnt[p] == 0) begin
          c_rdy[p] = 1; busy[p] = 0;
          c_rdata[p] = mem[c_addr[p][7:0]];
          if (c_we[p]) mem[c_addr[p][7:0]] = c_wdata[p];
        end else cnt[p]--;
      end else if (c_re[p] || c_we[p]) begin
        busy[p] = 1; cnt[p] = $urandom_range(0, 3);
      end
    end
  end

  // the simulated design: advance on DRIVE, check the read of the last cycle
  always @(posedge clk) if (!directed && rst_n && s < NS) begin
    if (!drive) stalls++;
    else begin
      if (s > 0)
        for (int p = 0; p < NP; p++)
          if (op_k[s-1][p] == 1) begin
            checks++;
            if (l_rdata[p] != op_x[s-1][p]) begin
              failures++;
              $display("FAIL cycle %0d port %0d: %h expected %h", s - 1, p, l_rdata[p], op_x[s-1][p]);
            end
          end
      s <= s + 1;
    end
  end

  initial begin
    logic [DW-1:0] refm [1 << 8];
    for (int p = 0; p < NP; p++) c_rdata[p] = '0;
    c_rdy = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- Fig. 4.7, checked just before each rising edge
    @(negedge clk);                          // clock 0
    check(drive, "clock 0 DRIVE high");
    @(negedge clk); dre = 2'b11;             // clock 1: two new reads
    #1 check(drive && c_re == 2'b11, "clock 1 pass-through, DRIVE high");
    @(negedge clk); dre = 2'b00; c_rdy = 2'b01; c_rdata[0] = 32'hA0;   // clock 2
    #1 check(!drive && c_re == 2'b11, "clock 2 DRIVE low, both held");
    @(negedge clk); c_rdy = 2'b10; c_rdata[1] = 32'hB1;                // clock 3
    #1 check(drive && c_re == 2'b10, "clock 3 DRIVE high, port 1 held");
    check(l_rdata[0] == 32'hA0 && l_rdata[1] == 32'hB1, "clock 3 read data");
    @(negedge clk); c_rdy = 2'b00;
    #1 check(drive && c_re == 2'b00, "clock 4 idle");
    // ---- random run
    for (int i = 0; i < 256; i++) begin mem[i] = $urandom; refm[i] = mem[i]; end
    for (int k = 0; k < NS; k++)
      for (int p = 0; p < NP; p++) begin
        op_k[k][p] = 2'($urandom_range(0, 2));
        op_a[k][p] = AW'({p[0], 7'($urandom_range(0, 15))});   // disjoint per port
        op_d[k][p] = $urandom;
        op_x[k][p] = refm[op_a[k][p][7:0]];
        if (op_k[k][p] == 2) refm[op_a[k][p][7:0]] = op_d[k][p];
      end
    for (int p = 0; p < NP; p++) begin busy[p] = 0; cnt[p] = 0; end
    rst_n = 0;
    @(negedge clk);
    directed = 0;
    rst_n = 1;
    wait (s == NS);
    $display("simulated cycles %0d, stall clocks %0d", s, stalls);
    check(stalls > NS, "stalls happened for multi-clock memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
