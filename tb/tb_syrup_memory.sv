// Test of the Syrup memory: two ports issue random reads and byte-masked
// writes to a small set of conflicting addresses, so lines hit, miss, are
// written back and refilled.  A reference array says what every read must
// return.  The external memory answers after a random 2..7 clocks.  Also
// checks that a hit answers exactly one clock after the request is
// presented, and that both write-backs and refills happened.
module tb_syrup_memory;
  localparam int NP = 2, AW = 17, LINE_B = 16, NLINE = 1024, WPL = LINE_B / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] req_re = '0, req_we = '0, rdy;
  logic [AW-1:0] req_addr [NP];
  logic [3:0]    req_be [NP];
  logic [31:0]   req_wdata [NP], rdata [NP];
  logic m_req, m_we, m_ack = 0;
  logic [AW-3:0] m_addr;
  logic [LINE_B*8-1:0] m_wdata, m_rdata = '0;
  int checks = 0, failures = 0;
  logic [31:0] ext [1 << AW], ref_m [1 << AW];
  int n_wb = 0, n_fill = 0;

  syrup_memory dut (.*);

  initial for (int i = 0; i < (1 << AW); i++) begin ext[i] = 32'(i * 7 + 3); ref_m[i] = ext[i]; end

  // external memory with random latency
  initial begin
    forever begin
      @(negedge clk);
      m_ack = 0;
      if (m_req) begin
        repeat ($urandom_range(1, 6)) @(negedge clk);
        if (m_we) begin
          n_wb++;
          for (int w = 0; w < WPL; w++) ext[{m_addr, 2'(w)}] = m_wdata[32*w +: 32];
        end else begin
          n_fill++;
          for (int w = 0; w < WPL; w++) m_rdata[32*w +: 32] = ext[{m_addr, 2'(w)}];
        end
        m_ack = 1;
      end
    end
  end

  function automatic logic [AW-1:0] rnd_addr();
    // 4 tags x 8 indices x 4 words
    return {AW'($urandom_range(0, 3)) << 12} | AW'($urandom_range(0, 7) << 2) | AW'($urandom_range(0, 3));
  endfunction

  task automatic port_run(input int p, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      req_addr[p] = rnd_addr();
      req_be[p] = 4'($urandom_range(1, 15));
      req_wdata[p] = $urandom;
      if ($urandom_range(0, 1)) req_we[p] = 1; else req_re[p] = 1;
      do @(negedge clk); while (!rdy[p]);
      checks++;
      if (req_we[p]) begin
        for (int b = 0; b < 4; b++)
          if (req_be[p][b]) ref_m[req_addr[p]][8*b +: 8] = req_wdata[p][8*b +: 8];
      end else if (rdata[p] != ref_m[req_addr[p]]) begin
        failures++;
        $display("FAIL port %0d read %h: %h expected %h", p, req_addr[p], rdata[p], ref_m[req_addr[p]]);
      end
      req_re[p] = 0; req_we[p] = 0;
    end
  endtask

  initial begin
    int t0;
    for (int p = 0; p < NP; p++) begin req_addr[p] = '0; req_be[p] = '0; req_wdata[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // clean miss then hit, timed, on port 0 alone
    @(negedge clk);
    req_addr[0] = 17'h00040; req_re[0] = 1; t0 = 0;
    do begin @(negedge clk); t0++; end while (!rdy[0]);
    $display("clean miss took %0d clocks", t0);
    checks++;
    if (rdata[0] != ref_m[17'h00040]) failures++;
    req_re[0] = 0;
    @(negedge clk);
    req_addr[0] = 17'h00041; req_re[0] = 1;
    @(negedge clk);
    checks++;
    if (!rdy[0] || rdata[0] != ref_m[17'h00041]) begin
      failures++; $display("FAIL hit not answered after one clock");
    end
    req_re[0] = 0;
    fork
      port_run(0, 400);
      port_run(1, 400);
    join
    // read back every touched word through port 1
    for (int tg = 0; tg < 4; tg++)
      for (int w = 0; w < 32; w++) begin
        @(negedge clk);
        req_addr[1] = AW'(tg << 12) | AW'(w); req_re[1] = 1;
        do @(negedge clk); while (!rdy[1]);
        checks++;
        if (rdata[1] != ref_m[req_addr[1]]) begin failures++; $display("FAIL final %h", req_addr[1]); end
        req_re[1] = 0;
      end
    $display("write-backs %0d, refills %0d", n_wb, n_fill);
    checks++;
    if (n_wb == 0 || n_fill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
