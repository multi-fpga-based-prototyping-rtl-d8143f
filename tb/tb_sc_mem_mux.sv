// Self-checking test of the memory multiplexer with the SRAM controller and
// a behavioural SRAM: four-port, 1-cycle node memory emulated on one port.
// Each round puts random requests on the four ports, pulses start, waits
// for done and pulses en.  Checked against a reference memory updated in
// port order: read data of every reading port after en, unchanged rdata of
// ports that did not read, and the time from start to done
// (10 clocks per active port, 1 per idle port, plus 3).
module tb_sc_mem_mux;
  import sc_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0, start = 0, done, en = 0;
  mreq_t req [NMPORT];
  logic [31:0] rdata [NMPORT];
  logic mreq, mwe, mbusy, mdone;
  logic [MEM_AW-1:0] maddr;
  logic [31:0] mwdata, mrdata;
  logic [MEM_AW+1:0] sram_addr;
  logic [7:0] dq_o, dq_i;
  logic dq_oe, ce_n, oe_n, we_n;
  logic [31:0] ref_mem [2**AW];
  logic [31:0] exp_rd [NMPORT];
  int checks = 0, failures = 0;

  sc_mem_mux dut (.clk, .rst_n, .start, .done, .en, .req, .rdata, .mreq, .mwe, .maddr,
                  .mwdata, .mbusy, .mdone, .mrdata);
  sc_sram_ctrl u_ctrl (.clk, .rst_n, .req(mreq), .we(mwe), .addr(maddr), .wdata(mwdata),
                       .busy(mbusy), .done(mdone), .rdata(mrdata), .sram_addr, .sram_dq_o(dq_o),
                       .sram_dq_oe(dq_oe), .sram_dq_i(dq_i), .sram_ce_n(ce_n), .sram_oe_n(oe_n),
                       .sram_we_n(we_n));
  sram_model #(.AW(AW + 2)) u_sram (.clk, .addr(sram_addr[AW+1:0]), .dq_o, .dq_oe, .dq_i,
                                    .ce_n, .oe_n, .we_n);
  always #5 clk = ~clk;

  initial begin
    int cyc, active, expc;
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = 0;
    for (int p = 0; p < NMPORT; p++) begin req[p] = '0; exp_rd[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      @(negedge clk);
      active = 0;
      for (int p = 0; p < NMPORT; p++) begin
        automatic int k = $urandom_range(0, 2);   // 0 idle, 1 read, 2 write
        req[p] = '0;
        req[p].addr = MEM_AW'($urandom_range(0, 15));
        req[p].re = (k == 1);
        req[p].we = (k == 2);
        req[p].wdata = $urandom;
        if (k != 0) active++;
      end
      // reference: ports in order, a read sees writes of earlier ports
      for (int p = 0; p < NMPORT; p++) begin
        if (req[p].re) exp_rd[p] = ref_mem[req[p].addr];
        if (req[p].we) ref_mem[req[p].addr] = req[p].wdata;
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      expc = 10 * active + (NMPORT - active) + 3;
      checks++;
      if (cyc != expc) begin failures++; $display("FAIL round %0d took %0d, expected %0d", r, cyc, expc); end
      en = 1;
      @(negedge clk);
      en = 0;
      for (int p = 0; p < NMPORT; p++) begin
        checks++;
        if (rdata[p] != exp_rd[p]) begin
          failures++; $display("FAIL round %0d port %0d: %h vs %h", r, p, rdata[p], exp_rd[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
