// End-to-end test of the ScalableCore system at its default size (4 x 4
// units).  Every node runs the same program from its own SRAM:
//   v = (x+1)*100 + y; store v..v+3; DMA PUT them to the east neighbour
//   (wrapping to x = 0); DMA GET two words from the south neighbour
//   (wrapping to y = 0); PUT v..v+3 to node (0,0), a hot spot; wait for at
//   6 received words (70 at node (0,0)); report the sum of the six; halt.
// The expected sum of every node is worked out here from the mesh
// coordinates.  Each unit gets its own clock pair with its own phase, as
// from separate oscillators.  The test also counts how often each
// mechanism of the design happened and fails if one never did: barrier
// waits for a neighbour, load-use stalls, cycles where the memory
// multiplexer served more than one port, flits on the second VC, flits held
// back for lack of a credit, and GET replies sent.
// The flipSyrup parts beside the mesh are exercised at the same time: a
// simulated design issues random reads and writes through the
// cycle-accuracy manager into the Syrup memory (checked against an ideal
// one-cycle memory), and the Syrup channel is looped back on itself.  Their
// mechanisms (DRIVE stalls, refills, write-backs, channel cycles) are
// counted too.
module tb_scalablecore_system;
  import sc_pkg::*;
  import mips_asm::*;
  localparam int NX = 4, NY = 4, N = NX * NY;
  logic clk [N], clk_ser [N];
  logic arst_n = 0, run = 1;
  logic [MEM_AW+1:0] sram_addr [N];
  logic [7:0] dq_o [N], dq_i [N], link_errors [N];
  logic dq_oe [N], ce_n [N], oe_n [N], we_n [N], halted [N];
  logic [31:0] vcycle [N], retired [N], result [N], wait_cycles [N];
  int checks = 0, failures = 0;
  longint n_ldstall = 0, n_multiport = 0, n_vc1 = 0, n_nocredit = 0, n_get = 0;

  // flipSyrup side
  localparam int FS_NS = 400;
  logic fs_clk = 0, fs_rst_n = 0, fs_drive, fs_m_req, fs_m_we, fs_m_ack = 0;
  logic [MEM_AW-1:0] fs_l_addr [2];
  logic [1:0] fs_l_we, fs_l_re;
  logic [31:0] fs_l_wdata [2], fs_l_rdata [2];
  logic [MEM_AW-3:0] fs_m_addr;
  logic [127:0] fs_m_wdata, fs_m_rdata = '0;
  logic fs_ch_ok, fs_tx_valid, fs_rx_ready;
  logic [31:0] fs_ch_rdata, fs_tx_data, fs_ch_wdata;
  longint n_fs_stall = 0, n_fs_fill = 0, n_fs_wb = 0, n_fs_ch = 0;
  int fs_s = 0, fs_c = 0;                              // simulated cycles: memory side, channel side
  always #5 fs_clk = ~fs_clk;

  scalablecore_system dut (
    .clk, .clk_ser, .arst_n, .run, .halt_cycle(32'd0), .sram_addr, .sram_dq_o(dq_o),
    .sram_dq_oe(dq_oe), .sram_dq_i(dq_i), .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n),
    .vcycle, .retired, .result, .halted, .link_errors, .wait_cycles,
    .fs_clk, .fs_rst_n, .fs_drive, .fs_l_addr, .fs_l_we, .fs_l_wdata, .fs_l_re, .fs_l_rdata,
    .fs_m_req, .fs_m_we, .fs_m_addr, .fs_m_wdata, .fs_m_ack, .fs_m_rdata,
    .fs_ch_drive(fs_ch_ok), .fs_ch_wdata, .fs_ch_rdata, .fs_ch_ok,
    .fs_tx_valid, .fs_tx_data, .fs_tx_ready(fs_rx_ready),      // channel looped back
    .fs_rx_valid(fs_tx_valid), .fs_rx_data(fs_tx_data), .fs_rx_ready
  );

  // a simulated design on the flipSyrup side: random reads and writes on two
  // ports, one per simulated cycle, checked against an ideal memory
  logic [1:0]  fs_k [FS_NS][2];
  logic [MEM_AW-1:0] fs_a [FS_NS][2];
  logic [31:0] fs_d [FS_NS][2], fs_x [FS_NS][2];
  logic [31:0] fs_ext [1 << MEM_AW];
  always_comb begin
    for (int q = 0; q < 2; q++) begin
      if (fs_s < FS_NS) begin
        fs_l_addr[q] = fs_a[fs_s][q]; fs_l_wdata[q] = fs_d[fs_s][q];
        fs_l_re[q] = (fs_k[fs_s][q] == 1); fs_l_we[q] = (fs_k[fs_s][q] == 2);
      end else begin
        fs_l_addr[q] = '0; fs_l_wdata[q] = '0; fs_l_re[q] = 0; fs_l_we[q] = 0;
      end
    end
  end
  assign fs_ch_wdata = 32'(fs_c * 5 + 11);
  always @(posedge fs_clk) if (fs_rst_n) begin
    if (fs_s < FS_NS) begin
      if (!fs_drive) n_fs_stall++;
      else begin
        if (fs_s > 0)
          for (int q = 0; q < 2; q++)
            if (fs_k[fs_s-1][q] == 1) begin
              checks++;
              if (fs_l_rdata[q] != fs_x[fs_s-1][q]) begin
                failures++;
                $display("FAIL flipSyrup cycle %0d port %0d: %h expected %h", fs_s - 1, q,
                         fs_l_rdata[q], fs_x[fs_s-1][q]);
              end
            end
        fs_s <= fs_s + 1;
      end
    end
    if (fs_ch_ok) begin
      if (fs_c > 0) begin
        checks++;
        if (fs_ch_rdata != 32'((fs_c - 1) * 5 + 11)) begin
          failures++; $display("FAIL channel cycle %0d: %0d", fs_c, fs_ch_rdata);
        end
      end
      n_fs_ch++;
      fs_c <= fs_c + 1;
    end
  end
  // external line memory with a latency of 3 clocks
  initial begin
    forever begin
      @(negedge fs_clk);
      fs_m_ack = 0;
      if (fs_m_req) begin
        repeat (3) @(negedge fs_clk);
        for (int w = 0; w < 4; w++)
          if (fs_m_we) fs_ext[{fs_m_addr, 2'(w)}] = fs_m_wdata[32*w +: 32];
          else fs_m_rdata[32*w +: 32] = fs_ext[{fs_m_addr, 2'(w)}];
        if (fs_m_we) n_fs_wb++; else n_fs_fill++;
        fs_m_ack = 1;
      end
    end
  end
  initial begin
    logic [31:0] refm [1 << 14];
    for (int i = 0; i < (1 << 14); i++) begin fs_ext[i] = 32'(i * 13); refm[i] = fs_ext[i]; end
    for (int k = 0; k < FS_NS; k++)
      for (int q = 0; q < 2; q++) begin
        fs_k[k][q] = 2'($urandom_range(0, 2));
        fs_a[k][q] = MEM_AW'(($urandom_range(0, 3) << 12) | ($urandom_range(0, 7) << 2) | (q << 1)
                             | $urandom_range(0, 1));
        fs_d[k][q] = $urandom;
        fs_x[k][q] = refm[fs_a[k][q]];
        if (fs_k[k][q] == 2) refm[fs_a[k][q]] = fs_d[k][q];
      end
    #100 fs_rst_n = 1;
  end

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int I = y * NX + x;
      initial begin
        clk[I] = 0; clk_ser[I] = 0;
        #(1 + (I * 7) % 11);
        forever begin
          #6 clk_ser[I] = 1; clk[I] = ~clk[I];
          #6 clk_ser[I] = 0;
        end
      end
      sram_model u_sram (.clk(clk[I]), .addr(sram_addr[I]), .dq_o(dq_o[I]), .dq_oe(dq_oe[I]),
                         .dq_i(dq_i[I]), .ce_n(ce_n[I]), .oe_n(oe_n[I]), .we_n(we_n[I]));
      // mechanism counters, sampled at the simulated clock edge of this unit
      always @(posedge clk[I]) begin
        if (arst_n && dut.g_y[y].g_x[x].u_unit.en) begin
          if (dut.g_y[y].g_x[x].u_unit.u_core.stall) n_ldstall++;
          if ($countones(dut.g_y[y].g_x[x].u_unit.u_mux.rd_hit) > 1) n_multiport++;
          for (int o = 0; o < NPORT; o++) begin
            if (dut.g_y[y].g_x[x].u_unit.u_router.st_v[o] &&
                dut.g_y[y].g_x[x].u_unit.u_router.st_f[o].vc == 1) n_vc1++;
          end
          for (int i = 0; i < NPORT * 2; i++) begin
            if (dut.g_y[y].g_x[x].u_unit.u_router.act[i] &&
                dut.g_y[y].g_x[x].u_unit.u_router.cnt[i] != 0 &&
                dut.g_y[y].g_x[x].u_unit.u_router.cred[dut.g_y[y].g_x[x].u_unit.u_router.route[i]]
                                                       [dut.g_y[y].g_x[x].u_unit.u_router.ovc[i]] == 0)
              n_nocredit++;
          end
          if (dut.g_y[y].g_x[x].u_unit.u_dmac.s_state == 1 && !dut.g_y[y].g_x[x].u_unit.u_dmac.s_local
              && dut.g_y[y].g_x[x].u_unit.u_dmac.send) n_get++;
        end
      end
    end
  end

  function automatic int expect_sum(input int x, input int y);
    int xw = (x + NX - 1) % NX, ys = (y + 1) % NY;
    int vw = (xw + 1) * 100 + y, vs = (x + 1) * 100 + ys;
    return 4 * vw + 6 + 2 * vs + 1;
  endfunction

  task automatic load_program();
    logic [31:0] p [$];
    p = {LUI(20, 8), LW(1, R_NODE_ID*4, 20), LW(10, 'h200, 0), LW(11, 'h204, 0),
         SRL(2, 1, 4), ANDI(3, 1, 15), ADDIU(4, 2, 1), ADDIU(5, 0, 100),
         MUL(6, 4, 5), ADDU(6, 6, 3), SW(6, 'h400, 0),
         ADDIU(7, 6, 1), SW(7, 'h404, 0), ADDIU(7, 6, 2), SW(7, 'h408, 0),
         ADDIU(7, 6, 3), SW(7, 'h40c, 0),
         // PUT v..v+3 to the east neighbour, word 0x140
         BNE(4, 10, 2), NOP(), ADDIU(4, 0, 0), SLL(8, 4, 4), OR_(8, 8, 3),
         SW(8, R_DMA_DST*4, 20), ADDIU(9, 0, 'h100), SW(9, R_DMA_LADDR*4, 20),
         ADDIU(9, 0, 'h140), SW(9, R_DMA_RADDR*4, 20), ADDIU(9, 0, 4), SW(9, R_DMA_LEN*4, 20),
         ADDIU(9, 0, 1), SW(9, R_DMA_CTRL*4, 20),
         LW(12, R_DMA_CTRL*4, 20), BNE(12, 0, -2), NOP(),
         // GET two words from the south neighbour's word 0x100 into word 0x180
         ADDIU(13, 3, 1), BNE(13, 11, 2), NOP(), ADDIU(13, 0, 0),
         SLL(8, 2, 4), OR_(8, 8, 13), SW(8, R_DMA_DST*4, 20),
         ADDIU(9, 0, 'h180), SW(9, R_DMA_LADDR*4, 20), ADDIU(9, 0, 'h100), SW(9, R_DMA_RADDR*4, 20),
         ADDIU(9, 0, 2), SW(9, R_DMA_LEN*4, 20), ADDIU(9, 0, 2), SW(9, R_DMA_CTRL*4, 20),
         LW(12, R_DMA_CTRL*4, 20), BNE(12, 0, -2), NOP(),
         // every node PUTs v..v+3 to node (0,0), word 0x300 + 4*id: a hot spot
         SW(0, R_DMA_DST*4, 20), ADDIU(9, 0, 'h100), SW(9, R_DMA_LADDR*4, 20),
         SLL(9, 1, 2), ADDIU(9, 9, 'h300), SW(9, R_DMA_RADDR*4, 20),
         ADDIU(9, 0, 4), SW(9, R_DMA_LEN*4, 20), ADDIU(9, 0, 1), SW(9, R_DMA_CTRL*4, 20),
         LW(12, R_DMA_CTRL*4, 20), BNE(12, 0, -2), NOP(),
         // wait until 6 words have arrived (70 at node (0,0), which also gets the hot spot)
         ADDIU(14, 0, 6), BNE(1, 0, 2), NOP(), ADDIU(14, 0, 70), LW(12, R_DMA_RCNT*4, 20), SLT(12, 12, 14), BNE(12, 0, -3), NOP(),
         LW(15, 'h500, 0), LW(16, 'h504, 0), ADDU(15, 15, 16), LW(16, 'h508, 0), ADDU(15, 15, 16),
         LW(16, 'h50c, 0), ADDU(15, 15, 16), LW(16, 'h600, 0), ADDU(15, 15, 16),
         LW(16, 'h604, 0), ADDU(15, 15, 16),
         SW(15, R_RESULT*4, 20), SW(0, R_HALT*4, 20), BEQ(0, 0, -1), NOP()};
    for (int i = 0; i < p.size(); i++) begin
      g_y[0].g_x[0].u_sram.poke(i, p[i]); g_y[0].g_x[1].u_sram.poke(i, p[i]);
      g_y[0].g_x[2].u_sram.poke(i, p[i]); g_y[0].g_x[3].u_sram.poke(i, p[i]);
      g_y[1].g_x[0].u_sram.poke(i, p[i]); g_y[1].g_x[1].u_sram.poke(i, p[i]);
      g_y[1].g_x[2].u_sram.poke(i, p[i]); g_y[1].g_x[3].u_sram.poke(i, p[i]);
      g_y[2].g_x[0].u_sram.poke(i, p[i]); g_y[2].g_x[1].u_sram.poke(i, p[i]);
      g_y[2].g_x[2].u_sram.poke(i, p[i]); g_y[2].g_x[3].u_sram.poke(i, p[i]);
      g_y[3].g_x[0].u_sram.poke(i, p[i]); g_y[3].g_x[1].u_sram.poke(i, p[i]);
      g_y[3].g_x[2].u_sram.poke(i, p[i]); g_y[3].g_x[3].u_sram.poke(i, p[i]);
    end
  endtask

  task automatic poke_all(input int a, input logic [31:0] v);
    g_y[0].g_x[0].u_sram.poke(a, v); g_y[0].g_x[1].u_sram.poke(a, v);
    g_y[0].g_x[2].u_sram.poke(a, v); g_y[0].g_x[3].u_sram.poke(a, v);
    g_y[1].g_x[0].u_sram.poke(a, v); g_y[1].g_x[1].u_sram.poke(a, v);
    g_y[1].g_x[2].u_sram.poke(a, v); g_y[1].g_x[3].u_sram.poke(a, v);
    g_y[2].g_x[0].u_sram.poke(a, v); g_y[2].g_x[1].u_sram.poke(a, v);
    g_y[2].g_x[2].u_sram.poke(a, v); g_y[2].g_x[3].u_sram.poke(a, v);
    g_y[3].g_x[0].u_sram.poke(a, v); g_y[3].g_x[1].u_sram.poke(a, v);
    g_y[3].g_x[2].u_sram.poke(a, v); g_y[3].g_x[3].u_sram.poke(a, v);
  endtask

  task automatic count(input string what, input longint n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    bit all;
    longint wsum;
    load_program();
    poke_all('h200 / 4, NX);
    poke_all('h204 / 4, NY);
    #100 arst_n = 1;
    do begin
      #1000;
      all = 1;
      for (int i = 0; i < N; i++) all &= halted[i];
    end while (!all);
    #5000;
    wsum = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (result[i] != 32'(expect_sum(i % NX, i / NX))) begin
        failures++;
        $display("FAIL node (%0d,%0d): result %0d expected %0d", i % NX, i / NX, result[i],
                 expect_sum(i % NX, i / NX));
      end
      checks++;
      if (link_errors[i] != 0) begin failures++; $display("FAIL link errors at %0d", i); end
      wsum += wait_cycles[i];
    end
    // simulated cycles of neighbours never differ by more than one
    for (int i = 0; i + 1 < N; i++) begin
      if ((i % NX) != NX - 1) begin
        checks++;
        if (vcycle[i] - vcycle[i+1] > 1 && vcycle[i+1] - vcycle[i] > 1 && !halted[i]) failures++;
      end
    end
    // the hot-spot PUTs at node (0,0)
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < 4; k++) begin
        logic [31:0] got;
        int x = i % NX, y = i / NX;
        got = g_y[0].g_x[0].u_sram.peek('h300 + 4 * ((x << 4) | y) + k);
        checks++;
        if (got != 32'((x + 1) * 100 + y + k)) begin
          failures++;
          $display("FAIL hot-spot word from (%0d,%0d)+%0d: %0d", x, y, k, got);
        end
      end
    end
    $display("simulated cycles at node 0: %0d, end time %0t", vcycle[0], $time);
    count("barrier wait clocks", wsum);
    count("load-use stalls", n_ldstall);
    count("multi-port memory cycles", n_multiport);
    count("flits on VC 1", n_vc1);
    count("flit-cycles without credit", n_nocredit);
    count("GET replies sent", n_get);
    wait (fs_s == FS_NS);
    checks++;
    if (fs_c < FS_NS) begin failures++; $display("FAIL channel made only %0d cycles", fs_c); end
    count("flipSyrup DRIVE stall clocks", n_fs_stall);
    count("flipSyrup cache refills", n_fs_fill);
    count("flipSyrup write-backs", n_fs_wb);
    count("flipSyrup channel cycles", n_fs_ch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress watchdog: the simulated cycle count must keep moving
  initial begin
    logic [31:0] last;
    last = 0;
    forever begin
      #50_000;
      if (vcycle[0] == last) begin
        failures++;
        $display("watchdog: no simulated cycle in 50 us at %0t", $time);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      last = vcycle[0];
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
