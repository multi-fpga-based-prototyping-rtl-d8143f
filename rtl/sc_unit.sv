// ScalableCore Unit: one FPGA board that emulates one node of the M-Core
// many-core processor, cycle by cycle, in step with its four neighbours.
//
// Target side (the emulated node): core, router and DMA controller, all
// written as ordinary synchronous RTL whose registers update only on en.
// The node's 512 KB, 4-port, 1-cycle memory is not built as such: its
// contents sit in the board's 8-bit SRAM and the memory multiplexer plays
// the four ports one after another through the SRAM controller.
// System side: the virtual-cycle controller runs each simulated cycle as
//   start  -> memory emulation begins; the router's four neighbour-facing
//             outputs are pushed into the transmit FIFOs and serialized;
//   wait   -> until memory is done and a frame of the same simulated cycle
//             has arrived from every present neighbour (local barrier);
//   latch  -> received frames go into the incoming interface registers;
//   en     -> every target register updates once (one simulated cycle).
// Links: per direction one serial line each way, NRZI with parity, at the
// SerDes clock (one bit per clk_ser), with asynchronous FIFOs between
// clk_ser and clk.  A frame carries the whole link_t bundle (flit, valid,
// credits).  Absent neighbours (mesh edge) are masked by nbr_present.
// Memory-mapped registers sit above the node memory (see sc_pkg); RESULT
// and HALT are handled here, the rest by the DMA controller.
// Interface: clk (system, 40 MHz on the board), clk_ser (SerDes, 80 MHz),
// arst_n, run, halt_cycle, my_x/my_y (node position; one circuit serves
// every unit), nbr_present, ser_in/ser_out, SRAM pins, status outputs.
// Timing: a simulated cycle takes the longer of the memory emulation (8
// clocks per active port plus overhead) and the link round (frame of
// LINK_W+2 SerDes bits plus FIFO synchronization and the neighbours' own
// phase); about 40 clocks alone and about 60 in a 4 x 4 mesh, against the
// roughly 35 the description reports for its boards.
// Follows the description's unit architecture and system functions; the
// frame contents, the MMIO map and the program loading through the SRAM
// are this design's choices.
module sc_unit
  import sc_pkg::*;
#(
  parameter int unsigned NVC   = 2,
  parameter int unsigned DEPTH = 4
) (
  input  logic            clk,
  input  logic            clk_ser,
  input  logic            arst_n,
  input  logic            run,
  input  logic [31:0]     halt_cycle,
  input  logic [XW-1:0]   my_x,
  input  logic [YW-1:0]   my_y,
  input  logic [NDIR-1:0] nbr_present,
  input  logic [NDIR-1:0] ser_in,
  output logic [NDIR-1:0] ser_out,
  // SRAM chip
  output logic [MEM_AW+1:0] sram_addr,
  output logic [7:0]      sram_dq_o,
  output logic            sram_dq_oe,
  input  logic [7:0]      sram_dq_i,
  output logic            sram_ce_n,
  output logic            sram_oe_n,
  output logic            sram_we_n,
  // status
  output logic [31:0]     vcycle,
  output logic [31:0]     retired,
  output logic [31:0]     result,
  output logic            halted,
  output logic [7:0]      link_errors,
  output logic [31:0]     wait_cycles    // FPGA clocks spent at the barrier
);
  logic rst_n, rst_ser_n;
  sc_reset_sync u_rs_sys (.clk(clk),     .arst_n(arst_n), .rst_n(rst_n));
  sc_reset_sync u_rs_ser (.clk(clk_ser), .arst_n(arst_n), .rst_n(rst_ser_n));

  // ------------------------------------------------------------ controller
  logic            start, latch, en, mem_done, waiting;
  logic [NDIR-1:0] rx_empty, tx_full;

  sc_vcycle_ctrl u_ctrl (
    .clk, .rst_n, .run, .halt_cycle, .nbr_present,
    .rx_avail(~rx_empty), .tx_idle(~|tx_full), .mem_done,
    .start, .latch, .en, .vcycle, .waiting
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       wait_cycles <= '0;
    else if (waiting) wait_cycles <= wait_cycles + 1'b1;
  end

  // ------------------------------------------------------------ target
  logic [31:0] if_addr, if_rdata, ls_addr, ls_wdata, ls_rdata;
  logic        ls_re, ls_we, core_en, ls_mmio, ls_mmio_q;
  logic [3:0]  mmio_off, mmio_off_q;
  mreq_t       mreq [NMPORT];
  logic [31:0] mrdata [NMPORT];
  mreq_t       dma_rd, dma_wr;
  logic [31:0] dma_regq;
  link_t       rin  [NPORT];
  link_t       rout [NPORT];
  logic        dma_busy;

  assign core_en  = en && !halted;
  assign ls_mmio  = (ls_addr >= MMIO_BASE);
  assign mmio_off = ls_addr[5:2];

  mcore_core u_core (
    .clk, .rst_n, .en(core_en),
    .if_addr, .if_rdata, .ls_re, .ls_we, .ls_addr, .ls_wdata, .ls_rdata, .retired
  );

  mcore_dmac #(.NVC(NVC), .DEPTH(DEPTH)) u_dmac (
    .clk, .rst_n, .en, .my_x, .my_y,
    .reg_re(ls_re && ls_mmio && mmio_off < 4'(R_RESULT)),
    .reg_we(ls_we && ls_mmio && mmio_off < 4'(R_RESULT) && !halted),
    .reg_addr(mmio_off), .reg_wdata(ls_wdata), .reg_rdata(dma_regq),
    .rd_req(dma_rd), .rd_rdata(mrdata[MP_DMARD]), .wr_req(dma_wr),
    .net_out(rin[P_LOCAL]), .net_in(rout[P_LOCAL]), .busy(dma_busy)
  );

  mcore_router #(.NVC(NVC), .DEPTH(DEPTH)) u_router (
    .clk, .rst_n, .en, .my_x, .my_y, .in_link(rin), .out_link(rout)
  );

  // unit-level registers: RESULT, HALT; load data select
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result     <= '0;
      halted     <= 1'b0;
      ls_mmio_q  <= 1'b0;
      mmio_off_q <= '0;
    end else if (en) begin
      ls_mmio_q  <= ls_mmio;
      mmio_off_q <= mmio_off;
      if (!halted && ls_we && ls_mmio && mmio_off == 4'(R_RESULT)) result <= ls_wdata;
      if (!halted && ls_we && ls_mmio && mmio_off == 4'(R_HALT))   halted <= 1'b1;
    end
  end

  assign if_rdata = mrdata[MP_FETCH];
  assign ls_rdata = !ls_mmio_q ? mrdata[MP_LS] :
                    (mmio_off_q == 4'(R_RESULT)) ? result : dma_regq;

  // ------------------------------------------------------------ memory
  always_comb begin
    mreq[MP_FETCH]       = '0;
    mreq[MP_FETCH].re    = !halted;
    mreq[MP_FETCH].addr  = if_addr[MEM_AW+1:2];
    mreq[MP_LS]          = '0;
    mreq[MP_LS].re       = ls_re && !ls_mmio && !halted;
    mreq[MP_LS].we       = ls_we && !ls_mmio && !halted;
    mreq[MP_LS].addr     = ls_addr[MEM_AW+1:2];
    mreq[MP_LS].wdata    = ls_wdata;
    mreq[MP_DMARD]       = dma_rd;
    mreq[MP_DMAWR]       = dma_wr;
  end

  logic              m_req, m_we, m_busy, m_done;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;

  sc_mem_mux u_mux (
    .clk, .rst_n, .start, .done(mem_done), .en, .req(mreq), .rdata(mrdata),
    .mreq(m_req), .mwe(m_we), .maddr(m_addr), .mwdata(m_wdata),
    .mbusy(m_busy), .mdone(m_done), .mrdata(m_rdata)
  );

  sc_sram_ctrl u_sram (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .busy(m_busy), .done(m_done), .rdata(m_rdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  // ------------------------------------------------------------ links
  logic [7:0] errs [NDIR];

  for (genvar d = 0; d < NDIR; d++) begin : g_link
    logic [LINK_W-1:0] tx_q, rx_w, rx_q, rx_ir;
    logic              tx_empty, tx_pop, rx_v;

    // transmit: the router output of this simulated cycle, once per cycle
    sc_async_fifo #(.W(LINK_W), .DEPTH(4)) u_txf (
      .wclk(clk), .wrst_n(rst_n), .wr_en(start && nbr_present[d]), .wr_data(rout[d+1]),
      .full(tx_full[d]),
      .rclk(clk_ser), .rrst_n(rst_ser_n), .rd_en(tx_pop), .rd_data(tx_q), .empty(tx_empty)
    );
    sc_serdes_tx #(.W(LINK_W)) u_tx (
      .clk(clk_ser), .rst_n(rst_ser_n), .in_valid(!tx_empty), .in_data(tx_q),
      .in_pop(tx_pop), .busy(), .line_o(ser_out[d])
    );

    // receive
    sc_serdes_rx #(.W(LINK_W)) u_rx (
      .clk(clk_ser), .rst_n(rst_ser_n), .line_i(ser_in[d]),
      .out_valid(rx_v), .out_data(rx_w), .err_count(errs[d])
    );
    sc_async_fifo #(.W(LINK_W), .DEPTH(4)) u_rxf (
      .wclk(clk_ser), .wrst_n(rst_ser_n), .wr_en(rx_v), .wr_data(rx_w), .full(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(latch && nbr_present[d]), .rd_data(rx_q),
      .empty(rx_empty[d])
    );
    // incoming interface register: neighbour's outputs of the last cycle
    sc_ifreg #(.W(LINK_W)) u_ir (
      .clk, .rst_n, .load(latch), .d(nbr_present[d] ? rx_q : '0), .q(rx_ir)
    );
    assign rin[d+1] = link_t'(rx_ir);
  end

  always_comb begin
    link_errors = '0;
    for (int d = 0; d < NDIR; d++) link_errors = link_errors | errs[d];
  end

endmodule
