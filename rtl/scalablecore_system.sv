// ScalableCore system: a 2D mesh of ScalableCore Units that together
// emulate an NX x NY M-Core many-core processor cycle-accurately.
//
// Unit (x, y) emulates node (x, y).  Each unit is wired only to its four
// neighbours, one serial line in each direction per neighbour; there is no
// global signal other than the board reset and the run switch, and every
// unit has its own clock inputs (its own oscillator on the board).  Edge
// units are told which neighbours exist, so the barrier of each unit waits
// only for the neighbours it has.  Because every unit waits only for its
// neighbours, the simulated cycle rate does not depend on the mesh size:
// adding nodes adds units, not synchronization work.
// Every unit is the same circuit; its position comes in on my_x/my_y.
// Interface: per unit clk[i], clk_ser[i], SRAM pins and status, with
// i = y*NX + x; shared arst_n, run, halt_cycle.
// Follows the description's system structure (Fig. 3.1 shows 4 x 4 units);
// the host link for program loading is not part of this RTL: programs are
// placed in each unit's SRAM from outside.
//
// Beside the mesh stand the flipSyrup parts, which the description offers
// as the later, tool-generated way of building such a prototype: a
// cycle-accuracy manager with two memory ports in front of a Syrup memory
// (cache over an external line memory), and one Syrup channel.  They share
// no signal with the mesh; their ports (fs_*) are brought out so a
// simulated design and an external memory can be attached.  fs_drive is
// the throttle of the design attached to fs_l_*.
module scalablecore_system
  import sc_pkg::*;
#(
  parameter int unsigned NX    = 4,
  parameter int unsigned NY    = 4,
  parameter int unsigned NVC   = 2,
  parameter int unsigned DEPTH = 4
) (
  input  logic              clk        [NX*NY],
  input  logic              clk_ser    [NX*NY],
  input  logic              arst_n,
  input  logic              run,
  input  logic [31:0]       halt_cycle,
  output logic [MEM_AW+1:0] sram_addr  [NX*NY],
  output logic [7:0]        sram_dq_o  [NX*NY],
  output logic              sram_dq_oe [NX*NY],
  input  logic [7:0]        sram_dq_i  [NX*NY],
  output logic              sram_ce_n  [NX*NY],
  output logic              sram_oe_n  [NX*NY],
  output logic              sram_we_n  [NX*NY],
  output logic [31:0]       vcycle     [NX*NY],
  output logic [31:0]       retired    [NX*NY],
  output logic [31:0]       result     [NX*NY],
  output logic              halted     [NX*NY],
  output logic [7:0]        link_errors[NX*NY],
  output logic [31:0]       wait_cycles[NX*NY],
  // flipSyrup: simulated-design side of the cycle-accuracy manager
  input  logic              fs_clk,
  input  logic              fs_rst_n,
  output logic              fs_drive,
  input  logic [MEM_AW-1:0] fs_l_addr  [2],
  input  logic [1:0]        fs_l_we,
  input  logic [31:0]       fs_l_wdata [2],
  input  logic [1:0]        fs_l_re,
  output logic [31:0]       fs_l_rdata [2],
  // flipSyrup: Syrup memory towards the external memory, one line per transfer
  output logic              fs_m_req,
  output logic              fs_m_we,
  output logic [MEM_AW-3:0] fs_m_addr,
  output logic [127:0]      fs_m_wdata,
  input  logic              fs_m_ack,
  input  logic [127:0]      fs_m_rdata,
  // flipSyrup: Syrup channel
  input  logic              fs_ch_drive,
  input  logic [31:0]       fs_ch_wdata,
  output logic [31:0]       fs_ch_rdata,
  output logic              fs_ch_ok,
  output logic              fs_tx_valid,
  output logic [31:0]       fs_tx_data,
  input  logic              fs_tx_ready,
  input  logic              fs_rx_valid,
  input  logic [31:0]       fs_rx_data,
  output logic              fs_rx_ready
);
  // ser[i][d]: line leaving unit i towards direction d
  logic [NDIR-1:0] ser [NX*NY];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned I = y * NX + x;
      logic [NDIR-1:0] present, sin;

      assign present[D_NORTH] = (y > 0);
      assign present[D_EAST]  = (x < NX - 1);
      assign present[D_SOUTH] = (y < NY - 1);
      assign present[D_WEST]  = (x > 0);
      // the line from the neighbour in direction d is its line towards us
      assign sin[D_NORTH] = (y > 0)      ? ser[I - NX][D_SOUTH] : 1'b0;
      assign sin[D_EAST]  = (x < NX - 1) ? ser[I + 1][D_WEST]   : 1'b0;
      assign sin[D_SOUTH] = (y < NY - 1) ? ser[I + NX][D_NORTH] : 1'b0;
      assign sin[D_WEST]  = (x > 0)      ? ser[I - 1][D_EAST]   : 1'b0;

      sc_unit #(.NVC(NVC), .DEPTH(DEPTH)) u_unit (
        .clk(clk[I]), .clk_ser(clk_ser[I]), .arst_n, .run, .halt_cycle,
        .my_x(XW'(x)), .my_y(YW'(y)), .nbr_present(present),
        .ser_in(sin), .ser_out(ser[I]),
        .sram_addr(sram_addr[I]), .sram_dq_o(sram_dq_o[I]), .sram_dq_oe(sram_dq_oe[I]),
        .sram_dq_i(sram_dq_i[I]), .sram_ce_n(sram_ce_n[I]), .sram_oe_n(sram_oe_n[I]),
        .sram_we_n(sram_we_n[I]),
        .vcycle(vcycle[I]), .retired(retired[I]), .result(result[I]), .halted(halted[I]),
        .link_errors(link_errors[I]), .wait_cycles(wait_cycles[I])
      );
    end
  end

  // ------------------------------------------------------------ flipSyrup
  logic [MEM_AW-1:0] fs_c_addr  [2];
  logic [31:0]       fs_c_wdata [2], fs_c_rdata [2];
  logic [1:0]        fs_c_we, fs_c_re, fs_c_rdy;
  logic [3:0]        fs_be [2];
  assign fs_be[0] = 4'hF;
  assign fs_be[1] = 4'hF;

  cycle_accuracy_manager #(.NP(2), .AW(MEM_AW), .DW(32)) u_cam (
    .clk(fs_clk), .rst_n(fs_rst_n), .drive(fs_drive),
    .l_addr(fs_l_addr), .l_we(fs_l_we), .l_wdata(fs_l_wdata), .l_re(fs_l_re), .l_rdata(fs_l_rdata),
    .c_addr(fs_c_addr), .c_we(fs_c_we), .c_wdata(fs_c_wdata), .c_re(fs_c_re), .c_rdy(fs_c_rdy),
    .c_rdata(fs_c_rdata)
  );

  syrup_memory #(.NP(2), .AW(MEM_AW), .LINE_B(16)) u_smem (
    .clk(fs_clk), .rst_n(fs_rst_n), .req_re(fs_c_re), .req_we(fs_c_we), .req_addr(fs_c_addr),
    .req_be(fs_be), .req_wdata(fs_c_wdata), .rdy(fs_c_rdy), .rdata(fs_c_rdata),
    .m_req(fs_m_req), .m_we(fs_m_we), .m_addr(fs_m_addr), .m_wdata(fs_m_wdata),
    .m_ack(fs_m_ack), .m_rdata(fs_m_rdata)
  );

  syrup_channel #(.W(32)) u_chan (
    .clk(fs_clk), .rst_n(fs_rst_n), .drive(fs_ch_drive), .u_wdata(fs_ch_wdata),
    .u_rdata(fs_ch_rdata), .ok(fs_ch_ok), .tx_valid(fs_tx_valid), .tx_data(fs_tx_data),
    .tx_ready(fs_tx_ready), .rx_valid(fs_rx_valid), .rx_data(fs_rx_data), .rx_ready(fs_rx_ready)
  );
endmodule
