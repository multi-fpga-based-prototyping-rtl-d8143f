// On-chip router of an M-Core node: 5 ports, virtual channels, credit-based
// flow control, X-Y dimension-order routing, 4 pipeline stages.
//
// Ports are local (DMA controller), north (y-1), east (x+1), south (y+1) and
// west (x-1).  Each input port has NVC virtual-channel FIFOs of DEPTH flits.
// A flit goes through
//   NRC+VA  a head flit at the front of an idle input VC computes its output
//           port (X first, then Y) and is given a free VC of that output;
//   SA      each input picks one of its ready VCs (round robin), each output
//           picks one of the inputs that want it (round robin); a flit may
//           only go when the downstream VC has a credit;
//   ST      the winner is written into the output's switch register;
//   LT      the switch register moves to the output link register, which the
//           downstream router reads in the next cycle.
// The output VC is held by a packet from head to tail.  A credit per VC is
// returned upstream (registered) whenever a flit leaves an input FIFO.
// All state changes only when en is high: en is the simulated clock edge
// given by the virtual-cycle controller, so the router can be emulated over
// several FPGA cycles.  The node's own coordinates are inputs so that every
// unit can use the same circuit.
// Follows Table 3.1 of the design description: 5 ports, 4 stages, 2 VCs,
// FIFO depth 4, credit-based, X-Y DOR.  Allocation policies (first free VC,
// round-robin arbiters) are this design's choices.
module mcore_router
  import sc_pkg::*;
#(
  parameter int unsigned NVC   = 2,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [XW-1:0] my_x,
  input  logic [YW-1:0] my_y,
  input  link_t         in_link  [NPORT],
  output link_t         out_link [NPORT]
);
  localparam int unsigned NI  = NPORT * NVC;          // input VCs
  localparam int unsigned PW  = $clog2(DEPTH);
  localparam int unsigned CNW = $clog2(DEPTH + 1);

  // input VC buffers
  flit_t          fbuf  [NI][DEPTH];
  logic [PW-1:0]  rdp   [NI];
  logic [PW-1:0]  wrp   [NI];
  logic [CNW-1:0] cnt   [NI];
  // input VC state
  logic           act   [NI];
  logic [2:0]     route [NI];
  logic [VCW-1:0] ovc   [NI];
  // output VC state
  logic           obusy [NPORT][NVC];
  logic [CNW-1:0] cred  [NPORT][NVC];
  // arbitration pointers
  logic [$clog2(NVC+1)-1:0] in_rr  [NPORT];
  logic [2:0]               out_rr [NPORT];
  // switch registers
  logic  st_v [NPORT];
  flit_t st_f [NPORT];

  // ---------------------------------------------------------------- routing
  function automatic logic [2:0] xy_route(input head_t h, input logic [XW-1:0] x,
                                          input logic [YW-1:0] y);
    if (h.dst_x > x)      return 3'(P_EAST);
    else if (h.dst_x < x) return 3'(P_WEST);
    else if (h.dst_y > y) return 3'(P_SOUTH);
    else if (h.dst_y < y) return 3'(P_NORTH);
    else                  return 3'(P_LOCAL);
  endfunction

  // ---------------------------------------------------------------- NRC + VA
  logic           va_win  [NI];
  logic [2:0]     va_port [NI];
  logic [VCW-1:0] va_vc   [NI];

  always_comb begin
    logic claimed [NPORT][NVC];
    for (int o = 0; o < NPORT; o++)
      for (int u = 0; u < NVC; u++) claimed[o][u] = obusy[o][u];
    for (int i = 0; i < NI; i++) begin
      va_win[i]  = 1'b0;
      va_port[i] = xy_route(head_t'(fbuf[i][rdp[i]].data), my_x, my_y);
      va_vc[i]   = '0;
      if (!act[i] && cnt[i] != '0 && fbuf[i][rdp[i]].head) begin
        for (int u = 0; u < NVC; u++) begin
          if (!va_win[i] && !claimed[va_port[i]][u]) begin
            va_win[i]               = 1'b1;
            va_vc[i]                = VCW'(u);
            claimed[va_port[i]][u]  = 1'b1;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- SA
  logic                     in_req  [NPORT];
  logic [$clog2(NVC+1)-1:0] in_sel  [NPORT];
  logic                     gnt     [NI];
  logic [2:0]               out_sel [NPORT];
  logic                     out_gnt [NPORT];

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      in_req[p] = 1'b0;
      in_sel[p] = '0;
      for (int k = 0; k < NVC; k++) begin
        if (!in_req[p] && act[p*NVC + (int'(in_rr[p]) + k) % NVC]
            && cnt[p*NVC + (int'(in_rr[p]) + k) % NVC] != '0
            && cred[route[p*NVC + (int'(in_rr[p]) + k) % NVC]][ovc[p*NVC + (int'(in_rr[p]) + k) % NVC]] != '0) begin
          in_req[p] = 1'b1;
          in_sel[p] = ($clog2(NVC+1))'((int'(in_rr[p]) + k) % NVC);
        end
      end
    end
    for (int i = 0; i < NI; i++) gnt[i] = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      out_gnt[o] = 1'b0;
      out_sel[o] = '0;
      for (int k = 0; k < NPORT; k++) begin
        if (!out_gnt[o] && in_req[(int'(out_rr[o]) + k) % NPORT]
            && route[((int'(out_rr[o]) + k) % NPORT)*NVC + int'(in_sel[(int'(out_rr[o]) + k) % NPORT])] == 3'(o)) begin
          out_gnt[o] = 1'b1;
          out_sel[o] = 3'((int'(out_rr[o]) + k) % NPORT);
        end
      end
      if (out_gnt[o]) gnt[int'(out_sel[o])*NVC + int'(in_sel[out_sel[o]])] = 1'b1;
    end
  end

  // per-output winner (input VC index) and spent VC; per-input-VC push
  logic [$clog2(NI)-1:0] win   [NPORT];
  logic                  push  [NI];
  always_comb begin
    for (int o = 0; o < NPORT; o++)
      win[o] = ($clog2(NI))'(int'(out_sel[o]) * NVC + int'(in_sel[out_sel[o]]));
    for (int i = 0; i < NI; i++)
      push[i] = in_link[i / NVC].valid && int'(in_link[i / NVC].flit.vc) == (i % NVC);
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) begin
        rdp[i] <= '0; wrp[i] <= '0; cnt[i] <= '0;
        act[i] <= 1'b0; route[i] <= '0; ovc[i] <= '0;
      end
      for (int o = 0; o < NPORT; o++) begin
        for (int u = 0; u < NVC; u++) begin
          obusy[o][u] <= 1'b0;
          cred[o][u]  <= CNW'(DEPTH);
        end
        in_rr[o]    <= '0;
        out_rr[o]   <= '0;
        st_v[o]     <= 1'b0;
        st_f[o]     <= '0;
        out_link[o] <= '0;
      end
    end else if (en) begin
      // LT: switch register to link register; credits returned upstream
      for (int o = 0; o < NPORT; o++) begin
        out_link[o].valid  <= st_v[o];
        out_link[o].flit   <= st_f[o];
        out_link[o].credit <= '0;
      end
      for (int i = 0; i < NI; i++)
        if (gnt[i]) out_link[i / NVC].credit[i % NVC] <= 1'b1;

      // credits coming back from downstream, and those spent now
      for (int o = 0; o < NPORT; o++) begin
        for (int u = 0; u < NVC; u++)
          cred[o][u] <= cred[o][u] + CNW'(in_link[o].credit[u])
                        - CNW'(out_gnt[o] && ovc[win[o]] == VCW'(u));
      end

      // ST: winners into switch registers
      for (int o = 0; o < NPORT; o++) begin
        st_v[o] <= out_gnt[o];
        if (out_gnt[o]) begin
          st_f[o]    <= fbuf[win[o]][rdp[win[o]]];
          st_f[o].vc <= ovc[win[o]];
          if (fbuf[win[o]][rdp[win[o]]].tail) obusy[o][ovc[win[o]]] <= 1'b0;
          out_rr[o] <= 3'((int'(out_sel[o]) + 1) % NPORT);
        end
      end

      // input side: VA results, pops, pushes
      for (int p = 0; p < NPORT; p++) begin
        if (in_req[p] && gnt[p*NVC + int'(in_sel[p])])
          in_rr[p] <= ($clog2(NVC+1))'((int'(in_sel[p]) + 1) % NVC);
      end
      for (int i = 0; i < NI; i++) begin
        if (push[i]) begin
          fbuf[i][wrp[i]] <= in_link[i / NVC].flit;
          wrp[i]          <= wrp[i] + 1'b1;
        end
        if (gnt[i]) begin
          rdp[i] <= rdp[i] + 1'b1;
          if (fbuf[i][rdp[i]].tail) act[i] <= 1'b0;
        end
        cnt[i] <= cnt[i] + CNW'(push[i]) - CNW'(gnt[i]);
        if (va_win[i]) begin
          act[i]   <= 1'b1;
          route[i] <= va_port[i];
          ovc[i]   <= va_vc[i];
          obusy[va_port[i]][va_vc[i]] <= 1'b1;
        end
      end
    end
  end

  // A flit must never arrive at a full input VC: credit flow control
  // guarantees it.
  always_ff @(posedge clk) begin
    if (rst_n && en) begin
      for (int i = 0; i < NI; i++)
        assert (!(push[i] && cnt[i] == CNW'(DEPTH) && !gnt[i]))
          else $error("router: flit into full input VC %0d", i);
    end
  end

endmodule
