// DMA controller of an M-Core node: moves blocks of words between node
// memories over the on-chip network.
//
// Node-to-node data sharing in M-Core is done only by DMA.  The core sets
// the memory-mapped registers (destination node, local and remote word
// address, length) and writes the control register:
//   PUT  reads LEN words of local memory through the DMA-read port and sends
//        them as one packet: head flit, remote-address flit, data flits;
//   GET  sends a two-flit request (remote address, then local address); the
//        remote DMA controller answers with a PUT of its own memory.
// Arriving PUT packets are written word by word through the DMA-write port,
// one word per cycle, so the controller always accepts flits and returns
// each credit in the next cycle.  Reassembly state is kept per virtual
// channel, because the router may interleave packets of different VCs on
// its local output.  A GET arriving from another node is queued (one per
// VC) and served by the send engine before the local command.
// Sending reads one word and sends it in the next cycle, so a PUT moves one
// word every two cycles.  Sending uses VC 0 with credit-based flow control.
// Registers (word offsets; see sc_pkg): DST, LADDR, RADDR, LEN, CTRL (write
// 1 = PUT, 2 = GET; read = busy), RCNT (words received; write clears),
// NODE_ID.  Reads return data one cycle after the request, like memory.
// Every register updates only when en is high (simulated clock edge).
// The description gives the two memory ports (DMA read, DMA write) and DMA
// to another node's memory; the register map, the packet format and the
// GET command are this design's choices.
module mcore_dmac
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
  // memory-mapped registers
  input  logic          reg_re,
  input  logic          reg_we,
  input  logic [3:0]    reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic [31:0]   reg_rdata,
  // memory ports
  output mreq_t         rd_req,
  input  logic [31:0]   rd_rdata,
  output mreq_t         wr_req,
  // network (router local port)
  output link_t         net_out,
  input  link_t         net_in,
  output logic          busy
);
  localparam int unsigned CNW = $clog2(DEPTH + 1);

  // ------------------------------------------------------------ registers
  logic [XW-1:0]     r_dx;
  logic [YW-1:0]     r_dy;
  logic [MEM_AW-1:0] r_laddr, r_raddr;
  logic [13:0]       r_len;
  logic [31:0]       r_rcnt;
  logic              cmd_pend;
  cmd_e              cmd_kind;

  // GET requests to serve, one per VC
  logic              gp_v    [NVC];
  head_t             gp_hdr  [NVC];
  logic [MEM_AW-1:0] gp_src  [NVC];
  logic [MEM_AW-1:0] gp_ret  [NVC];

  // ------------------------------------------------------------ send engine
  typedef enum logic [2:0] {S_IDLE, S_HEAD, S_ADDR, S_RET, S_RD, S_DATA} sstate_e;
  sstate_e           s_state;
  head_t             s_hdr;
  logic [MEM_AW-1:0] s_laddr, s_raddr;
  logic [13:0]       s_left;
  logic              s_local;      // serving the local command (not a GET)
  logic [CNW-1:0]    cred;
  logic              send;
  flit_t             s_flit;

  assign busy = cmd_pend || (s_state != S_IDLE && s_local);

  always_comb begin
    send   = 1'b0;
    s_flit = '0;
    unique case (s_state)
      S_HEAD: begin send = (cred != '0); s_flit.head = 1'b1; s_flit.data = s_hdr; end
      S_ADDR: begin
        send = (cred != '0);
        s_flit.data = 32'(s_raddr);
        s_flit.tail = (s_hdr.cmd == CMD_PUT) && (s_hdr.len == '0);
      end
      S_RET:  begin send = (cred != '0); s_flit.data = 32'(s_laddr); s_flit.tail = 1'b1; end
      S_DATA: begin
        send = (cred != '0);
        s_flit.data = rd_rdata;
        s_flit.tail = (s_left == 14'd1);
      end
      default: ;
    endcase
  end

  always_comb begin
    rd_req       = '0;
    rd_req.re    = (s_state == S_RD);
    rd_req.addr  = s_laddr;
  end

  // lowest VC with a queued GET
  logic                   gp_any;
  logic [$clog2(NVC)-1:0] gp_sel;
  always_comb begin
    gp_any = 1'b0;
    gp_sel = '0;
    for (int v = NVC - 1; v >= 0; v--)
      if (gp_v[v]) begin gp_any = 1'b1; gp_sel = ($clog2(NVC))'(v); end
  end

  // ------------------------------------------------------------ receive side
  typedef enum logic [1:0] {R_HEAD, R_ADDR, R_RET, R_DATA} rstate_e;
  rstate_e           r_state [NVC];
  head_t             r_hdr   [NVC];
  logic [MEM_AW-1:0] r_waddr [NVC];
  logic [VCW-1:0]    ivc;

  assign ivc = net_in.flit.vc;

  always_comb begin
    wr_req       = '0;
    wr_req.we    = net_in.valid && r_state[ivc] == R_DATA;
    wr_req.addr  = r_waddr[ivc];
    wr_req.wdata = net_in.flit.data;
  end

  // ------------------------------------------------------------ update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_dx <= '0; r_dy <= '0; r_laddr <= '0; r_raddr <= '0; r_len <= '0;
      r_rcnt <= '0; cmd_pend <= 1'b0; cmd_kind <= CMD_PUT;
      reg_rdata <= '0;
      s_state <= S_IDLE; s_hdr <= '0; s_laddr <= '0; s_raddr <= '0;
      s_left <= '0; s_local <= 1'b0; cred <= CNW'(DEPTH);
      net_out <= '0;
      for (int v = 0; v < NVC; v++) begin
        gp_v[v] <= 1'b0; gp_hdr[v] <= '0; gp_src[v] <= '0; gp_ret[v] <= '0;
        r_state[v] <= R_HEAD; r_hdr[v] <= '0; r_waddr[v] <= '0;
      end
    end else if (en) begin
      // register reads
      if (reg_re) begin
        unique case (reg_addr)
          4'(R_DMA_DST):   reg_rdata <= 32'({r_dx, r_dy});
          4'(R_DMA_LADDR): reg_rdata <= 32'(r_laddr);
          4'(R_DMA_RADDR): reg_rdata <= 32'(r_raddr);
          4'(R_DMA_LEN):   reg_rdata <= 32'(r_len);
          4'(R_DMA_CTRL):  reg_rdata <= 32'(busy);
          4'(R_DMA_RCNT):  reg_rdata <= r_rcnt;
          4'(R_NODE_ID):   reg_rdata <= 32'({my_x, my_y});
          default:         reg_rdata <= '0;
        endcase
      end
      // register writes
      if (reg_we) begin
        unique case (reg_addr)
          4'(R_DMA_DST):   {r_dx, r_dy} <= reg_wdata[XW+YW-1:0];
          4'(R_DMA_LADDR): r_laddr <= reg_wdata[MEM_AW-1:0];
          4'(R_DMA_RADDR): r_raddr <= reg_wdata[MEM_AW-1:0];
          4'(R_DMA_LEN):   r_len   <= reg_wdata[13:0];
          4'(R_DMA_CTRL):  if (reg_wdata[1:0] != 2'd0) begin
                             cmd_pend <= 1'b1;
                             cmd_kind <= reg_wdata[1] ? CMD_GET : CMD_PUT;
                           end
          default: ;
        endcase
      end

      // credits for the router's local input, VC 0
      cred <= cred + CNW'(net_in.credit[0]) - CNW'(send);

      // outgoing link register
      net_out.valid <= send;
      net_out.flit  <= s_flit;

      // send engine
      unique case (s_state)
        S_IDLE: begin
          if (gp_any) begin
            gp_v[gp_sel]   <= 1'b0;
            s_hdr.dst_x    <= gp_hdr[gp_sel].src_x;
            s_hdr.dst_y    <= gp_hdr[gp_sel].src_y;
            s_hdr.src_x    <= my_x;
            s_hdr.src_y    <= my_y;
            s_hdr.cmd      <= CMD_PUT;
            s_hdr.len      <= gp_hdr[gp_sel].len;
            s_laddr        <= gp_src[gp_sel];
            s_raddr        <= gp_ret[gp_sel];
            s_left         <= gp_hdr[gp_sel].len;
            s_local        <= 1'b0;
            s_state        <= S_HEAD;
          end else if (cmd_pend) begin
            cmd_pend     <= 1'b0;
            s_hdr.dst_x  <= r_dx;
            s_hdr.dst_y  <= r_dy;
            s_hdr.src_x  <= my_x;
            s_hdr.src_y  <= my_y;
            s_hdr.cmd    <= cmd_kind;
            s_hdr.len    <= r_len;
            s_laddr      <= r_laddr;
            s_raddr      <= r_raddr;
            s_left       <= r_len;
            s_local      <= 1'b1;
            s_state      <= S_HEAD;
          end
        end
        S_HEAD: if (send) s_state <= S_ADDR;
        S_ADDR: if (send) begin
          if (s_hdr.cmd == CMD_GET)  s_state <= S_RET;
          else if (s_left == '0)     s_state <= S_IDLE;
          else                       s_state <= S_RD;
        end
        S_RET:  if (send) s_state <= S_IDLE;
        S_RD:   s_state <= S_DATA;
        S_DATA: if (send) begin
          s_left  <= s_left - 1'b1;
          s_laddr <= s_laddr + 1'b1;
          s_state <= (s_left == 14'd1) ? S_IDLE : S_RD;
        end
        default: s_state <= S_IDLE;
      endcase

      // receive side: one flit per cycle at most, credit back next cycle
      net_out.credit <= '0;
      if (net_in.valid) begin
        net_out.credit[ivc] <= 1'b1;
        unique case (r_state[ivc])
          R_HEAD: if (net_in.flit.head) begin
            r_hdr[ivc]   <= head_t'(net_in.flit.data);
            r_state[ivc] <= R_ADDR;
          end
          R_ADDR: begin
            r_waddr[ivc] <= net_in.flit.data[MEM_AW-1:0];
            if (r_hdr[ivc].cmd == CMD_GET) r_state[ivc] <= R_RET;
            else if (net_in.flit.tail)     r_state[ivc] <= R_HEAD;
            else                           r_state[ivc] <= R_DATA;
          end
          R_RET: begin
            gp_v[ivc]   <= 1'b1;
            gp_hdr[ivc] <= r_hdr[ivc];
            gp_src[ivc] <= r_waddr[ivc];
            gp_ret[ivc] <= net_in.flit.data[MEM_AW-1:0];
            r_state[ivc] <= R_HEAD;
          end
          R_DATA: begin
            r_waddr[ivc] <= r_waddr[ivc] + 1'b1;
            if (net_in.flit.tail) r_state[ivc] <= R_HEAD;
          end
          default: r_state[ivc] <= R_HEAD;
        endcase
      end
      if (reg_we && reg_addr == 4'(R_DMA_RCNT)) r_rcnt <= '0;
      else if (wr_req.we)                        r_rcnt <= r_rcnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && en && net_in.valid && r_state[ivc] == R_RET)
      assert (!gp_v[ivc]) else $error("dmac: second GET on one VC before the first was served");
  end

endmodule
