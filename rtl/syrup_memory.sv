// Syrup memory: the physical form of an abstract single-cycle memory of the
// flipSyrup framework.  The simulated design sees a memory of any size with
// a one-cycle access; here it is a cache in block RAM in front of an
// external memory, with a request arbiter in front of the cache's single
// port.
//
// How: NP request ports (word address, read enable, write enable with byte
// enables, write data) hold their request until rdy.  A round-robin arbiter
// picks one pending port per clock.  The cache is direct mapped with
// write-back and write-allocate.  The tag RAM holds tag, valid, dirty and
// access bits; the data RAM is four byte-wide banks so byte writes need no
// read-modify-write.  A hit is answered one clock later (rdy pulses with the
// read data).  Valid bits are flops cleared by reset; tag, dirty and access
// bits sit in the tag RAM and are only looked at for a valid line.
// A miss writes a dirty victim back as one line transfer
// (m_req/m_we/m_addr/m_wdata until m_ack) and refills the line (m_req read
// until m_ack, data on m_rdata), moving it word by word, then serves the
// request as a hit.  One miss is outstanding at a time.
//
// Interface: req_re/req_we/req_addr/req_be/req_wdata, rdy, rdata per port;
// m_* line port towards the external memory.
// Timing: hit: rdy one clock after the port wins arbitration.  Miss: two
// clocks plus WPL clocks per line moved plus the external latency.
//
// From the document: cache with tag RAM (tag, valid, dirty, access bit) and
// byte-banked data RAM, one shared port with a request arbiter, 1-clock
// latency, 16-byte lines, direct map, one outstanding miss, no prefetch.
// Own choices: number of lines, round-robin arbitration, write-allocate,
// word-by-word line moves, the line interface towards the external memory.
module syrup_memory #(
  parameter int unsigned NP     = 2,     // request ports
  parameter int unsigned AW     = 17,    // word address bits (512 KB logical)
  parameter int unsigned LINE_B = 16,    // bytes per line
  parameter int unsigned NLINE  = 1024   // lines in the cache
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NP-1:0]            req_re,
  input  logic [NP-1:0]            req_we,
  input  logic [AW-1:0]            req_addr  [NP],
  input  logic [3:0]               req_be    [NP],
  input  logic [31:0]              req_wdata [NP],
  output logic [NP-1:0]            rdy,
  output logic [31:0]              rdata     [NP],
  // external memory, one line per transfer
  output logic                     m_req,
  output logic                     m_we,
  output logic [AW-$clog2(LINE_B/4)-1:0] m_addr,
  output logic [LINE_B*8-1:0]      m_wdata,
  input  logic                     m_ack,
  input  logic [LINE_B*8-1:0]      m_rdata
);
  localparam int unsigned WPL = LINE_B / 4;           // words per line
  localparam int unsigned OW  = $clog2(WPL);
  localparam int unsigned IW  = $clog2(NLINE);
  localparam int unsigned TW  = AW - OW - IW;
  localparam int unsigned PW  = (NP > 1) ? $clog2(NP) : 1;

  typedef struct packed {
    logic [TW-1:0] tag;
    logic          dirty;
    logic          accessed;
  } tag_t;

  tag_t       tags  [NLINE];   // tag RAM (block RAM, not reset)
  logic [NLINE-1:0] valid;     // valid bits, cleared by reset
  logic [7:0] bank [4][NLINE*WPL];

  typedef enum logic [2:0] {S_IDLE, S_WBR, S_WB, S_FILL, S_FILLW} state_e;
  state_e state;

  logic [PW-1:0] rr, g, cur;
  logic          any;
  logic [NP-1:0] pend;
  logic [AW-1:0] a;
  tag_t          t;
  logic          t_valid, hit;
  logic [OW-1:0] wi;                  // word index of a line move
  logic [LINE_B*8-1:0] line;

  assign pend = (req_re | req_we) & ~rdy;

  always_comb begin
    any = 1'b0;
    g   = rr;
    for (int k = 0; k < NP; k++) begin
      if (!any && pend[(int'(rr) + k) % NP]) begin
        any = 1'b1;
        g   = PW'((int'(rr) + k) % NP);
      end
    end
  end

  assign a   = (state == S_IDLE) ? req_addr[g] : req_addr[cur];
  assign t       = tags[a[OW +: IW]];
  assign t_valid = valid[a[OW +: IW]];
  assign hit     = t_valid && t.tag == a[AW-1 -: TW];

  assign m_addr  = (state == S_WB) ? {t.tag, a[OW +: IW]} : a[AW-1:OW];
  assign m_we    = (state == S_WB);
  assign m_req   = (state == S_WB) || (state == S_FILL);
  assign m_wdata = line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rr <= '0; cur <= '0; rdy <= '0; wi <= '0; line <= '0;
      for (int p = 0; p < NP; p++) rdata[p] <= '0;
      valid <= '0;
    end else begin
      rdy <= '0;
      unique case (state)
        S_IDLE: if (any) begin
          cur <= g;
          if (hit) begin
            rr       <= PW'((int'(g) + 1) % NP);
            rdy[g]   <= 1'b1;
            rdata[g] <= {bank[3][a[OW+IW-1:0]], bank[2][a[OW+IW-1:0]],
                         bank[1][a[OW+IW-1:0]], bank[0][a[OW+IW-1:0]]};
            if (req_we[g]) begin
              for (int b = 0; b < 4; b++)
                if (req_be[g][b]) bank[b][a[OW+IW-1:0]] <= req_wdata[g][8*b +: 8];
              tags[a[OW +: IW]].dirty <= 1'b1;
            end
            tags[a[OW +: IW]].accessed <= 1'b1;
          end else if (t_valid && t.dirty) begin
            state <= S_WBR; wi <= '0;
          end else begin
            state <= S_FILL;
          end
        end
        S_WBR: begin                  // gather the victim line
          line[32*wi +: 32] <= {bank[3][{a[OW +: IW], wi}], bank[2][{a[OW +: IW], wi}],
                                bank[1][{a[OW +: IW], wi}], bank[0][{a[OW +: IW], wi}]};
          wi <= wi + 1'b1;
          if (wi == OW'(WPL - 1)) state <= S_WB;
        end
        S_WB: if (m_ack) state <= S_FILL;
        S_FILL: if (m_ack) begin
          line  <= m_rdata;
          wi    <= '0;
          state <= S_FILLW;
        end
        S_FILLW: begin                // move the new line into the banks
          for (int b = 0; b < 4; b++) bank[b][{a[OW +: IW], wi}] <= line[32*wi + 8*b +: 8];
          wi <= wi + 1'b1;
          if (wi == OW'(WPL - 1)) begin
            tags[a[OW +: IW]]  <= '{tag: a[AW-1 -: TW], dirty: 1'b0, accessed: 1'b0};
            valid[a[OW +: IW]] <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
