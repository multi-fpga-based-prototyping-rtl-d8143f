// Controller of the unit's off-chip SRAM (8 bit x 512K, asynchronous).
//
// The node memory of the emulated M-Core node is 32 bits wide; the SRAM chip
// is 8 bits wide.  One word access is done as four byte accesses, least
// significant byte at the lowest byte address.  Each byte takes two clocks:
// the address (and for a write, data with WE# low) is driven in the first,
// and in the second the read byte is sampled, or WE# goes high again, which
// is the edge at which the chip stores the byte.  A word therefore takes
// eight clocks.
// Interface: req (one-cycle pulse, taken only when idle), we, addr (word
// address), wdata; done pulses with rdata valid for reads.  SRAM side:
// sram_addr, sram_dq_o/sram_dq_oe (data out and its enable), sram_dq_i,
// sram_ce_n, sram_oe_n, sram_we_n.
// The description gives the chip (1 port, 8 bit x 512K entries) and names an
// SRAM controller; the byte sequencing and the two-clock byte cycle are this
// design's choices.
module sc_sram_ctrl #(
  parameter int unsigned AW = 17          // word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          busy,
  output logic          done,
  output logic [31:0]   rdata,
  output logic [AW+1:0] sram_addr,
  output logic [7:0]    sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [7:0]    sram_dq_i,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_HOLD} state_e;
  state_e        state;
  logic [1:0]    idx;
  logic          wr;
  logic [AW-1:0] waddr;
  logic [31:0]   wbuf;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      wr         <= 1'b0;
      waddr      <= '0;
      wbuf       <= '0;
      rdata      <= '0;
      done       <= 1'b0;
      sram_addr  <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          wr         <= we;
          waddr      <= addr;
          wbuf       <= wdata;
          idx        <= 2'd0;
          sram_addr  <= {addr, 2'd0};
          sram_dq_o  <= wdata[7:0];
          sram_dq_oe <= we;
          sram_ce_n  <= 1'b0;
          sram_oe_n  <= we;
          sram_we_n  <= ~we;
          state      <= S_HOLD;
        end
        S_SETUP: begin
          sram_addr  <= {waddr, idx};
          sram_dq_o  <= wbuf[8*idx +: 8];
          sram_dq_oe <= wr;
          sram_ce_n  <= 1'b0;
          sram_oe_n  <= wr;
          sram_we_n  <= ~wr;
          state      <= S_HOLD;
        end
        S_HOLD: begin
          if (!wr) rdata[8*idx +: 8] <= sram_dq_i;
          sram_we_n <= 1'b1;
          if (idx == 2'd3) begin
            state      <= S_IDLE;
            done       <= 1'b1;
            sram_ce_n  <= 1'b1;
            sram_oe_n  <= 1'b1;
            sram_dq_oe <= 1'b0;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_SETUP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
