// Memory multiplexer: emulates the 4-port node memory of the target with
// the single-port SRAM controller, by time-division multiplexing.
//
// The emulated node memory has four ports (instruction fetch, load/store,
// DMA read, DMA write) and a latency of one simulated cycle.  After each
// simulated cycle's register update, the virtual-cycle controller pulses
// start; the multiplexer then serves the requesting ports one after another
// in the fixed order fetch, load/store, DMA read, DMA write through the
// SRAM controller, keeping read data in staging registers, and raises done.
// On the next en (the simulated clock edge) the staging data of the ports
// that read are copied to their rdata outputs, exactly as a synchronous RAM
// would present them one cycle after the request.  Ports that did not read
// keep their old rdata.
// Interface: req[4] (target side, sampled at start), rdata[4]; start, done,
// en from/to the controller; mreq_*/mdone/mrdata to the SRAM controller.
// Timing: 8 clocks per active port plus 2, i.e. at most 34 clocks.
// Follows the description: time-division multiplexing of the four ports.
// The service order and the read-before-write consequence within one cycle
// are this design's choices (a read on an earlier port of the same cycle
// sees the old word, a read on a later port sees the new word).
module sc_mem_mux
  import sc_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  input  logic          en,
  input  mreq_t         req   [NMPORT],
  output logic [31:0]   rdata [NMPORT],
  output logic          mreq,
  output logic          mwe,
  output logic [AW-1:0] maddr,
  output logic [31:0]   mwdata,
  input  logic          mbusy,
  input  logic          mdone,
  input  logic [31:0]   mrdata
);
  typedef enum logic [1:0] {M_IDLE, M_PICK, M_WAIT, M_DONE} state_e;
  state_e         state;
  mreq_t          lreq  [NMPORT];
  logic [31:0]    stage [NMPORT];
  logic [NMPORT-1:0] rd_hit;
  logic [2:0]     port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= M_IDLE;
      port   <= '0;
      done   <= 1'b0;
      rd_hit <= '0;
      mreq   <= 1'b0;
      mwe    <= 1'b0;
      maddr  <= '0;
      mwdata <= '0;
      for (int i = 0; i < NMPORT; i++) begin
        lreq[i]  <= '0;
        stage[i] <= '0;
        rdata[i] <= '0;
      end
    end else begin
      mreq <= 1'b0;
      if (en) begin
        for (int i = 0; i < NMPORT; i++)
          if (rd_hit[i]) rdata[i] <= stage[i];
        done <= 1'b0;
      end
      unique case (state)
        M_IDLE: if (start) begin
          for (int i = 0; i < NMPORT; i++) lreq[i] <= req[i];
          rd_hit <= '0;
          done   <= 1'b0;
          port   <= '0;
          state  <= M_PICK;
        end
        M_PICK: begin
          if (port == 3'(NMPORT)) begin
            state <= M_DONE;
          end else if ((lreq[port[1:0]].re || lreq[port[1:0]].we) && !mbusy) begin
            mreq   <= 1'b1;
            mwe    <= lreq[port[1:0]].we;
            maddr  <= lreq[port[1:0]].addr;
            mwdata <= lreq[port[1:0]].wdata;
            state  <= M_WAIT;
          end else if (!(lreq[port[1:0]].re || lreq[port[1:0]].we)) begin
            port <= port + 1'b1;
          end
        end
        M_WAIT: if (mdone) begin
          if (lreq[port[1:0]].re && !lreq[port[1:0]].we) begin
            stage[port[1:0]]  <= mrdata;
            rd_hit[port[1:0]] <= 1'b1;
          end
          port  <= port + 1'b1;
          state <= M_PICK;
        end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
