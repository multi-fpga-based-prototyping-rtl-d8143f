// State machine controller of a ScalableCore Unit: virtual cycles and local
// barrier synchronization.
//
// One simulated (target) clock cycle is emulated by several FPGA clock
// cycles, the virtual cycle.  The controller:
//   1. pulses start: the memory multiplexer begins emulating this cycle's
//      memory accesses and the outgoing interface registers, holding the
//      target's boundary outputs, are sent to the four neighbours;
//   2. waits until memory emulation is done, the transmitters are free, and
//      one frame of the same simulated cycle has arrived from every present
//      neighbour (local barrier: only the 4 neighbours are waited for,
//      never the whole system);
//   3. pulses latch: the received frames are popped into the incoming
//      interface registers;
//   4. pulses en for one clock: every target register updates (the
//      simulated clock edge), and the cycle counter advances.
// run gates step 4 so a host can hold the simulation; halt_cycle stops it at
// a given count (0 = never).
// Interface: nbr_present[4], rx_avail[4], tx_idle, mem_done in; start,
// latch, en, vcycle, waiting out.  The state names and the order of start,
// latch and en are this design's reading of the virtual-cycle chart.
module sc_vcycle_ctrl
  import sc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic [31:0]     halt_cycle,
  input  logic [NDIR-1:0] nbr_present,
  input  logic [NDIR-1:0] rx_avail,
  input  logic            tx_idle,     // no transmit FIFO is full
  input  logic            mem_done,
  output logic            start,
  output logic            latch,
  output logic            en,
  output logic [31:0]     vcycle,
  output logic            waiting
);
  typedef enum logic [2:0] {C_START, C_BUSY, C_WAIT, C_LATCH, C_EN} state_e;
  state_e state;
  logic   nbrs_ok;

  assign nbrs_ok = &(rx_avail | ~nbr_present);
  assign waiting = (state == C_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_START;
      start  <= 1'b0;
      latch  <= 1'b0;
      en     <= 1'b0;
      vcycle <= '0;
    end else begin
      start <= 1'b0;
      latch <= 1'b0;
      en    <= 1'b0;
      unique case (state)
        C_START: begin
          start <= 1'b1;
          state <= C_BUSY;
        end
        C_BUSY:  state <= C_WAIT;       // let mem_done of the last cycle clear
        C_WAIT:  if (mem_done && tx_idle && nbrs_ok) begin
          latch <= 1'b1;
          state <= C_LATCH;
        end
        C_LATCH: if (run && (halt_cycle == '0 || vcycle != halt_cycle)) begin
          en     <= 1'b1;
          vcycle <= vcycle + 1'b1;
          state  <= C_EN;
        end
        C_EN:    state <= C_START;
        default: state <= C_START;
      endcase
    end
  end

endmodule
