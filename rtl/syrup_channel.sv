// Syrup channel: the physical form of an abstract single-cycle link between
// two parts of a simulated design placed on neighbouring FPGAs.  The design
// sees a register shared with the neighbour: what one side writes in
// simulated cycle s the other side reads in cycle s+1, without stalls.
//
// How: in every simulated cycle the value u_wdata is pushed once into the
// transmit FIFO towards the neighbour (tx_*, valid/ready).  Values from the
// neighbour arrive in the receive FIFO (rx_*).  ok tells the cycle-accuracy
// manager that this cycle's value has been sent and the neighbour's value
// for this cycle is waiting; the manager then raises drive, and on that
// clock the receive FIFO is popped into u_rdata.
//
// Interface: drive (advance), u_wdata/u_rdata (simulated side), tx/rx
// valid-ready links, ok (no reason to stall).
// Timing: one transmit push per simulated cycle; u_rdata changes only on
// clocks with drive.
//
// From the document: the channel is a FIFO towards the neighbour FPGA and
// looks like a single-cycle shared register.  Own choices: the push-once
// flag, the ok handshake with the manager, the FIFO depth and the reset
// value of u_rdata.
module syrup_channel #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         drive,
  input  logic [W-1:0] u_wdata,
  output logic [W-1:0] u_rdata,
  output logic         ok,
  output logic         tx_valid,
  output logic [W-1:0] tx_data,
  input  logic         tx_ready,
  input  logic         rx_valid,
  input  logic [W-1:0] rx_data,
  output logic         rx_ready
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  tq [DEPTH], rq [DEPTH];
  logic [AW:0]   twp, trp, rwp, rrp;
  logic          sent, push, pop, t_full, r_empty;

  assign t_full  = (twp - trp) == (AW+1)'(DEPTH);
  assign r_empty = (rwp == rrp);
  assign push    = !sent && !t_full;
  assign ok      = (sent || push) && !r_empty;
  assign pop     = drive && ok;

  assign tx_valid = (twp != trp);
  assign tx_data  = tq[trp[AW-1:0]];
  assign rx_ready = (rwp - rrp) != (AW+1)'(DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      twp <= '0; trp <= '0; rwp <= '0; rrp <= '0; sent <= 1'b0; u_rdata <= '0;
      for (int i = 0; i < DEPTH; i++) begin tq[i] <= '0; rq[i] <= '0; end
    end else begin
      if (push) begin
        tq[twp[AW-1:0]] <= u_wdata;
        twp <= twp + 1'b1;
      end
      if (tx_valid && tx_ready) trp <= trp + 1'b1;
      if (rx_valid && rx_ready) begin
        rq[rwp[AW-1:0]] <= rx_data;
        rwp <= rwp + 1'b1;
      end
      if (pop) begin
        u_rdata <= rq[rrp[AW-1:0]];
        rrp     <= rrp + 1'b1;
        sent    <= 1'b0;
      end else if (push) begin
        sent <= 1'b1;
      end
    end
  end
endmodule
