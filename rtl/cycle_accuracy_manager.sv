// Cycle-accuracy manager of flipSyrup: throttles the simulated hardware with
// DRIVE so that memories which really take several clocks look like ideal
// one-cycle memories to it.
//
// How: the simulated hardware advances one simulated cycle on every clock
// where DRIVE is high.  Its memory request of the current state goes
// straight to the cache port (pass-through).  When the hardware advances
// while that request is still open, the request (address, write data,
// read/write) is kept in the RWAIT registers and held on the cache port
// until the cache answers with rdy.  DRIVE is high only when no kept
// request is open, counting a rdy in the same clock.  Read data is held in
// the DONE registers (or bypassed in the clock rdy arrives) so the hardware
// sees it in the cycle after the one that read, as from a block RAM.
//
// Interface: per port l_* from the simulated hardware (addr, we, wdata, re,
// rdata), c_* to a Syrup memory (addr, we, wdata, re, rdy, rdata), drive.
// Timing (Fig. 4.7): requests issued in clock 1 are passed on in clock 1;
// DRIVE falls in clock 2 and rises in the clock the last rdy arrives.
//
// From the document: DRIVE throttle, the 5-signal memory interface, the
// ready ports, the stored request information and the Fig. 4.7 sequence.
// Own choices: the cur_done bookkeeping for requests that finish during
// pass-through and the read-data bypass.
module cycle_accuracy_manager #(
  parameter int unsigned NP = 2,
  parameter int unsigned AW = 17,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          drive,
  // simulated hardware side
  input  logic [AW-1:0] l_addr  [NP],
  input  logic [NP-1:0] l_we,
  input  logic [DW-1:0] l_wdata [NP],
  input  logic [NP-1:0] l_re,
  output logic [DW-1:0] l_rdata [NP],
  // cache side
  output logic [AW-1:0] c_addr  [NP],
  output logic [NP-1:0] c_we,
  output logic [DW-1:0] c_wdata [NP],
  output logic [NP-1:0] c_re,
  input  logic [NP-1:0] c_rdy,
  input  logic [DW-1:0] c_rdata [NP]
);
  logic [NP-1:0] rwait, rw_we, rw_re;     // kept request still open
  logic [AW-1:0] rw_addr  [NP];
  logic [DW-1:0] rw_wdata [NP];
  logic [NP-1:0] cur_done;                // current request already finished
  logic [DW-1:0] cur_data [NP];
  logic [DW-1:0] done_data [NP];          // DONE register: data for the hardware
  logic [NP-1:0] fresh;

  assign fresh = (l_re | l_we) & ~cur_done & ~rwait;
  assign drive = &(~rwait | c_rdy);

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      c_addr[p]  = rwait[p] ? rw_addr[p]  : l_addr[p];
      c_wdata[p] = rwait[p] ? rw_wdata[p] : l_wdata[p];
      c_re[p]    = rwait[p] ? rw_re[p]    : fresh[p] & l_re[p];
      c_we[p]    = rwait[p] ? rw_we[p]    : fresh[p] & l_we[p];
      l_rdata[p] = (rwait[p] && c_rdy[p]) ? c_rdata[p] : done_data[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rwait <= '0; rw_we <= '0; rw_re <= '0; cur_done <= '0;
      for (int p = 0; p < NP; p++) begin
        rw_addr[p] <= '0; rw_wdata[p] <= '0; cur_data[p] <= '0; done_data[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (rwait[p] && c_rdy[p]) begin
          rwait[p] <= 1'b0;
          if (rw_re[p]) done_data[p] <= c_rdata[p];
        end
        if (drive) begin
          // the hardware moves on: its current request is finished or kept
          cur_done[p] <= 1'b0;
          if (cur_done[p]) begin
            done_data[p] <= cur_data[p];
          end else if (fresh[p] && c_rdy[p]) begin
            if (l_re[p]) done_data[p] <= c_rdata[p];
          end else if (l_re[p] || l_we[p]) begin
            // open, or not yet issued because a kept request held the port
            rwait[p]    <= 1'b1;
            rw_addr[p]  <= l_addr[p];  rw_wdata[p] <= l_wdata[p];
            rw_re[p]    <= l_re[p];    rw_we[p]    <= l_we[p];
          end
        end else if (fresh[p] && c_rdy[p]) begin
          // request of a stalled state finished: keep it until the advance
          cur_done[p] <= 1'b1;
          cur_data[p] <= c_rdata[p];
        end
      end
    end
  end
endmodule
