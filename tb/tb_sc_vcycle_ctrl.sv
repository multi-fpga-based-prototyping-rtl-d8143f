// Self-checking test of the virtual-cycle controller.  A model of the
// neighbours delivers their frames after random delays.  Checked: en never
// comes before memory emulation is done and every present neighbour's frame
// is there, absent neighbours are never waited for, each en advances the
// cycle counter by one, latch always comes right before en, run=0 holds the
// simulation and halt_cycle stops it.
module tb_sc_vcycle_ctrl;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, run = 1;
  logic [31:0] halt_cycle = 0, vcycle;
  logic [NDIR-1:0] nbr_present, rx_avail;
  logic tx_idle = 1, mem_done, start, latch, en, waiting;
  int checks = 0, failures = 0;
  int arrive [NDIR], mem_at, t;
  int ens = 0, bad = 0;
  logic latch_q;

  sc_vcycle_ctrl dut (.*);
  always #5 clk = ~clk;

  // neighbours and memory: after each start, frames and done arrive late
  always_ff @(posedge clk) begin
    t <= t + 1;
    latch_q <= latch;
    if (start) begin
      for (int d = 0; d < NDIR; d++) arrive[d] <= t + $urandom_range(3, 40);
      mem_at <= t + $urandom_range(2, 30);
    end
    if (en) begin
      ens <= ens + 1;
      // all conditions must have held
      for (int d = 0; d < NDIR; d++) if (nbr_present[d] && arrive[d] > t - 2) bad <= bad + 1;
      if (mem_at > t - 2) bad <= bad + 1;
      if (!latch_q) bad <= bad + 1;
    end
  end
  always_comb begin
    for (int d = 0; d < NDIR; d++) rx_avail[d] = (t >= arrive[d]);
    mem_done = (t >= mem_at);
  end

  initial begin
    int e0;
    t = 0; mem_at = 1 << 30;
    for (int d = 0; d < NDIR; d++) arrive[d] = 1 << 30;
    nbr_present = 4'b1111;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (bad != 0 || ens < 20) begin failures++; $display("FAIL %0d early ens out of %0d", bad, ens); end
    checks++;
    if (vcycle != 32'(ens)) begin failures++; $display("FAIL counter %0d vs %0d", vcycle, ens); end
    // an absent neighbour that never answers must not block
    nbr_present = 4'b1011;
    @(posedge clk);
    arrive[2] = 1 << 30;
    force arrive[2] = 1 << 30;
    e0 = ens;
    repeat (500) @(posedge clk);
    checks++;
    if (ens - e0 < 5 || bad != 0) begin failures++; $display("FAIL absent neighbour blocks"); end
    release arrive[2];
    // run = 0 holds
    run = 0;
    repeat (60) @(posedge clk);
    e0 = ens;
    repeat (200) @(posedge clk);
    checks++;
    if (ens != e0) begin failures++; $display("FAIL en while run = 0"); end
    run = 1;
    halt_cycle = vcycle + 5;
    repeat (600) @(posedge clk);
    checks++;
    if (vcycle != halt_cycle) begin failures++; $display("FAIL halt at %0d vs %0d", vcycle, halt_cycle); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
