// Test of the Syrup channel: two channels joined by links with random
// delay.  Each side is a simulated design that advances on its own drive
// (= ok) and writes f(side, s) in simulated cycle s; the other side must
// read exactly that value in its cycle s+1.  Also checks that a side never
// advances without the neighbour's value (it stalls when the link is held).
module tb_syrup_channel;
  localparam int W = 32, NS = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] wd [2], rd [2], txd [2];
  logic ok [2], txv [2], txr [2], rxr [2];
  logic link_v [2];                 // link_v[i]: into side i
  logic [W-1:0] link_d [2];
  int s [2];
  int checks = 0, failures = 0, stalls = 0;
  bit hold [2];

  for (genvar i = 0; i < 2; i++) begin : g
    syrup_channel u (.clk, .rst_n, .drive(ok[i]), .u_wdata(wd[i]), .u_rdata(rd[i]), .ok(ok[i]),
                     .tx_valid(txv[i]), .tx_data(txd[i]), .tx_ready(txr[i]),
                     .rx_valid(link_v[i]), .rx_data(link_d[i]), .rx_ready(rxr[i]));
    // link from side 1-i to side i: passes a value only when not held
    assign link_v[i] = txv[1-i] && !hold[i];
    assign link_d[i] = txd[1-i];
    assign txr[1-i]  = rxr[i] && !hold[i];
    assign wd[i]     = W'(i * 32'h1000_0000 + s[i] * 3 + 1);
    always @(posedge clk) if (rst_n) begin
      if (ok[i]) s[i] <= s[i] + 1; else stalls++;
    end
    always @(negedge clk) hold[i] = ($urandom_range(0, 3) == 0);
    always @(negedge clk) if (rst_n && s[i] > 0 && s[i] < NS) begin
      // in cycle s the value from the other side's cycle s-1
      checks++;
      if (rd[i] != W'((1 - i) * 32'h1000_0000 + (s[i] - 1) * 3 + 1)) begin
        failures++;
        $display("FAIL side %0d cycle %0d: %h", i, s[i], rd[i]);
      end
    end
  end

  initial begin
    s[0] = 0; s[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (s[0] >= NS && s[1] >= NS);
    checks++;
    if (s[0] - s[1] > 1 || s[1] - s[0] > 1) failures++;
    checks++;
    if (stalls == 0) failures++;
    $display("stall clocks %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
