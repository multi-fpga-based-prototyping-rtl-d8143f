// Self-checking test of the 5-port router at node (1,1).
// Packets enter from all five inputs on both VCs, towards destinations in
// every direction.  Each sink checks that a packet arrives at the output
// that X-Y routing predicts (worked out here, independently), that its
// flits arrive in order and complete, and returns one credit per flit.
// Also checked: the 4-stage latency of a lone head flit, and that a sink
// that returns no credits receives at most DEPTH flits per VC.
module tb_mcore_router;
  import sc_pkg::*;
  localparam int NVC = 2, DEPTH = 4, NPK = 40;
  logic clk = 0, rst_n = 0, en = 1;
  link_t in_link [NPORT];
  link_t out_link [NPORT];
  int checks = 0, failures = 0;

  mcore_router #(.NVC(NVC), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .en, .my_x(4'd1), .my_y(4'd1), .in_link, .out_link
  );
  always #5 clk = ~clk;

  // packet table
  int pk_src [NPK], pk_dx [NPK], pk_dy [NPK], pk_len [NPK], pk_exp_port [NPK];
  int got_flits [NPK];
  bit pk_done [NPK];

  function automatic int xy(input int dx, dy);
    if (dx > 1) return 2; if (dx < 1) return 4;
    if (dy > 1) return 3; if (dy < 1) return 1;
    return 0;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // sources
  int  src_cred [NPORT][NVC];
  int  src_pk [NPORT];      // current packet index into per-port list
  int  src_seq [NPORT];
  int  plist [NPORT][$];
  bit  hold_credit [NPORT];
  int  sink_cur [NPORT][NVC];
  int  sink_seq [NPORT][NVC];
  int  sink_cnt [NPORT];

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        // credits from the router for this source
        for (int v = 0; v < NVC; v++) if (out_link[p].credit[v]) src_cred[p][v]++;
        in_link[p].valid <= 1'b0;
        if (plist[p].size() != 0) begin
          automatic int k = plist[p][0];
          automatic int v = k % NVC;
          if (src_cred[p][v] > 0) begin
            automatic flit_t f = '0;
            f.vc   = VCW'(v);
            f.head = (src_seq[p] == 0);
            f.tail = (src_seq[p] == pk_len[k] - 1);
            if (f.head) begin
              head_t h = '0;
              h.dst_x = XW'(pk_dx[k]); h.dst_y = YW'(pk_dy[k]); h.len = 14'(pk_len[k]);
              f.data = h;
            end else f.data = {16'(k), 16'(src_seq[p])};
            in_link[p].valid <= 1'b1;
            in_link[p].flit  <= f;
            src_cred[p][v]--;
            src_seq[p]++;
            if (f.tail) begin src_seq[p] = 0; void'(plist[p].pop_front()); end
          end
        end
        // sinks
        in_link[p].credit <= '0;
        if (out_link[p].valid) begin
          automatic flit_t f = out_link[p].flit;
          automatic int v = int'(f.vc);
          sink_cnt[p]++;
          if (!hold_credit[p]) in_link[p].credit[v] <= 1'b1;
          if (f.head) begin
            sink_cur[p][v] = -1;
            sink_seq[p][v] = 1;
          end else begin
            automatic int k = int'(f.data[31:16]);
            if (sink_seq[p][v] == 1) sink_cur[p][v] = k;
            check($sformatf("packet %0d at port %0d expected %0d", k, p, pk_exp_port[k]),
                  pk_exp_port[k] == p && sink_cur[p][v] == k
                  && int'(f.data[15:0]) == sink_seq[p][v]);
            sink_seq[p][v]++;
            got_flits[k]++;
            if (f.tail) begin
              check($sformatf("packet %0d length", k), got_flits[k] == pk_len[k] - 1);
              pk_done[k] = 1;
            end
          end
        end
      end
    end
  end

  initial begin
    int dests [7][2] = '{'{1,1}, '{2,1}, '{0,1}, '{1,0}, '{1,2}, '{3,0}, '{1,3}};
    int t0, lat;
    for (int p = 0; p < NPORT; p++) begin
      in_link[p] = '0; src_seq[p] = 0; hold_credit[p] = 0; sink_cnt[p] = 0;
      for (int v = 0; v < NVC; v++) begin src_cred[p][v] = DEPTH; sink_cur[p][v] = -1; sink_seq[p][v] = 0; end
    end
    for (int k = 0; k < NPK; k++) begin
      pk_done[k] = 0; got_flits[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. latency of one lone head+tail packet, west input to east output
    pk_src[0] = 4; pk_dx[0] = 3; pk_dy[0] = 1; pk_len[0] = 2; pk_exp_port[0] = xy(3, 1);
    @(negedge clk);
    plist[4].push_back(0);
    @(posedge clk); t0 = 0;     // this edge drives the head onto the input link
    do begin @(negedge clk); t0++; end while (!out_link[P_EAST].valid);
    // edges after the input link: buffer write, NRC+VA, SA, ST->LT
    // (t0 counts negedges, the first one falls before the first router edge)
    check($sformatf("head latency %0d", t0 - 1), t0 - 1 == 4);
    repeat (10) @(posedge clk);
    // 2. random traffic from every input, both VCs
    for (int k = 1; k < NPK; k++) begin
      automatic int d = $urandom_range(0, 6);
      pk_src[k] = $urandom_range(0, NPORT - 1);
      pk_dx[k] = dests[d][0]; pk_dy[k] = dests[d][1];
      pk_len[k] = $urandom_range(2, 6);
      pk_exp_port[k] = xy(pk_dx[k], pk_dy[k]);
    end
    @(negedge clk);
    for (int k = 1; k < NPK; k++) plist[pk_src[k]].push_back(k);
    repeat (600) @(posedge clk);
    for (int k = 0; k < NPK; k++) check($sformatf("packet %0d delivered", k), pk_done[k]);
    // 3. back-pressure: the north sink returns no credits
    hold_credit[P_NORTH] = 1;
    sink_cnt[P_NORTH] = 0;
    pk_src[NPK-1] = 0; pk_dx[NPK-1] = 1; pk_dy[NPK-1] = 0; pk_len[NPK-1] = 10;
    pk_exp_port[NPK-1] = 1; got_flits[NPK-1] = 0; pk_done[NPK-1] = 0;
    @(negedge clk);
    plist[0].push_back(NPK-1);
    repeat (60) @(posedge clk);
    check($sformatf("credit stall: %0d flits passed", sink_cnt[P_NORTH]), sink_cnt[P_NORTH] == DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
