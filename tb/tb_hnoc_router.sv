// tb_hnoc_router: end-to-end test of the heterogeneous shared-buffer router, with shared buffers of 8 time slots
// so that they can fill up and the per-port slot reservation takes effect.
//
// All five input ports inject 8-flit packets (tb_src) on all their VCs, as
// fast as credits allow, to random outputs weighted towards the two-flit east
// link; all five outputs are checked by tb_sink (packet integrity, XY output,
// lane limits).  During the run the east receiver holds back credits for a
// while (credit stall) and shared buffer 1 is disabled for a while (defective
// buffer masking), and traffic must keep flowing.  At the end every packet
// must have arrived, the smallest body-flit latency must be the idle-path
// latency of 3 clocks from the source register to the sink, and every
// scheduling mechanism must have acted at least once.
module tb_hnoc_router;
  import hnoc_pkg::*;

  localparam int NPKT = 60;
  localparam int PLEN = 8;
  localparam int VCD  = 8;
  localparam int SBN  = 4;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  int      cycle = 0;
  lane_t   in_link  [NP][MAX_PFC];
  credit_t in_cred  [NP][MAX_PFC];
  lane_t   out_link [NP][MAX_PFC];
  credit_t out_cred [NP][MAX_PFC];
  logic    sb_disable [SBN];
  events_t events;
  int      throttle [NP];
  logic    src_done [NP];
  int      sent_pkts [NP], sent_flits [NP];
  int      rpkts [NP], rflits [NP], rchecks [NP], rerrors [NP], rminlat [NP], rfull [NP];
  int      checks = 0, failures = 0;
  int      ev_cnt [8];
  int      dis_flits = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hnoc_router #(.SB_DEPTH(8)) dut (
    .clk, .rst_n, .my_x(4'd2), .my_y(4'd2),
    .in_link, .in_cred, .out_link, .out_cred, .sb_disable, .events
  );

  for (genvar p = 0; p < NP; p++) begin : g_tp
    tb_src #(.P(p), .PFC(DEF_IP_PFC[p]), .NVC(DEF_IP_VC[p]), .VC_DEPTH(VCD),
             .NPKT(NPKT), .PLEN(PLEN)) u_src (
      .clk, .rst_n, .enable(1'b1), .cycle,
      .link (in_link[p]), .cred (in_cred[p]),
      .sent_pkts (sent_pkts[p]), .sent_flits (sent_flits[p]), .done (src_done[p])
    );
    tb_sink #(.O(p), .PFC(DEF_OP_PFC[p]), .NVC(DEF_OP_VC[p]), .PLEN(PLEN)) u_snk (
      .clk, .rst_n, .cycle, .throttle (throttle[p]),
      .link (out_link[p]), .cred (out_cred[p]),
      .pkts (rpkts[p]), .flits (rflits[p]), .checks (rchecks[p]),
      .errors (rerrors[p]), .min_lat (rminlat[p]), .full_cycles (rfull[p])
    );
  end

  always @(posedge clk) if (rst_n) begin
    if (events.dep_conflict) ev_cnt[0]++;
    if (events.arr_conflict) ev_cnt[1]++;
    if (events.spread)       ev_cnt[2]++;
    if (events.multi_write)  ev_cnt[3]++;
    if (events.rsv_block)    ev_cnt[4]++;
    if (events.credit_stall) ev_cnt[5]++;
    if (events.vca_wait)     ev_cnt[6]++;
    if (events.merge)        ev_cnt[7]++;
    if (sb_disable[1])
      for (int o = 0; o < NP; o++)
        for (int k = 0; k < MAX_PFC; k++) if (out_link[o][k].valid) dis_flits++;
  end

  // Nothing may be written into a disabled shared buffer.
  always @(posedge clk) if (rst_n && sb_disable[1]) begin
    for (int k = 0; k < 2; k++)
      if (dut.g_sb[1].u_sb.we[k]) begin
        failures++;
        $display("[%0d] write into disabled shared buffer 1", cycle);
      end
  end

  function automatic logic all_done();
    int s, r;
    s = 0; r = 0;
    for (int p = 0; p < NP; p++) begin
      if (!src_done[p]) return 1'b0;
      s += sent_pkts[p]; r += rpkts[p];
    end
    return s == r;
  endfunction

  task automatic report();
    int s, r;
    string nm [8] = '{"departure conflict", "arrival conflict", "slot spreading",
                      "write speed-up", "slot reservation", "credit stall",
                      "VC allocation wait", "output merge"};
    s = 0; r = 0;
    for (int p = 0; p < NP; p++) begin
      s += sent_pkts[p]; r += rpkts[p];
      checks += rchecks[p]; failures += rerrors[p];
    end
    checks++;
    if (s != r || s != NP * NPKT) begin
      failures++;
      $display("packets sent %0d received %0d expected %0d", s, r, NP * NPKT);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      $display("mechanism %-20s : %0d cycles", nm[i], ev_cnt[i]);
      if (ev_cnt[i] == 0) begin
        failures++;
        $display("mechanism %s never happened", nm[i]);
      end
    end
    checks++;
    $display("east link cycles with both lanes busy: %0d", rfull[2]);
    if (rfull[2] == 0) failures++;
    checks++;
    $display("flits delivered with shared buffer 1 disabled: %0d", dis_flits);
    if (dis_flits == 0) failures++;
    begin
      int ml;
      ml = 1 << 30;
      for (int p = 0; p < NP; p++) begin
        $display("output %0d: %0d packets, min body latency %0d", p, rpkts[p], rminlat[p]);
        if (rminlat[p] < ml) ml = rminlat[p];
      end
      // A body flit registered by the source at edge n is written into the
      // input buffer at n+1, stamped into slot 1 at n+2 and registered on the
      // output link at n+3.
      checks++;
      if (ml != 3) begin
        failures++;
        $display("idle-path body latency %0d, expected 3", ml);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) ev_cnt[i] = 0;
    for (int p = 0; p < NP; p++) throttle[p] = 0;
    for (int b = 0; b < SBN; b++) sb_disable[b] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (150) @(posedge clk);
    throttle[2] = 70;                 // east receiver slows its credits
    throttle[0] = 40;
    repeat (200) @(posedge clk);
    throttle[2] = 0;
    throttle[0] = 0;
    sb_disable[1] = 1'b1;             // shared buffer 1 marked defective
    repeat (200) @(posedge clk);
    sb_disable[1] = 1'b0;
    while (!all_done()) @(posedge clk);
    repeat (20) @(posedge clk);
    report();
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    report();
    $finish;
  end
endmodule
