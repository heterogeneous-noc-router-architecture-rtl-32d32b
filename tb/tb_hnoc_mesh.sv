// tb_hnoc_mesh: 4x4 mesh of routers under transpose, complement and uniform
// traffic.
//
// Sixteen hnoc_router instances are joined into a 2-D mesh: output port p of
// a node drives input port opp(p) of its neighbour, and that input port's
// credits flow back.  Links at the mesh border are tied off (XY routing never
// uses them).  Every node has a tb_mesh_src on its local input and a tb_sink
// on its local output; the sink checks packet integrity per VC, that each head
// really is for this node, and returns credits at once.
//
// The routers are heterogeneous in the way a mesh allows: the link widths and
// VC counts of both ends of every link have to match, so all nodes use
//   IP_PFC = {2,1,1,1,2}  OP_PFC = {2,1,2,1,1}   (eastward links 2 flits/clock)
//   IP_VC  = {2,2,2,3,2}  OP_VC  = {2,3,2,2,2}   (northward links 3 VCs)
// with four shared buffers of write speed-up two.
//
// Three phases run one after another, QUOTA packets of 8 flits per node each,
// at an offered load of RATE percent packet starts per clock and node:
// transpose, complement and uniform random.  A phase ends when every packet
// has arrived.  The test checks per phase that every node received exactly
// the packets its pattern sends to it, that no sink saw a bad flit, and that
// the shared-buffer scheduling mechanisms acted; it prints the drain time and
// the accepted throughput of each pattern.
module tb_hnoc_mesh;
  import hnoc_pkg::*;

  localparam int MESH  = 4;
  localparam int NN    = MESH * MESH;
  localparam int QUOTA = 30;
  localparam int RATE  = 12;
  localparam int PLEN  = 8;
  localparam int VCD   = 8;
  localparam int M_IP_PFC [NP] = '{2, 1, 1, 1, 2};
  localparam int M_OP_PFC [NP] = '{2, 1, 2, 1, 1};
  localparam int M_IP_VC  [NP] = '{2, 2, 2, 3, 2};
  localparam int M_OP_VC  [NP] = '{2, 3, 2, 2, 2};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  int   mode = 0, quota = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  lane_t   il [NN][NP][MAX_PFC];
  lane_t   ol [NN][NP][MAX_PFC];
  credit_t ic [NN][NP][MAX_PFC];
  credit_t oc [NN][NP][MAX_PFC];
  events_t ev [NN];
  logic    sbd [4];
  assign sbd = '{default: 1'b0};

  int s_started [NN], s_flits [NN];
  logic s_idle [NN];
  int k_pkts [NN], k_flits [NN], k_checks [NN], k_err [NN], k_minlat [NN], k_full [NN];

  function automatic int nbr(int n, int p);
    int x, y;
    x = n % MESH; y = n / MESH;
    case (p)
      1: return (y < MESH - 1) ? n + MESH : -1;
      2: return (x < MESH - 1) ? n + 1 : -1;
      3: return (y > 0) ? n - MESH : -1;
      4: return (x > 0) ? n - 1 : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    return (p == 1) ? 3 : (p == 3) ? 1 : (p == 2) ? 4 : (p == 4) ? 2 : 0;
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_node
    lane_t   src_link [MAX_PFC];
    credit_t snk_cred [MAX_PFC];

    always_comb begin
      for (int p = 1; p < NP; p++)
        for (int l = 0; l < MAX_PFC; l++) begin
          il[n][p][l] = (nbr(n, p) >= 0) ? ol[nbr(n, p)][opp(p)][l] : '0;
          oc[n][p][l] = (nbr(n, p) >= 0) ? ic[nbr(n, p)][opp(p)][l] : '0;
        end
      for (int l = 0; l < MAX_PFC; l++) begin
        il[n][0][l] = src_link[l];
        oc[n][0][l] = snk_cred[l];
      end
    end

    hnoc_router #(
      .IP_PFC(M_IP_PFC), .IP_VC(M_IP_VC), .OP_PFC(M_OP_PFC), .OP_VC(M_OP_VC),
      .VC_DEPTH(VCD)
    ) u_r (
      .clk(clk), .rst_n(rst_n),
      .my_x(COORD_W'(n % MESH)), .my_y(COORD_W'(n / MESH)),
      .in_link(il[n]), .in_cred(ic[n]), .out_link(ol[n]), .out_cred(oc[n]),
      .sb_disable(sbd), .events(ev[n])
    );

    tb_mesh_src #(.NODE(n), .MESH(MESH), .PFC(M_IP_PFC[0]), .NVC(M_IP_VC[0]),
                  .VC_DEPTH(VCD), .PLEN(PLEN)) u_src (
      .clk(clk), .rst_n(rst_n), .cycle(cycle), .mode(mode), .quota(quota), .rate(RATE),
      .link(src_link), .cred(ic[n][0]), .started(s_started[n]), .sent_flits(s_flits[n]),
      .idle(s_idle[n])
    );

    tb_sink #(.O(0), .PFC(M_OP_PFC[0]), .NVC(M_OP_VC[0]), .PLEN(PLEN),
              .MY_X(n % MESH), .MY_Y(n / MESH)) u_snk (
      .clk(clk), .rst_n(rst_n), .cycle(cycle), .throttle(0),
      .link(ol[n][0]), .cred(snk_cred), .pkts(k_pkts[n]), .flits(k_flits[n]),
      .checks(k_checks[n]), .errors(k_err[n]), .min_lat(k_minlat[n]), .full_cycles(k_full[n])
    );
  end

  // mechanism counters, over all routers
  int c_dep, c_arr, c_spread, c_multi, c_rsv, c_cred, c_vca, c_merge;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      c_dep    += int'(ev[n].dep_conflict);
      c_arr    += int'(ev[n].arr_conflict);
      c_spread += int'(ev[n].spread);
      c_multi  += int'(ev[n].multi_write);
      c_rsv    += int'(ev[n].rsv_block);
      c_cred   += int'(ev[n].credit_stall);
      c_vca    += int'(ev[n].vca_wait);
      c_merge  += int'(ev[n].merge);
    end
  end

  function automatic int total_rx();
    int s;
    s = 0;
    for (int n = 0; n < NN; n++) s += k_pkts[n];
    return s;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int base [NN];
    int t0, expect_rx;
    string pname [3];
    pname = '{"transpose", "complement", "uniform"};
    c_dep = 0; c_arr = 0; c_spread = 0; c_multi = 0; c_rsv = 0; c_cred = 0; c_vca = 0; c_merge = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      for (int n = 0; n < NN; n++) base[n] = k_pkts[n];
      @(negedge clk);
      mode = m;
      quota += QUOTA;
      t0 = cycle;
      expect_rx = total_rx() + NN * QUOTA;
      while (total_rx() != expect_rx) @(posedge clk);
      repeat (20) @(posedge clk);
      check(total_rx() == expect_rx, $sformatf("%s: %0d packets arrived, %0d expected",
                                               pname[m], total_rx(), expect_rx));
      if (m < 2) begin
        for (int n = 0; n < NN; n++) begin
          check(k_pkts[n] - base[n] == QUOTA,
                $sformatf("%s: node %0d got %0d packets, %0d expected", pname[m], n,
                          k_pkts[n] - base[n], QUOTA));
        end
      end
      $display("%-10s: %0d packets in %0d cycles, accepted %0d flits/100 cycles/node",
               pname[m], NN * QUOTA, cycle - t0,
               (NN * QUOTA * PLEN * 100) / ((cycle - t0) * NN));
    end
    for (int n = 0; n < NN; n++) begin
      checks += k_checks[n];
      failures += k_err[n];
      check(k_minlat[n] >= 3, $sformatf("node %0d: body latency %0d below 3", n, k_minlat[n]));
    end
    $display("mechanism departure conflict : %0d", c_dep);
    $display("mechanism arrival conflict   : %0d", c_arr);
    $display("mechanism slot spreading     : %0d", c_spread);
    $display("mechanism write speed-up     : %0d", c_multi);
    $display("mechanism slot reservation   : %0d", c_rsv);
    $display("mechanism credit stall       : %0d", c_cred);
    $display("mechanism VC allocation wait : %0d", c_vca);
    $display("mechanism output merge       : %0d", c_merge);
    check(c_dep > 0, "no departure conflict");
    check(c_spread > 0, "no slot spreading");
    check(c_multi > 0, "no write speed-up");
    check(c_vca > 0, "no VC allocation wait");
    check(c_merge > 0, "no output merge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 300000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
