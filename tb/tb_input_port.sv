// tb_input_port: random packets of 1..5 flits on two VCs enter a two-lane
// input port.  The testbench plays the VC allocator (grants after a random
// delay, random output VC) and the time-stamping stage (removes up to two
// flits of a random ACTIVE VC, never past the tail).  It checks the route
// requested for every packet against XY routing, the output VC kept after the
// grant, every flit offered at the head against the sent packet, the return
// to routing after each tail, and one credit per removed flit a clock later.
module tb_input_port;
  import hnoc_pkg::*;
  localparam int PFC = 2, NVC = 2, DEPTH = 8, MYX = 2, MYY = 2, NPKT = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  lane_t   in_link  [MAX_PFC];
  credit_t cred_out [MAX_PFC];
  logic    vca_req [MAX_VC];
  port_e   vca_port [MAX_VC];
  logic    vca_gnt [MAX_VC];
  logic [VC_W-1:0] vca_gnt_vc [MAX_VC];
  logic    vc_active [MAX_VC];
  port_e   vc_oport [MAX_VC];
  logic [VC_W-1:0] vc_ovc [MAX_VC];
  logic [3:0] vc_count [MAX_VC];
  flit_t   vc_peek [MAX_VC][MAX_PFC];
  logic [VC_W-1:0] deq_vc;
  logic [1:0] deq_cnt;

  flit_t   q [NVC][$];        // flits expected in each VC, in order
  int      src_cr [NVC];
  int      src_left [NVC];
  int      src_seq [NVC];
  int      sent = 0, routed = 0, done_pkts = 0;
  int      granted_vc [NVC];
  int      exp_cred [NVC];
  int      checks = 0, failures = 0;

  input_port #(.PFC(PFC), .NVC(NVC), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .my_x(4'(MYX)), .my_y(4'(MYY)),
    .in_link, .cred_out, .vca_req, .vca_port, .vca_gnt, .vca_gnt_vc,
    .vc_active, .vc_oport, .vc_ovc, .vc_count, .vc_peek, .deq_vc, .deq_cnt);

  always #5 clk = ~clk;

  function automatic port_e xy(int dx, int dy);
    if (dx > MYX) return P_EAST;
    if (dx < MYX) return P_WEST;
    if (dy > MYY) return P_NORTH;
    if (dy < MYY) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    for (int v = 0; v < NVC; v++) begin
      src_cr[v] = DEPTH; src_left[v] = 0; src_seq[v] = 0; granted_vc[v] = 0; exp_cred[v] = 0;
    end
    for (int l = 0; l < MAX_PFC; l++) in_link[l] = '0;
    for (int v = 0; v < MAX_VC; v++) begin vca_gnt[v] = 1'b0; vca_gnt_vc[v] = '0; end
    deq_vc = '0; deq_cnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (done_pkts < NPKT) begin
      @(negedge clk);
      // credits returned for last clock's removals
      begin
        int got [NVC];
        for (int v = 0; v < NVC; v++) got[v] = 0;
        for (int l = 0; l < MAX_PFC; l++) if (cred_out[l].valid) got[cred_out[l].vc]++;
        for (int v = 0; v < NVC; v++) begin
          checks++;
          if (got[v] != exp_cred[v]) begin
            failures++;
            $display("vc %0d: %0d credits returned, expected %0d", v, got[v], exp_cred[v]);
          end
          src_cr[v] += got[v];
          exp_cred[v] = 0;
        end
      end
      // VC allocator: check the requested route, grant sometimes
      for (int v = 0; v < NVC; v++) begin
        vca_gnt[v] = 1'b0;
        if (vca_req[v]) begin
          checks++;
          if (q[v].size() == 0 || !is_head(q[v][0].ftype) ||
              vca_port[v] != xy(int'(q[v][0].data[3:0]), int'(q[v][0].data[7:4]))) begin
            failures++;
            $display("vc %0d: route request %s wrong", v, vca_port[v].name());
          end
          if ($urandom % 3 == 0) begin
            vca_gnt[v] = 1'b1;
            granted_vc[v] = int'($urandom % 4);
            vca_gnt_vc[v] = VC_W'(granted_vc[v]);
            routed++;
          end
        end
      end
      // time-stamping stage: remove flits of one ACTIVE VC
      deq_cnt = '0;
      begin
        int v, n;
        v = int'($urandom % NVC);
        deq_vc = VC_W'(v);
        if (vc_active[v]) begin
          checks++;
          if (int'(vc_ovc[v]) != granted_vc[v] || int'(vc_count[v]) != q[v].size()) begin
            failures++;
            $display("vc %0d: ovc %0d (exp %0d) count %0d (exp %0d)", v, vc_ovc[v], granted_vc[v],
                     vc_count[v], q[v].size());
          end
          n = int'($urandom % 3);
          for (int k = 0; k < n; k++)
            if (k >= q[v].size() || (k > 0 && is_tail(q[v][k-1].ftype))) begin n = k; break; end
          for (int k = 0; k < n; k++) begin
            checks++;
            if (vc_peek[v][k] != q[v][k]) begin
              failures++;
              $display("vc %0d peek %0d: %h expected %h", v, k, vc_peek[v][k], q[v][k]);
            end
          end
          deq_cnt = 2'(n);
        end
      end
      // source
      for (int l = 0; l < MAX_PFC; l++) begin
        in_link[l] = '0;
        if ($urandom % 2) begin
          int v;
          v = int'($urandom % NVC);
          if (src_cr[v] > 0 && (src_left[v] > 0 || sent < NPKT)) begin
            if (src_left[v] == 0) begin src_left[v] = 1 + int'($urandom % 5); src_seq[v] = 0; sent++; end
            in_link[l].valid = 1'b1;
            in_link[l].vc = VC_W'(v);
            in_link[l].flit.ftype = (src_left[v] == 1) ? ((src_seq[v] == 0) ? FT_SINGLE : FT_TAIL)
                                                       : ((src_seq[v] == 0) ? FT_HEAD : FT_BODY);
            in_link[l].flit.data = {$urandom} & 32'hFFFF_FF00;
            in_link[l].flit.data[7:0] = 8'($urandom % 5) | (8'($urandom % 5) << 4);
            src_left[v]--; src_seq[v]++; src_cr[v]--;
          end
        end
      end
      @(posedge clk);
      #1;
      begin
        int v;
        v = int'(deq_vc);
        for (int k = 0; k < int'(deq_cnt); k++) begin
          if (is_tail(q[v][0].ftype)) done_pkts++;
          void'(q[v].pop_front());
        end
        exp_cred[v] = int'(deq_cnt);
      end
      for (int l = 0; l < MAX_PFC; l++) if (in_link[l].valid) q[in_link[l].vc].push_back(in_link[l].flit);
    end
    checks++;
    if (routed != NPKT) begin
      failures++;
      $display("%0d packets routed, expected %0d", routed, NPKT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
