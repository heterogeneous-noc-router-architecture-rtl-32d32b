// tb_ts_sba: test of time stamping and shared-buffer allocation with two
// 16-slot shared buffers and a write speed-up of two (so write ports, not
// only cells, can run out).  The testbench keeps its own model of the shared
// buffers (it applies the unit's writes and advances the slots every clock).
//
// Directed cases, each from reset and empty buffers, with expected slots and
// buffers worked out by hand:
//   A  2 flits, 2-flit input to 1-flit output: slots 1 and 2, both buffer 0
//   B  2 flits to the 2-flit output: slot 1, buffers 0 and 1
//   C  slot 1 already full for the output: the flit goes to slot 2
//   D  four inputs at once: five write ports' worth of flits, one must wait
//   E  one input holds nearly all cells: it is blocked, another is not
//   F  no credit: nothing is taken
// Then a random phase checks, every clock: writes go to free cells of enabled
// buffers at slot >= 1; no slot holds more flits for an output than its
// width; per input, flits taken = flits written, at most IP_PFC, never past a
// tail; each VC's flits depart in order (time, then buffer index); credits
// spent match the writes and never exceed the credits.
module tb_ts_sba;
  import hnoc_pkg::*;
  localparam int SB = 2, SU = 2, D = 16, VCD = 8, RSV = 2;
  localparam int IPP [NP] = DEF_IP_PFC;
  localparam int IPV [NP] = DEF_IP_VC;
  localparam int OPP [NP] = DEF_OP_PFC;
  localparam int OPV [NP] = DEF_OP_VC;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            vc_active [NP][MAX_VC];
  port_e           vc_oport  [NP][MAX_VC];
  logic [VC_W-1:0] vc_ovc    [NP][MAX_VC];
  logic [3:0]      vc_count  [NP][MAX_VC];
  flit_t           vc_peek   [NP][MAX_VC][MAX_PFC];
  logic [3:0]      credits   [NP][MAX_VC];
  cell_tag_t       sb_tags   [SB][D];
  logic            sb_disable [SB];
  logic [VC_W-1:0] deq_vc  [NP];
  logic [1:0]      deq_cnt [NP];
  logic            sb_we   [SB][SU];
  logic [3:0]      sb_wslot [SB][SU];
  cell_tag_t       sb_wtag [SB][SU];
  logic [3:0]      xb1_sel [SB * SU];
  logic            xb1_en  [SB * SU];
  logic [1:0]      cons [NP][MAX_VC];
  logic ev_dep, ev_arr, ev_spread, ev_mw, ev_rsv, ev_cs;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  // order record per input VC: absolute departure time and buffer of last flit
  int   last_time [NP][MAX_VC];
  int   last_buf  [NP][MAX_VC];
  int   evc [6];

  ts_sba #(.SB(SB), .SPEEDUP(SU), .DEPTH(D), .VC_DEPTH(VCD), .CRED(VCD), .RSV(RSV)) dut (
    .clk, .rst_n, .vc_active, .vc_oport, .vc_ovc, .vc_count, .vc_peek, .credits,
    .sb_tags, .sb_disable, .deq_vc, .deq_cnt, .sb_we, .sb_wslot, .sb_wtag,
    .xb1_sel, .xb1_en, .cons,
    .ev_dep_conflict (ev_dep), .ev_arr_conflict (ev_arr), .ev_spread (ev_spread),
    .ev_multi_write (ev_mw), .ev_rsv_block (ev_rsv), .ev_credit_stall (ev_cs));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    $display("[%0d] %s", cyc, msg);
  endtask

  task automatic clear_inputs();
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < MAX_VC; v++) begin
        vc_active[p][v] = 1'b0; vc_oport[p][v] = P_LOCAL; vc_ovc[p][v] = '0;
        vc_count[p][v] = '0; credits[p][v] = 4'(VCD);
        for (int k = 0; k < MAX_PFC; k++) vc_peek[p][v][k] = '{ftype: FT_BODY, data: 32'(k)};
        last_time[p][v] = -1; last_buf[p][v] = -1;
      end
    for (int b = 0; b < SB; b++) begin
      sb_disable[b] = 1'b0;
      for (int t = 0; t < D; t++) sb_tags[b][t] = '0;
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    clear_inputs();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic set_vc(int p, int v, port_e o, int ov, int cnt, int tail_at = -1);
    vc_active[p][v] = 1'b1; vc_oport[p][v] = o; vc_ovc[p][v] = VC_W'(ov);
    vc_count[p][v] = 4'(cnt);
    for (int k = 0; k < MAX_PFC; k++)
      vc_peek[p][v][k].ftype = (k == tail_at) ? FT_TAIL : FT_BODY;
  endtask

  // expect write k of buffer b at slot s from input p
  function automatic logic has_write(int b, int s, int p);
    for (int k = 0; k < SU; k++)
      if (sb_we[b][k] && int'(sb_wslot[b][k]) == s && int'(sb_wtag[b][k].src) == p) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int nwrites();
    int n;
    n = 0;
    for (int b = 0; b < SB; b++) for (int k = 0; k < SU; k++) if (sb_we[b][k]) n++;
    return n;
  endfunction

  // Apply this clock's writes to the buffer model and advance it.  The writes
  // are sampled before the clock edge.
  task automatic advance();
    logic      we_s [SB][SU];
    logic [3:0] sl_s [SB][SU];
    cell_tag_t tg_s [SB][SU];
    for (int b = 0; b < SB; b++)
      for (int k = 0; k < SU; k++) begin
        we_s[b][k] = sb_we[b][k]; sl_s[b][k] = sb_wslot[b][k]; tg_s[b][k] = sb_wtag[b][k];
      end
    @(posedge clk);
    #1;
    for (int b = 0; b < SB; b++) begin
      for (int k = 0; k < SU; k++)
        if (we_s[b][k]) sb_tags[b][sl_s[b][k]] = tg_s[b][k];
      for (int t = 0; t < D - 1; t++) sb_tags[b][t] = sb_tags[b][t + 1];
      sb_tags[b][D - 1] = '0;
    end
  endtask

  // Properties checked in every clock of the random phase.
  task automatic check_clock();
    int dep [D][NP];
    int src_n [NP];
    int cons_m [NP][MAX_VC];
    for (int t = 0; t < D; t++) for (int o = 0; o < NP; o++) dep[t][o] = 0;
    for (int p = 0; p < NP; p++) begin
      src_n[p] = 0;
      for (int v = 0; v < MAX_VC; v++) cons_m[p][v] = 0;
    end
    for (int b = 0; b < SB; b++)
      for (int t = 0; t < D; t++) if (sb_tags[b][t].valid) dep[t][sb_tags[b][t].oport]++;
    for (int b = 0; b < SB; b++)
      for (int k = 0; k < SU; k++) if (sb_we[b][k]) begin
        int s, p, v;
        s = int'(sb_wslot[b][k]); p = int'(sb_wtag[b][k].src); v = int'(deq_vc[p]);
        checks++;
        if (s == 0 || sb_tags[b][s].valid || sb_disable[b]) fail($sformatf("write to buffer %0d slot %0d not allowed", b, s));
        for (int j = k + 1; j < SU; j++)
          if (sb_we[b][j] && sb_wslot[b][j] == sb_wslot[b][k]) fail("two writes to one cell");
        dep[s][sb_wtag[b][k].oport]++;
        src_n[p]++;
        cons_m[sb_wtag[b][k].oport][sb_wtag[b][k].ovc]++;
        checks++;
        if (sb_wtag[b][k].oport != vc_oport[p][v] || sb_wtag[b][k].ovc != vc_ovc[p][v])
          fail("written tag does not match the VC's route");
        checks++;
        if (!xb1_en[b * SU + k] || int'(xb1_sel[b * SU + k]) / MAX_PFC != p)
          fail("first-crossbar select does not name the source port");
      end
    for (int t = 1; t < D; t++)
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (dep[t][o] > OPP[o]) fail($sformatf("slot %0d holds %0d flits for output %0d", t, dep[t][o], o));
      end
    for (int p = 0; p < NP; p++) begin
      int v;
      v = int'(deq_vc[p]);
      checks++;
      if (int'(deq_cnt[p]) != src_n[p] || src_n[p] > IPP[p] ||
          (src_n[p] > 0 && (!vc_active[p][v] || src_n[p] > int'(vc_count[p][v]))))
        fail($sformatf("input %0d: took %0d, wrote %0d", p, deq_cnt[p], src_n[p]));
      for (int k = 0; k + 1 < int'(deq_cnt[p]); k++)
        if (is_tail(vc_peek[p][v][k].ftype)) fail("flit taken past a tail");
      // order: k-th flit of this input is the one with xb1_sel = p*MAX_PFC+k
      for (int k = 0; k < int'(deq_cnt[p]); k++)
        for (int b = 0; b < SB; b++)
          for (int j = 0; j < SU; j++)
            if (sb_we[b][j] && int'(xb1_sel[b * SU + j]) == p * MAX_PFC + k) begin
              int at;
              at = cyc + int'(sb_wslot[b][j]);
              checks++;
              if (at < last_time[p][v] || (at == last_time[p][v] && b <= last_buf[p][v]))
                fail($sformatf("input %0d vc %0d k %0d slot %0d: flit out of order (time %0d buf %0d after %0d/%0d)", p, v, k, sb_wslot[b][j],
                               at, b, last_time[p][v], last_buf[p][v]));
              last_time[p][v] = at; last_buf[p][v] = b;
            end
      if (int'(deq_cnt[p]) > 0 && is_tail(vc_peek[p][v][int'(deq_cnt[p]) - 1].ftype)) begin
        last_time[p][v] = -1; last_buf[p][v] = -1;
      end
    end
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < OPV[o]; v++) begin
        checks++;
        if (int'(cons[o][v]) != cons_m[o][v] || cons_m[o][v] > int'(credits[o][v]))
          fail($sformatf("out %0d vc %0d: cons %0d, writes %0d, credits %0d", o, v, cons[o][v], cons_m[o][v], credits[o][v]));
      end
  endtask

  always @(negedge clk) if (rst_n) begin
    #2;
    if (ev_dep) evc[0]++;
    if (ev_arr) evc[1]++;
    if (ev_spread) evc[2]++;
    if (ev_mw) evc[3]++;
    if (ev_rsv) evc[4]++;
    if (ev_cs) evc[5]++;
  end

  initial begin
    for (int i = 0; i < 6; i++) evc[i] = 0;
    clear_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // A: spreading over two slots, both in buffer 0 (speed-up 2)
    do_reset();
    set_vc(0, 1, P_NORTH, 0, 2);
    #1;
    checks++;
    if (!(has_write(0, 1, 0) && has_write(0, 2, 0) && nwrites() == 2 && deq_cnt[0] == 2 &&
          deq_vc[0] == 1 && ev_spread && ev_mw))
      fail("case A: expected slots 1 and 2 in buffer 0");

    // B: two flits to the two-flit output share slot 1
    do_reset();
    set_vc(0, 0, P_EAST, 1, 2);
    #1;
    checks++;
    if (!(has_write(0, 1, 0) && has_write(1, 1, 0) && nwrites() == 2 && !ev_spread &&
          cons[P_EAST][1] == 2))
      fail("case B: expected slot 1 in buffers 0 and 1");
    // the first flit (lane 0) must be in the lower buffer
    checks++;
    if (xb1_sel[0] != 4'd0 || xb1_sel[SU] != 4'd1) fail("case B: flit order across buffers");

    // C: departure conflict pushes the flit to slot 2
    do_reset();
    sb_tags[1][1] = '{valid: 1'b1, oport: PORT_W'(P_SOUTH), ovc: '0, src: PORT_W'(4)};
    set_vc(2, 2, P_SOUTH, 1, 1);
    #1;
    checks++;
    if (!(has_write(0, 2, 2) && nwrites() == 1 && ev_dep)) fail("case C: expected slot 2");

    // D: six flits, only five fit before write ports run out at slot 2
    do_reset();
    set_vc(0, 0, P_EAST, 0, 2);
    set_vc(1, 0, P_SOUTH, 0, 1);
    set_vc(2, 0, P_WEST, 0, 1);
    set_vc(3, 0, P_LOCAL, 0, 1);
    set_vc(4, 0, P_NORTH, 0, 1);
    #1;
    checks++;
    if (!(nwrites() == 4 && ev_arr)) fail($sformatf("case D: %0d writes, arrival conflict %0d", nwrites(), ev_arr));

    // E: input 1 holds 29 of the 30 cells: blocked; input 3 holds none: admitted
    do_reset();
    begin
      int n;
      n = 0;
      for (int b = 0; b < SB; b++)
        for (int t = 1; t < D; t++)
          if (n < 29) begin
            sb_tags[b][t] = '{valid: 1'b1, oport: PORT_W'(t % NP), ovc: '0, src: PORT_W'(1)};
            n++;
          end
    end
    set_vc(1, 0, P_WEST, 1, 1);
    #1;
    checks++;
    if (!(nwrites() == 0 && ev_rsv)) fail("case E: reservation did not block input 1");
    set_vc(3, 1, P_NORTH, 1, 1);
    #1;
    checks++;
    if (!(nwrites() == 1 && deq_cnt[3] == 1 && deq_cnt[1] == 0)) fail("case E: input 3 not admitted");

    // F: no credit
    do_reset();
    set_vc(4, 1, P_EAST, 1, 1);
    credits[P_EAST][1] = '0;
    #1;
    checks++;
    if (!(nwrites() == 0 && ev_cs)) fail("case F: flit taken without credit");

    // random phase
    do_reset();
    for (int it = 0; it < 3000; it++) begin
      int cr_left [NP][MAX_VC];
      // random request table (VC count and flits), credits
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < IPV[p]; v++) begin
          if (!vc_active[p][v] && $urandom % 3 == 0) begin
            vc_active[p][v] = 1'b1;
            vc_oport[p][v]  = port_e'($urandom % NP);
            vc_ovc[p][v]    = VC_W'($urandom % OPV[vc_oport[p][v]]);
          end
          vc_count[p][v] = 4'($urandom % 5);
          for (int k = 0; k < MAX_PFC; k++)
            vc_peek[p][v][k].ftype = ($urandom % 6 == 0) ? FT_TAIL : FT_BODY;
        end
      // each output VC belongs to at most one input VC
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < MAX_VC; v++) cr_left[o][v] = 0;
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < IPV[p]; v++)
          if (vc_active[p][v]) begin
            if (cr_left[vc_oport[p][v]][vc_ovc[p][v]] != 0) vc_active[p][v] = 1'b0;
            else cr_left[vc_oport[p][v]][vc_ovc[p][v]] = 1;
          end
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < MAX_VC; v++) credits[o][v] = 4'($urandom % 4);
      sb_disable[1] = (it >= 2000 && it < 2300);
      #1;
      check_clock();
      // retire VCs whose tail was taken, after the clock edge
      begin
        logic retire [NP];
        int   rv [NP];
        for (int p = 0; p < NP; p++) begin
          rv[p] = int'(deq_vc[p]);
          retire[p] = deq_cnt[p] != 0 && is_tail(vc_peek[p][rv[p]][int'(deq_cnt[p]) - 1].ftype);
        end
        advance();
        for (int p = 0; p < NP; p++) if (retire[p]) vc_active[p][rv[p]] = 1'b0;
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (evc[i] == 0) fail($sformatf("event %0d never seen", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
