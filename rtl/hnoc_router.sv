// hnoc_router: heterogeneous shared-buffer (space-time-space) NoC router for a
// 2-D mesh.  Each of the five unidirectional input and output ports has its own
// link width in flits per clock (IP_PFC, OP_PFC) and its own number of VCs
// (IP_VC, OP_VC); all ports run on one clock.
//
// Flits are written into the per-VC input buffers (input_port), routed XY and
// given a VC of the next router (vc_allocator).  Every clock the time-stamping
// and allocation stage (ts_sba) picks up to IP_PFC flits per input port, gives
// each a departure time slot such that no output gets more than OP_PFC flits
// in one slot, and a shared buffer with a free cell in that slot.  The first
// crossbar writes them into the SB shared buffers, up to SPEEDUP flits per
// buffer per clock.  The buffers advance one slot per clock; the flits at slot
// 0 of all buffers go through the second crossbar (xb2_alloc, crossbar) to
// their output ports and are driven on the egress links one clock later
// (output_port), which also holds the credit counters of the downstream VCs.
//
// Latency of a flit through an idle router, counted from the clock edge that
// writes it into the input buffer: the head is routed at the next edge, gets
// its VC at the edge after, is stamped and written into slot 1 at the third
// edge, leaves the shared buffer in the following cycle and appears on the
// output link after the fourth edge.  Body flits of an open packet skip
// routing and VC allocation.
//
// Interface per port p: in_link[p][k] / out_link[p][k] are the flit lanes
// (lanes at or above the port's PFC are unused), in_cred[p][k] returns credits
// to the upstream router, out_cred[p][k] receives credits from the downstream
// router.  sb_disable masks defective shared buffers.  `events` pulses when a
// scheduling mechanism acts.
//
// The default sizes follow the document's evaluated router with four shared
// buffers and a write speed-up of two (32-bit flits); the per-port link widths
// and VC counts, the VC depth and the reservation size are this design's
// choices, because the document's tables of them are not reproduced.
module hnoc_router
  import hnoc_pkg::*;
#(
  parameter int IP_PFC [NP] = DEF_IP_PFC,
  parameter int IP_VC  [NP] = DEF_IP_VC,
  parameter int OP_PFC [NP] = DEF_OP_PFC,
  parameter int OP_VC  [NP] = DEF_OP_VC,
  parameter int SB       = 4,     // shared buffers
  parameter int SPEEDUP  = 2,     // shared-buffer write speed-up
  parameter int SB_DEPTH = 64,    // time slots per shared buffer
  parameter int VC_DEPTH = 8,     // flits per input VC (also downstream credits)
  parameter int RSV      = 2,     // shared-buffer cells reserved per input port
  localparam int CNW = $clog2(VC_DEPTH+1),
  localparam int CRW = $clog2(VC_DEPTH+1),
  localparam int PCW = $clog2(MAX_PFC+1),
  localparam int NL  = NP * MAX_PFC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COORD_W-1:0]  my_x,
  input  logic [COORD_W-1:0]  my_y,
  input  lane_t               in_link  [NP][MAX_PFC],
  output credit_t             in_cred  [NP][MAX_PFC],
  output lane_t               out_link [NP][MAX_PFC],
  input  credit_t             out_cred [NP][MAX_PFC],
  input  logic                sb_disable [SB],
  output events_t             events
);
  // request table
  logic            vca_req    [NP][MAX_VC];
  port_e           vca_port   [NP][MAX_VC];
  logic            vca_gnt    [NP][MAX_VC];
  logic [VC_W-1:0] vca_gnt_vc [NP][MAX_VC];
  logic            vc_active  [NP][MAX_VC];
  port_e           vc_oport   [NP][MAX_VC];
  logic [VC_W-1:0] vc_ovc     [NP][MAX_VC];
  logic [CNW-1:0]  vc_count   [NP][MAX_VC];
  flit_t           vc_peek    [NP][MAX_VC][MAX_PFC];
  logic [VC_W-1:0] deq_vc     [NP];
  logic [PCW-1:0]  deq_cnt    [NP];
  logic [CRW-1:0]  credits    [NP][MAX_VC];
  logic [PCW-1:0]  cons       [NP][MAX_VC];
  credit_t         release_vc [NP][MAX_PFC];
  logic            vca_wait;

  // shared buffers and crossbars
  cell_tag_t       sb_tags  [SB][SB_DEPTH];
  cell_t           sb_head  [SB];
  cell_tag_t       head_tag [SB];
  logic            sb_we    [SB][SPEEDUP];
  logic [$clog2(SB_DEPTH)-1:0] sb_wslot [SB][SPEEDUP];
  cell_tag_t       sb_wtag  [SB][SPEEDUP];
  logic [$clog2(NL)-1:0] xb1_sel [SB * SPEEDUP];
  logic            xb1_en   [SB * SPEEDUP];
  logic [$bits(flit_t)-1:0] xb1_in  [NL];
  logic [$bits(flit_t)-1:0] xb1_out [SB * SPEEDUP];
  logic [((SB > 1) ? $clog2(SB) : 1)-1:0] xb2_sel [NL];
  logic            xb2_en   [NL];
  logic [$bits(lane_t)-1:0] xb2_in  [SB];
  logic [$bits(lane_t)-1:0] xb2_out [NL];
  lane_t           xb_lane  [NP][MAX_PFC];
  logic            ev_merge;
  events_t         ev;

  // ---------------- ingress ----------------
  for (genvar p = 0; p < NP; p++) begin : g_in
    input_port #(.PFC(IP_PFC[p]), .NVC(IP_VC[p]), .DEPTH(VC_DEPTH)) u_in (
      .clk, .rst_n, .my_x, .my_y,
      .in_link    (in_link[p]),
      .cred_out   (in_cred[p]),
      .vca_req    (vca_req[p]),
      .vca_port   (vca_port[p]),
      .vca_gnt    (vca_gnt[p]),
      .vca_gnt_vc (vca_gnt_vc[p]),
      .vc_active  (vc_active[p]),
      .vc_oport   (vc_oport[p]),
      .vc_ovc     (vc_ovc[p]),
      .vc_count   (vc_count[p]),
      .vc_peek    (vc_peek[p]),
      .deq_vc     (deq_vc[p]),
      .deq_cnt    (deq_cnt[p])
    );
  end

  vc_allocator #(.IP_VC(IP_VC), .OP_VC(OP_VC)) u_vca (
    .clk, .rst_n,
    .req        (vca_req),
    .req_port   (vca_port),
    .gnt        (vca_gnt),
    .gnt_vc     (vca_gnt_vc),
    .release_vc (release_vc),
    .wait_any   (vca_wait)
  );

  ts_sba #(
    .IP_PFC(IP_PFC), .IP_VC(IP_VC), .OP_PFC(OP_PFC), .OP_VC(OP_VC),
    .SB(SB), .SPEEDUP(SPEEDUP), .DEPTH(SB_DEPTH),
    .VC_DEPTH(VC_DEPTH), .CRED(VC_DEPTH), .RSV(RSV)
  ) u_ts (
    .clk, .rst_n,
    .vc_active, .vc_oport, .vc_ovc, .vc_count, .vc_peek, .credits,
    .sb_tags, .sb_disable,
    .deq_vc, .deq_cnt,
    .sb_we, .sb_wslot, .sb_wtag,
    .xb1_sel, .xb1_en,
    .cons,
    .ev_dep_conflict (ev.dep_conflict),
    .ev_arr_conflict (ev.arr_conflict),
    .ev_spread       (ev.spread),
    .ev_multi_write  (ev.multi_write),
    .ev_rsv_block    (ev.rsv_block),
    .ev_credit_stall (ev.credit_stall)
  );

  // ---------------- first crossbar ----------------
  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < MAX_PFC; k++)
        xb1_in[p * MAX_PFC + k] = vc_peek[p][deq_vc[p]][k];
  end

  crossbar #(.NI(NL), .NO(SB * SPEEDUP), .W($bits(flit_t))) u_xb1 (
    .din (xb1_in), .sel (xb1_sel), .en (xb1_en), .dout (xb1_out)
  );

  // ---------------- shared buffers ----------------
  for (genvar b = 0; b < SB; b++) begin : g_sb
    cell_t wcell [SPEEDUP];
    always_comb
      for (int k = 0; k < SPEEDUP; k++) begin
        wcell[k].tag  = sb_wtag[b][k];
        wcell[k].flit = flit_t'(xb1_out[b * SPEEDUP + k]);
      end
    shared_buffer #(.DEPTH(SB_DEPTH), .SPEEDUP(SPEEDUP)) u_sb (
      .clk, .rst_n,
      .we    (sb_we[b]),
      .wslot (sb_wslot[b]),
      .wcell (wcell),
      .tags  (sb_tags[b]),
      .head  (sb_head[b])
    );
    assign head_tag[b] = sb_head[b].tag;
    assign xb2_in[b]   = {sb_head[b].tag.valid, sb_head[b].tag.ovc, sb_head[b].flit};
  end

  // ---------------- second crossbar and egress ----------------
  xb2_alloc #(.SB(SB), .OP_PFC(OP_PFC)) u_xb2a (
    .clk, .rst_n,
    .head_tag (head_tag),
    .sel      (xb2_sel),
    .en       (xb2_en),
    .merge    (ev_merge)
  );

  crossbar #(.NI(SB), .NO(NL), .W($bits(lane_t))) u_xb2 (
    .din (xb2_in), .sel (xb2_sel), .en (xb2_en), .dout (xb2_out)
  );

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int k = 0; k < MAX_PFC; k++) begin
        xb_lane[o][k] = lane_t'(xb2_out[o * MAX_PFC + k]);
        release_vc[o][k].valid = xb_lane[o][k].valid && is_tail(xb_lane[o][k].flit.ftype);
        release_vc[o][k].vc    = xb_lane[o][k].vc;
      end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    output_port #(.PFC(OP_PFC[o]), .NVC(OP_VC[o]), .CRED(VC_DEPTH)) u_out (
      .clk, .rst_n,
      .xb_lane  (xb_lane[o]),
      .out_link (out_link[o]),
      .cred_in  (out_cred[o]),
      .cons     (cons[o]),
      .credits  (credits[o])
    );
  end

  always_comb begin
    events          = ev;
    events.vca_wait = vca_wait;
    events.merge    = ev_merge;
  end

  assign ev.vca_wait = 1'b0;
  assign ev.merge    = 1'b0;
endmodule
