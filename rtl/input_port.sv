// input_port: one ingress port of the router: the VC-segmented input buffer,
// the route computation (RC) of each VC and the per-VC packet state.
//
// Flits arrive on up to PFC lanes per clock and are written into their VC's
// FIFO (vc_buffer).  Each VC then moves through three states:
//   IDLE   - no routed packet; when a head flit reaches the front, its output
//            port is computed (route_xy) and registered  -> WAIT
//   WAIT   - the head asks the VC allocator for a VC on that output; the grant
//            is registered                                -> ACTIVE
//   ACTIVE - the VC's flits are offered to the time-stamping stage, which
//            removes up to PFC of them per clock (deq_vc, deq_cnt); removing
//            the tail returns the VC to IDLE.
// Flits stay in this buffer until they are written into a shared buffer, as in
// the document.  For every flit removed, one credit (with its VC id) is sent
// upstream one clock later on the credit lanes.
// So a head flit written at edge n is routed at edge n+1, gets its output VC at
// edge n+2 at the earliest and can be time-stamped in the cycle after.
module input_port
  import hnoc_pkg::*;
#(
  parameter int PFC   = 2,
  parameter int NVC   = 2,
  parameter int DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [COORD_W-1:0]     my_x,
  input  logic [COORD_W-1:0]     my_y,
  input  lane_t                  in_link  [MAX_PFC],
  output credit_t                cred_out [MAX_PFC],
  // VC allocation
  output logic                   vca_req    [MAX_VC],
  output port_e                  vca_port   [MAX_VC],
  input  logic                   vca_gnt    [MAX_VC],
  input  logic [VC_W-1:0]        vca_gnt_vc [MAX_VC],
  // request table seen by the time-stamping stage
  output logic                   vc_active [MAX_VC],
  output port_e                  vc_oport  [MAX_VC],
  output logic [VC_W-1:0]        vc_ovc    [MAX_VC],
  output logic [$clog2(DEPTH+1)-1:0] vc_count [MAX_VC],
  output flit_t                  vc_peek   [MAX_VC][MAX_PFC],
  input  logic [VC_W-1:0]        deq_vc,
  input  logic [$clog2(MAX_PFC+1)-1:0] deq_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACTIVE} vcst_e;

  vcst_e           st    [NVC];
  port_e           rport [NVC];
  logic [VC_W-1:0] ovc   [NVC];
  port_e           rc    [NVC];

  vc_buffer #(.PFC(PFC), .NVC(NVC), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .wr     (in_link),
    .rd_vc  (deq_vc),
    .rd_cnt (deq_cnt),
    .count  (vc_count),
    .peek   (vc_peek)
  );

  for (genvar v = 0; v < NVC; v++) begin : g_rc
    route_xy u_rc (
      .my_x, .my_y,
      .dst_x (vc_peek[v][0].data[COORD_W-1:0]),
      .dst_y (vc_peek[v][0].data[2*COORD_W-1:COORD_W]),
      .oport (rc[v])
    );
  end

  // The last flit taken from the dequeued VC this cycle.
  flit_t last_deq;
  always_comb begin
    last_deq = '0;
    for (int k = 0; k < MAX_PFC; k++)
      if (k < PFC && int'(deq_cnt) == k + 1) last_deq = vc_peek[deq_vc][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        st[v]    <= S_IDLE;
        rport[v] <= P_LOCAL;
        ovc[v]   <= '0;
      end
    end else begin
      for (int v = 0; v < NVC; v++) begin
        unique case (st[v])
          S_IDLE:   if (vc_count[v] != 0) begin
                      rport[v] <= rc[v];
                      st[v]    <= S_WAIT;
                    end
          S_WAIT:   if (vca_gnt[v]) begin
                      ovc[v] <= vca_gnt_vc[v];
                      st[v]  <= S_ACTIVE;
                    end
          S_ACTIVE: if (int'(deq_vc) == v && deq_cnt != 0 && is_tail(last_deq.ftype))
                      st[v] <= S_IDLE;
          default:  st[v] <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    for (int v = 0; v < MAX_VC; v++) begin
      vca_req[v]   = 1'b0;
      vca_port[v]  = P_LOCAL;
      vc_active[v] = 1'b0;
      vc_oport[v]  = P_LOCAL;
      vc_ovc[v]    = '0;
      if (v < NVC) begin
        vca_req[v]   = (st[v] == S_WAIT);
        vca_port[v]  = rport[v];
        vc_active[v] = (st[v] == S_ACTIVE);
        vc_oport[v]  = rport[v];
        vc_ovc[v]    = ovc[v];
      end
    end
  end

  // One credit per removed flit, returned a cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAX_PFC; k++) cred_out[k] <= '0;
    end else begin
      for (int k = 0; k < MAX_PFC; k++) begin
        cred_out[k].valid <= (k < int'(deq_cnt));
        cred_out[k].vc    <= deq_vc;
      end
    end
  end

  // Flits are only taken from an ACTIVE VC, and never past a packet's tail.
  a_deq_active: assert property (@(posedge clk) disable iff (!rst_n)
    deq_cnt != 0 |-> (int'(deq_vc) < NVC && st[deq_vc] == S_ACTIVE));
  // A flit reaching the front of an IDLE VC must be a head flit.
  for (genvar v = 0; v < NVC; v++) begin : g_hchk
    a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
      (st[v] == S_IDLE && vc_count[v] != 0) |-> is_head(vc_peek[v][0].ftype));
  end
endmodule
