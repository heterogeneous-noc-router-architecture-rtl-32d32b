// ts_sba: time stamping (TS) and shared-buffer allocation (SBA), the heart of
// the router.  It decides every clock which flits leave the input buffers, in
// which time slot each will depart and which shared buffer stores it.
//
// Time stamping.  The input ports are visited in a cyclic order whose first
// port advances by one every clock (fairness).  For each input port one VC
// wins (round robin among the VCs that have flits, an output VC and a credit).
// Up to IP_PFC[p] flits of that VC, never past a packet's tail, are then
// stamped one after the other with the earliest time slot t that
//   - is not earlier than the slot of the previous flit of the same VC
//     (packet order), and at least 1,
//   - holds fewer than OP_PFC[o] flits for the flit's output o, counting the
//     flits already stored and those placed this clock (departure conflict),
//   - has a free cell in at least one enabled shared buffer.
// A slot skipped because its output was full is a departure conflict.  When
// the input port is wider than the output (IP_PFC > OP_PFC) this spreads its
// flits over several slots.
//
// Allocation.  The stamped flit goes to the lowest-index shared buffer whose
// cell at that slot is free, that has a write port left (at most SPEEDUP
// writes per buffer per clock) and, if the previous flit of the same VC is in
// the same slot, whose index is above that flit's buffer, so the second
// crossbar emits them in order.  If no buffer qualifies (arrival conflict) the
// flit and the rest of that VC's flits stay in the input buffer and are
// stamped again next clock.
//
// Reservation.  Every input port keeps RSV cells of the shared buffers: a
// port that already holds RSV cells or more may take a cell only while more
// cells are free than the other ports' unused reservations.
//
// Credits.  A flit is accepted only if its output VC has a credit left; the
// credits spent are reported per output VC (cons).
//
// The document places TS and SBA in two pipeline stages; here both are
// resolved in the same clock, and the write into the shared buffers (first
// crossbar) happens at the end of that clock.  Everything above is
// combinational, from the state at the start of the clock, except the start
// port, the round-robin pointers and the per-VC order records.  Disabled
// (defective) shared buffers are never allocated.
module ts_sba
  import hnoc_pkg::*;
#(
  parameter int IP_PFC [NP] = DEF_IP_PFC,
  parameter int IP_VC  [NP] = DEF_IP_VC,
  parameter int OP_PFC [NP] = DEF_OP_PFC,
  parameter int OP_VC  [NP] = DEF_OP_VC,
  parameter int SB       = 4,
  parameter int SPEEDUP  = 2,
  parameter int DEPTH    = 64,
  parameter int VC_DEPTH = 8,
  parameter int CRED     = 8,
  parameter int RSV      = 2,
  localparam int SW  = $clog2(DEPTH),
  localparam int CNW = $clog2(VC_DEPTH+1),
  localparam int CRW = $clog2(CRED+1),
  localparam int NI  = NP * MAX_PFC,
  localparam int XSW = $clog2(NI),
  localparam int PCW = $clog2(MAX_PFC+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // request table
  input  logic            vc_active [NP][MAX_VC],
  input  port_e           vc_oport  [NP][MAX_VC],
  input  logic [VC_W-1:0] vc_ovc    [NP][MAX_VC],
  input  logic [CNW-1:0]  vc_count  [NP][MAX_VC],
  input  flit_t           vc_peek   [NP][MAX_VC][MAX_PFC],
  input  logic [CRW-1:0]  credits   [NP][MAX_VC],
  // shared buffer state
  input  cell_tag_t       sb_tags   [SB][DEPTH],
  input  logic            sb_disable [SB],
  // decisions
  output logic [VC_W-1:0] deq_vc    [NP],
  output logic [PCW-1:0]  deq_cnt   [NP],
  output logic            sb_we     [SB][SPEEDUP],
  output logic [SW-1:0]   sb_wslot  [SB][SPEEDUP],
  output cell_tag_t       sb_wtag   [SB][SPEEDUP],
  output logic [XSW-1:0]  xb1_sel   [SB * SPEEDUP],
  output logic            xb1_en    [SB * SPEEDUP],
  output logic [PCW-1:0]  cons      [NP][MAX_VC],
  output logic            ev_dep_conflict,
  output logic            ev_arr_conflict,
  output logic            ev_spread,
  output logic            ev_multi_write,
  output logic            ev_rsv_block,
  output logic            ev_credit_stall
);
  logic [PORT_W-1:0] start_q;
  logic [VC_W-1:0]   rr_q    [NP];
  logic [SW-1:0]     last_t_q [NP][MAX_VC];
  int                last_b_q [NP][MAX_VC];

  // per-VC order record after this clock's decisions
  logic              upd     [NP];
  int                upd_t   [NP];
  int                upd_b   [NP];
  logic              upd_tail[NP];

  // working tables
  int     dep   [DEPTH][NP];
  logic   busy  [SB][DEPTH];
  int     wcnt  [SB];
  int     occ   [NP];
  int     cred  [NP][MAX_VC];

  always_comb begin
    int total, cap, p, win, o, ov, lt, lb, n, first_t, tsel, bsel, unused;
    logic stop, dfull, found, anyfree;

    ev_dep_conflict = 1'b0;
    ev_arr_conflict = 1'b0;
    ev_spread       = 1'b0;
    ev_multi_write  = 1'b0;
    ev_rsv_block    = 1'b0;
    ev_credit_stall = 1'b0;
    total = 0; cap = 0; p = 0; win = 0; o = 0; ov = 0; lt = 0; lb = 0; n = 0;
    first_t = 0; tsel = 0; bsel = 0; unused = 0;
    stop = 1'b0; dfull = 1'b0; found = 1'b0; anyfree = 1'b0;

    for (int b = 0; b < SB; b++) begin
      wcnt[b] = 0;
      for (int k = 0; k < SPEEDUP; k++) begin
        sb_we[b][k]    = 1'b0;
        sb_wslot[b][k] = '0;
        sb_wtag[b][k]  = '0;
        xb1_sel[b * SPEEDUP + k] = '0;
        xb1_en[b * SPEEDUP + k]  = 1'b0;
      end
    end
    for (int q = 0; q < NP; q++) begin
      deq_vc[q]  = '0;
      deq_cnt[q] = '0;
      upd[q] = 1'b0; upd_t[q] = 0; upd_b[q] = 0; upd_tail[q] = 1'b0;
      occ[q] = 0;
      for (int v = 0; v < MAX_VC; v++) begin
        cons[q][v] = '0;
        cred[q][v] = int'(credits[q][v]);
      end
    end

    // occupancy tables from the shared buffers
    for (int t = 0; t < DEPTH; t++)
      for (int q = 0; q < NP; q++) dep[t][q] = 0;
    for (int b = 0; b < SB; b++) begin
      if (!sb_disable[b]) cap = cap + DEPTH - 1;
      for (int t = 0; t < DEPTH; t++) begin
        busy[b][t] = sb_disable[b] || (t == 0) || sb_tags[b][t].valid;
        if (sb_tags[b][t].valid) begin
          dep[t][sb_tags[b][t].oport] = dep[t][sb_tags[b][t].oport] + 1;
          if (!sb_disable[b]) begin
            occ[sb_tags[b][t].src] = occ[sb_tags[b][t].src] + 1;
            total = total + 1;
          end
        end
      end
    end

    for (int i = 0; i < NP; i++) begin
      p = (int'(start_q) + i) % NP;
      // VC arbitration: round robin from rr_q
      win = -1;
      for (int j = MAX_VC - 1; j >= 0; j--) begin
        int v;
        v = (int'(rr_q[p]) + j) % IP_VC[p];
        if (j < IP_VC[p] && vc_active[p][v] && vc_count[p][v] != 0) begin
          if (cred[vc_oport[p][v]][vc_ovc[p][v]] > 0) win = v;
          else ev_credit_stall = 1'b1;
        end
      end
      if (win >= 0) begin
        o  = int'(vc_oport[p][win]);
        ov = int'(vc_ovc[p][win]);
        lt = int'(last_t_q[p][win]);
        lb = last_b_q[p][win];
        n = 0; first_t = -1; stop = 1'b0;
        for (int k = 0; k < MAX_PFC; k++) begin
          if (k < IP_PFC[p] && !stop && k < int'(vc_count[p][win]) && cred[o][ov] > 0) begin
            // reservation of the other ports
            unused = 0;
            for (int q = 0; q < NP; q++)
              if (q != p && occ[q] < RSV) unused = unused + RSV - occ[q];
            if (!(occ[p] < RSV || (cap - total - unused) > 0)) begin
              ev_rsv_block = 1'b1;
              stop = 1'b1;
            end else begin
              // time stamping: earliest slot free of departure conflict
              found = 1'b0; dfull = 1'b0; tsel = 0;
              for (int t = 1; t < DEPTH; t++) begin
                if (!found && t >= lt) begin
                  anyfree = 1'b0;
                  for (int b = 0; b < SB; b++) if (!busy[b][t]) anyfree = 1'b1;
                  if (dep[t][o] >= OP_PFC[o]) dfull = 1'b1;
                  else if (anyfree) begin
                    found = 1'b1;
                    tsel  = t;
                  end
                end
              end
              if (found && dfull) ev_dep_conflict = 1'b1;
              // shared-buffer allocation: lowest free buffer, write ports, order
              bsel = -1;
              if (found)
                for (int b = SB - 1; b >= 0; b--)
                  if (!busy[b][tsel] && wcnt[b] < SPEEDUP && (tsel != lt || b > lb))
                    bsel = b;
              if (!found) stop = 1'b1;
              else if (bsel < 0) begin
                ev_arr_conflict = 1'b1;
                stop = 1'b1;
              end else begin
                sb_we[bsel][wcnt[bsel]]          = 1'b1;
                sb_wslot[bsel][wcnt[bsel]]       = SW'(tsel);
                sb_wtag[bsel][wcnt[bsel]].valid  = 1'b1;
                sb_wtag[bsel][wcnt[bsel]].oport  = PORT_W'(o);
                sb_wtag[bsel][wcnt[bsel]].ovc    = VC_W'(ov);
                sb_wtag[bsel][wcnt[bsel]].src    = PORT_W'(p);
                xb1_sel[bsel * SPEEDUP + wcnt[bsel]] = XSW'(p * MAX_PFC + k);
                xb1_en[bsel * SPEEDUP + wcnt[bsel]]  = 1'b1;
                wcnt[bsel]     = wcnt[bsel] + 1;
                busy[bsel][tsel] = 1'b1;
                dep[tsel][o]   = dep[tsel][o] + 1;
                occ[p]         = occ[p] + 1;
                total          = total + 1;
                cred[o][ov]    = cred[o][ov] - 1;
                if (first_t < 0) first_t = tsel;
                else if (tsel != first_t) ev_spread = 1'b1;
                lt = tsel; lb = bsel;
                n = n + 1;
                if (is_tail(vc_peek[p][win][k].ftype)) begin
                  stop = 1'b1;
                  upd_tail[p] = 1'b1;
                end
              end
            end
          end
        end
        deq_vc[p]  = VC_W'(win);
        deq_cnt[p] = PCW'(n);
        cons[o][ov] = PCW'(n);
        if (n > 0) begin
          upd[p] = 1'b1; upd_t[p] = lt; upd_b[p] = lb;
        end
      end
    end
    for (int b = 0; b < SB; b++) if (wcnt[b] > 1) ev_multi_write = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= '0;
      for (int q = 0; q < NP; q++) begin
        rr_q[q] <= '0;
        for (int v = 0; v < MAX_VC; v++) begin
          last_t_q[q][v] <= '0;
          last_b_q[q][v] <= -1;
        end
      end
    end else begin
      start_q <= (int'(start_q) == NP - 1) ? '0 : start_q + 1'b1;
      for (int q = 0; q < NP; q++) begin
        if (upd[q]) rr_q[q] <= VC_W'((int'(deq_vc[q]) + 1) % IP_VC[q]);
        for (int v = 0; v < MAX_VC; v++) begin
          if (upd[q] && int'(deq_vc[q]) == v) begin
            last_t_q[q][v] <= upd_tail[q] ? '0 : SW'(upd_t[q] - 1);
            last_b_q[q][v] <= upd_b[q];
          end else if (last_t_q[q][v] != '0) begin
            last_t_q[q][v] <= last_t_q[q][v] - 1'b1;
          end
        end
      end
    end
  end
endmodule
