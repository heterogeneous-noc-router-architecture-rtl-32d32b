// vc_allocator: virtual-channel allocation (VCA) for all output ports.
//
// For every output port the allocator keeps a list of the VCs of the next-hop
// input port that are free (OP_VC[o] of them).  Head flits that have been
// routed request a VC on their output; per output one request is granted per
// clock, chosen round-robin over all input VCs, and it receives the free VC
// with the lowest index.  A VC becomes free again when the tail flit of its
// packet leaves the router through the second crossbar (release lanes), so a
// downstream VC never holds flits of two packets.
// Grants are combinational; the free list and the round-robin pointers are
// updated at the clock edge.  The free-VC list per output follows the
// document; the round-robin order and one grant per output per clock are this
// design's choices.
module vc_allocator
  import hnoc_pkg::*;
#(
  parameter int IP_VC [NP] = '{2, 2, 2, 2, 2},
  parameter int OP_VC [NP] = '{2, 2, 2, 2, 2}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req      [NP][MAX_VC],
  input  port_e           req_port [NP][MAX_VC],
  output logic            gnt      [NP][MAX_VC],
  output logic [VC_W-1:0] gnt_vc   [NP][MAX_VC],
  input  credit_t         release_vc [NP][MAX_PFC],  // per output: tails leaving
  output logic            wait_any                   // a request went unserved
);
  localparam int NR = NP * MAX_VC;
  localparam int RW = $clog2(NR);

  logic [MAX_VC-1:0] free_q [NP];
  logic [RW-1:0]     ptr_q  [NP];

  logic              o_gnt  [NP];
  logic [RW-1:0]     o_win  [NP];
  logic [VC_W-1:0]   o_vc   [NP];

  always_comb begin
    int r, rp, rv;
    logic have_vc;
    r = 0; rp = 0; rv = 0; have_vc = 1'b0;
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < MAX_VC; v++) begin
        gnt[p][v]    = 1'b0;
        gnt_vc[p][v] = '0;
      end
    wait_any = 1'b0;
    for (int o = 0; o < NP; o++) begin
      o_gnt[o] = 1'b0;
      o_win[o] = '0;
      o_vc[o]  = '0;
      have_vc  = 1'b0;
      for (int v = MAX_VC - 1; v >= 0; v--)
        if (v < OP_VC[o] && free_q[o][v]) begin
          have_vc = 1'b1;
          o_vc[o] = VC_W'(v);
        end
      if (have_vc) begin
        for (int i = NR - 1; i >= 0; i--) begin
          // scan from ptr upwards, wrapping; the last hit in this downward
          // loop is the first one at or after ptr
          r  = (int'(ptr_q[o]) + i) % NR;
          rp = r / MAX_VC;
          rv = r % MAX_VC;
          if (rv < IP_VC[rp] && req[rp][rv] && int'(req_port[rp][rv]) == o) begin
            o_gnt[o] = 1'b1;
            o_win[o] = RW'(r);
          end
        end
      end
      if (o_gnt[o]) begin
        gnt[int'(o_win[o]) / MAX_VC][int'(o_win[o]) % MAX_VC]    = 1'b1;
        gnt_vc[int'(o_win[o]) / MAX_VC][int'(o_win[o]) % MAX_VC] = o_vc[o];
      end
    end
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < MAX_VC; v++)
        if (v < IP_VC[p] && req[p][v] && !gnt[p][v]) wait_any = 1'b1;
  end

  logic [MAX_VC-1:0] free_d [NP];

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      free_d[o] = free_q[o];
      if (o_gnt[o]) free_d[o][o_vc[o]] = 1'b0;
      for (int k = 0; k < MAX_PFC; k++)
        if (release_vc[o][k].valid) free_d[o][release_vc[o][k].vc] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NP; o++) begin
        for (int v = 0; v < MAX_VC; v++) free_q[o][v] <= (v < OP_VC[o]);
        ptr_q[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NP; o++) begin
        free_q[o] <= free_d[o];
        if (o_gnt[o]) ptr_q[o] <= RW'((int'(o_win[o]) + 1) % NR);
      end
    end
  end

  // A VC is released only while it is allocated.
  for (genvar o = 0; o < NP; o++) begin : g_chk
    for (genvar k = 0; k < MAX_PFC; k++) begin : g_k
      a_release_busy: assert property (@(posedge clk) disable iff (!rst_n)
        release_vc[o][k].valid |-> !free_q[o][release_vc[o][k].vc]);
    end
  end
endmodule
