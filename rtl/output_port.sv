// output_port: one egress port: the link-traversal register and the credit
// counters of the next-hop input port's VCs.
//
// The flits leaving the shared buffers through the second crossbar are
// registered here and driven on the egress link one clock later (the Link
// Traversal stage), up to PFC flits per clock.  For every downstream VC the
// port keeps a credit counter, starting at the downstream VC depth CRED.  The
// time-stamping stage spends credits when it places flits for that VC into a
// shared buffer (cons), and the downstream router returns them on the credit
// lanes, up to PFC per clock.  So a flit is only admitted to a shared buffer
// when a downstream slot is guaranteed, as credit-based flit-level flow
// control in the document requires.  The counter update is registered.
module output_port
  import hnoc_pkg::*;
#(
  parameter int PFC  = 2,
  parameter int NVC  = 2,
  parameter int CRED = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  lane_t         xb_lane  [MAX_PFC],
  output lane_t         out_link [MAX_PFC],
  input  credit_t       cred_in  [MAX_PFC],
  input  logic [$clog2(MAX_PFC+1)-1:0] cons [MAX_VC],
  output logic [$clog2(CRED+1)-1:0]    credits [MAX_VC]
);
  localparam int CW = $clog2(CRED+1);

  logic [CW-1:0] cred_q [NVC];
  logic [CW-1:0] ret    [NVC];

  always_comb begin
    for (int v = 0; v < NVC; v++) ret[v] = '0;
    for (int k = 0; k < PFC; k++)
      if (cred_in[k].valid && int'(cred_in[k].vc) < NVC)
        ret[cred_in[k].vc] = ret[cred_in[k].vc] + 1'b1;
    for (int v = 0; v < MAX_VC; v++) credits[v] = (v < NVC) ? cred_q[v] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) cred_q[v] <= CW'(CRED);
      for (int k = 0; k < MAX_PFC; k++) out_link[k] <= '0;
    end else begin
      for (int v = 0; v < NVC; v++) cred_q[v] <= cred_q[v] - CW'(cons[v]) + ret[v];
      for (int k = 0; k < MAX_PFC; k++) out_link[k] <= (k < PFC) ? xb_lane[k] : '0;
    end
  end

  for (genvar v = 0; v < NVC; v++) begin : g_chk
    a_no_overspend: assert property (@(posedge clk) disable iff (!rst_n)
      cons[v] <= cred_q[v]);
    a_no_overreturn: assert property (@(posedge clk) disable iff (!rst_n)
      int'(cred_q[v]) - int'(cons[v]) + int'(ret[v]) <= CRED);
  end
endmodule
