// xb2_alloc: egress scheduling of the flits at the head of the shared buffers
// (SB Read and the control of the second crossbar).
//
// Each clock, the flits in time slot 0 of all shared buffers leave the router.
// For every output port o this block hands them to the output lanes in
// ascending shared-buffer index: the lowest-index buffer holding a flit for o
// gets lane 0, the next lane 1, and so on.  Because the allocation stage puts
// the earlier flit of a packet into the lower-index buffer when two share a
// time slot, this keeps packet order on the link.  The time-stamping stage
// guarantees at most OP_PFC[o] such flits; an assertion checks it.
// `merge` pulses when one output sends flits from more than one input port in
// a clock.  Purely combinational.
module xb2_alloc
  import hnoc_pkg::*;
#(
  parameter int SB         = 4,
  parameter int OP_PFC [NP] = '{1, 1, 2, 1, 1},
  localparam int SBW = (SB > 1) ? $clog2(SB) : 1
) (
  input  logic        clk,      // used by the assertion only
  input  logic        rst_n,
  input  cell_tag_t   head_tag [SB],
  output logic [SBW-1:0] sel   [NP * MAX_PFC],
  output logic        en       [NP * MAX_PFC],
  output logic        merge
);
  int n [NP];

  always_comb begin
    merge = 1'b0;
    for (int i = 0; i < NP * MAX_PFC; i++) begin
      sel[i] = '0;
      en[i]  = 1'b0;
    end
    for (int o = 0; o < NP; o++) begin
      logic [PORT_W-1:0] first_src;
      first_src = '0;
      n[o] = 0;
      for (int b = 0; b < SB; b++) begin
        if (head_tag[b].valid && int'(head_tag[b].oport) == o) begin
          if (n[o] == 0) first_src = head_tag[b].src;
          else if (head_tag[b].src != first_src) merge = 1'b1;
          if (n[o] < OP_PFC[o] && n[o] < MAX_PFC) begin
            sel[o * MAX_PFC + n[o]] = SBW'(b);
            en[o * MAX_PFC + n[o]]  = 1'b1;
          end
          n[o] = n[o] + 1;
        end
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_egress_bw: assert property (@(posedge clk) disable iff (!rst_n) n[o] <= OP_PFC[o]);
  end
endmodule
