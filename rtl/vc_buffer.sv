// vc_buffer: the input buffer of one router port, segmented into one FIFO per
// virtual channel (Buffer Write stage).
//
// A port of parallel-flits-per-cycle PFC receives up to PFC flits per clock,
// each lane with its own VC id, so several lanes may write the same VC in one
// cycle; lane order is kept (lower lane first).  The time-stamping stage reads
// up to PFC flits per clock from one VC.  For that it sees, for every VC, the
// number of stored flits and the first PFC flits at its head (peek), in the
// same cycle.  A read at the edge removes rd_cnt flits from the head of VC
// rd_vc.  Flits written in a cycle are visible from the next cycle on.
// The write rate equal to PFC and the read rate equal to PFC follow the
// document; DEPTH is a per-VC depth chosen by this design.  Credit flow
// control upstream keeps the FIFOs from overflowing; an assertion checks it.
module vc_buffer
  import hnoc_pkg::*;
#(
  parameter int PFC   = 2,
  parameter int NVC   = 2,
  parameter int DEPTH = 8      // flits per VC, a power of two
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  lane_t                  wr   [MAX_PFC],
  input  logic [VC_W-1:0]        rd_vc,
  input  logic [$clog2(MAX_PFC+1)-1:0] rd_cnt,
  output logic [$clog2(DEPTH+1)-1:0]   count [MAX_VC],
  output flit_t                  peek [MAX_VC][MAX_PFC]
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  flit_t          mem  [NVC][DEPTH];
  logic [AW-1:0]  wptr [NVC];
  logic [AW-1:0]  rptr [NVC];
  logic [CW-1:0]  cnt  [NVC];

  // Number of lanes, below each lane, that write the same VC.
  logic [AW-1:0]  woff [MAX_PFC];
  logic [CW-1:0]  wnum [NVC];

  always_comb begin
    for (int v = 0; v < NVC; v++) wnum[v] = '0;
    for (int l = 0; l < MAX_PFC; l++) begin
      woff[l] = '0;
      if (l < PFC && wr[l].valid && int'(wr[l].vc) < NVC) begin
        woff[l] = AW'(wnum[wr[l].vc]);
        wnum[wr[l].vc] = wnum[wr[l].vc] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < PFC; l++)
      if (wr[l].valid && int'(wr[l].vc) < NVC)
        mem[wr[l].vc][wptr[wr[l].vc] + woff[l]] <= wr[l].flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        wptr[v] <= '0;
        rptr[v] <= '0;
        cnt[v]  <= '0;
      end
    end else begin
      for (int v = 0; v < NVC; v++) begin
        logic [CW-1:0] rnum;
        rnum = (int'(rd_vc) == v) ? CW'(rd_cnt) : '0;
        wptr[v] <= wptr[v] + AW'(wnum[v]);
        rptr[v] <= rptr[v] + AW'(rnum);
        cnt[v]  <= cnt[v] + wnum[v] - rnum;
      end
    end
  end

  always_comb begin
    for (int v = 0; v < MAX_VC; v++) begin
      count[v] = '0;
      for (int k = 0; k < MAX_PFC; k++) peek[v][k] = '0;
      if (v < NVC) begin
        count[v] = cnt[v];
        for (int k = 0; k < PFC; k++) peek[v][k] = mem[v][rptr[v] + AW'(k)];
      end
    end
  end

  // Upstream credits must prevent overflow, and reads must not underflow.
  for (genvar v = 0; v < NVC; v++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      int'(cnt[v]) + int'(wnum[v]) <= DEPTH + ((int'(rd_vc) == v) ? int'(rd_cnt) : 0));
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      (int'(rd_vc) == v) |-> (rd_cnt <= cnt[v]));
  end
endmodule
