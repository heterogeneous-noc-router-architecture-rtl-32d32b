// tb_sink: receiver for one router output port in the router tests.
//
// Checks every flit it receives: at most PFC flits per clock, the packet of a
// VC is contiguous (head, bodies in sequence, tail), the packet id stays the
// same, and the head's destination routes to this output port by XY routing
// from (MY_X, MY_Y) (recomputed here, independently of the router).  Returns
// one credit per flit, up to PFC per clock, holding them back in a random
// THROTTLE percent of the clocks.  Reports the smallest latency seen for a
// non-head flit (the sources stamp the send cycle into it).
module tb_sink
  import hnoc_pkg::*;
#(
  parameter int O     = 0,
  parameter int PFC   = 1,
  parameter int NVC   = 2,
  parameter int PLEN  = 8,
  parameter int MY_X  = 2,
  parameter int MY_Y  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  int      cycle,
  input  int      throttle,
  input  lane_t   link [MAX_PFC],
  output credit_t cred [MAX_PFC],
  output int      pkts,
  output int      flits,
  output int      checks,
  output int      errors,
  output int      min_lat,
  output int      full_cycles      // clocks with all PFC lanes busy
);
  logic open_q [NVC];
  int   pid_q  [NVC];
  int   seq_q  [NVC];
  int   pend [$];

  function automatic int xy(int dx, int dy);
    if (dx > MY_X) return 2;
    if (dx < MY_X) return 4;
    if (dy > MY_Y) return 1;
    if (dy < MY_Y) return 3;
    return 0;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin open_q[v] = 0; pid_q[v] = 0; seq_q[v] = 0; end
      for (int l = 0; l < MAX_PFC; l++) cred[l] <= '0;
      pkts = 0; flits = 0; checks = 0; errors = 0; min_lat = 1 << 30; full_cycles = 0;
      pend.delete();
    end else begin
      int nv;
      nv = 0;
      for (int l = 0; l < MAX_PFC; l++) begin
        if (link[l].valid) begin
          int v, id, sq;
          v  = int'(link[l].vc);
          id = int'(link[l].flit.data[31:16]);
          sq = int'(link[l].flit.data[15:8]);
          nv++; flits++; checks++;
          pend.push_back(v);
          if (l >= PFC || v >= NVC) begin
            errors++;
            $display("[%0d] out%0d: flit on unused lane %0d / vc %0d", cycle, O, l, v);
          end else if (is_head(link[l].flit.ftype)) begin
            if (open_q[v] || sq != 0 ||
                xy(int'(link[l].flit.data[3:0]), int'(link[l].flit.data[7:4])) != O) begin
              errors++;
              $display("[%0d] out%0d vc%0d: bad head pid %0h seq %0d open %0d", cycle, O, v, id, sq, open_q[v]);
            end
            open_q[v] = 1; pid_q[v] = id; seq_q[v] = 1;
            if (link[l].flit.ftype == FT_SINGLE) begin open_q[v] = 0; pkts++; end
          end else begin
            int lat;
            lat = (cycle - int'(link[l].flit.data[7:0])) & 255;
            if (lat < min_lat) min_lat = lat;
            if (!open_q[v] || id != pid_q[v] || sq != seq_q[v]) begin
              errors++;
              $display("[%0d] out%0d vc%0d: flit pid %0h seq %0d, expected pid %0h seq %0d (open %0d)",
                       cycle, O, v, id, sq, pid_q[v], seq_q[v], open_q[v]);
            end
            seq_q[v] = sq + 1;
            if (is_tail(link[l].flit.ftype)) begin
              if (sq != PLEN - 1) begin
                errors++;
                $display("[%0d] out%0d vc%0d: tail at seq %0d", cycle, O, v, sq);
              end
              open_q[v] = 0; pkts++;
            end
          end
        end
      end
      if (nv == PFC) full_cycles++;
      for (int l = 0; l < MAX_PFC; l++) begin
        credit_t c;
        c = '0;
        if (l < PFC && pend.size() > 0 && int'($urandom % 100) >= throttle) begin
          c.valid = 1'b1;
          c.vc    = VC_W'(pend.pop_front());
        end
        cred[l] <= c;
      end
    end
  end
endmodule
