// shared_buffer: one of the router's middle buffers, a time-slotted
// push-in/first-out queue with SPEEDUP write ports.
//
// Cell t of the buffer is time slot t: a flit stored there leaves the router t
// clocks later.  Every clock the cell at slot 0 is presented on `head` (read by
// the second crossbar) and removed, and every other flit moves one slot closer
// to the head.  Instead of shifting data the buffer is circular: a head pointer
// advances each clock and slot t lives at physical cell head+t.
// Up to SPEEDUP flits are written per clock, each into its own free slot
// (1..DEPTH-1) chosen by the allocation stage; a flit written into slot t at
// edge n is at the head during cycle n+t.  The order of the stored flits never
// changes, so flits leave in slot order.
// `tags` shows the tag of every slot (valid, output, VC, source port) in slot
// order, for the time-stamping and allocation stage.
// The time-slot cells, the shared-buffer write speed-up and the circular
// organisation follow the document; DEPTH is a parameter whose default gives
// 256 bytes of flit storage per buffer ("several hundred bytes").
module shared_buffer
  import hnoc_pkg::*;
#(
  parameter int DEPTH   = 64,   // time slots, a power of two
  parameter int SPEEDUP = 2     // write ports
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we    [SPEEDUP],
  input  logic [$clog2(DEPTH)-1:0] wslot [SPEEDUP],
  input  cell_t                    wcell [SPEEDUP],
  output cell_tag_t                tags  [DEPTH],
  output cell_t                    head
);
  localparam int AW = $clog2(DEPTH);

  cell_tag_t      tag_q  [DEPTH];
  flit_t          flit_q [DEPTH];
  logic [AW-1:0]  hptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hptr <= '0;
      for (int i = 0; i < DEPTH; i++) tag_q[i] <= '0;
    end else begin
      hptr <= hptr + 1'b1;
      tag_q[hptr].valid <= 1'b0;
      for (int k = 0; k < SPEEDUP; k++)
        if (we[k]) tag_q[hptr + wslot[k]] <= wcell[k].tag;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < SPEEDUP; k++)
      if (we[k]) flit_q[hptr + wslot[k]] <= wcell[k].flit;
  end

  always_comb begin
    for (int t = 0; t < DEPTH; t++) tags[t] = tag_q[hptr + AW'(t)];
    head.tag  = tag_q[hptr];
    head.flit = flit_q[hptr];
  end

  // Writes go to distinct, free slots other than the head.
  for (genvar k = 0; k < SPEEDUP; k++) begin : g_chk
    a_not_head: assert property (@(posedge clk) disable iff (!rst_n)
      we[k] |-> wslot[k] != '0);
    a_free: assert property (@(posedge clk) disable iff (!rst_n)
      we[k] |-> !tag_q[hptr + wslot[k]].valid);
    for (genvar j = k + 1; j < SPEEDUP; j++) begin : g_pair
      a_distinct: assert property (@(posedge clk) disable iff (!rst_n)
        (we[k] && we[j]) |-> wslot[k] != wslot[j]);
    end
  end
endmodule
