// tb_mesh_src: traffic source at the local port of one node of the mesh test.
//
// Sends packets of PLEN flits over the port's NVC virtual channels, up to PFC
// flits per clock, under credit flow control (VC_DEPTH credits per VC at
// reset).  Packets are started until `quota` packets have been started in
// total; raising `quota` starts a new phase.  A new packet may start in a
// clock with probability RATE percent (the offered load).  Its destination
// follows the traffic pattern `mode` for a MESH x MESH mesh:
//   0 transpose   (x, y) -> (y, x)
//   1 complement  (x, y) -> (MESH-1-x, MESH-1-y)
//   2 uniform     any node, chosen at random
// Flit layout as in the router tests: head [3:0]=x, [7:4]=y; all flits
// [15:8]=sequence number, [31:16]=packet id (node << 12 | count); non-head
// flits carry the low 8 bits of the cycle they were sent in [7:0].
module tb_mesh_src
  import hnoc_pkg::*;
#(
  parameter int NODE     = 0,
  parameter int MESH     = 4,
  parameter int PFC      = 1,
  parameter int NVC      = 2,
  parameter int VC_DEPTH = 8,
  parameter int PLEN     = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  int      cycle,
  input  int      mode,
  input  int      quota,
  input  int      rate,
  output lane_t   link [MAX_PFC],
  input  credit_t cred [MAX_PFC],
  output int      started,
  output int      sent_flits,
  output logic    idle
);
  localparam int MX = NODE % MESH;
  localparam int MY = NODE / MESH;
  int cr   [NVC];
  int left [NVC];
  int pid  [NVC];
  int seq  [NVC];
  int dx   [NVC];
  int dy   [NVC];
  int rr;

  function automatic void pick_dest(input int m, output int x, output int y);
    case (m)
      0: begin x = MY; y = MX; end
      1: begin x = MESH - 1 - MX; y = MESH - 1 - MY; end
      default: begin x = int'($urandom % MESH); y = int'($urandom % MESH); end
    endcase
  endfunction

  always_comb begin
    idle = (started == quota);
    for (int v = 0; v < NVC; v++) if (left[v] != 0) idle = 1'b0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        cr[v] = VC_DEPTH; left[v] = 0; pid[v] = 0; seq[v] = 0; dx[v] = 0; dy[v] = 0;
      end
      for (int l = 0; l < MAX_PFC; l++) link[l] <= '0;
      started = 0; rr = 0; sent_flits = 0;
    end else begin
      lane_t nl [MAX_PFC];
      logic  may_start;
      for (int l = 0; l < MAX_PFC; l++) if (cred[l].valid) cr[int'(cred[l].vc)]++;
      for (int l = 0; l < MAX_PFC; l++) nl[l] = '0;
      may_start = int'($urandom % 100) < rate;
      for (int l = 0; l < PFC; l++) begin
        for (int j = 0; j < NVC; j++) begin
          int v;
          v = (rr + j) % NVC;
          if (!nl[l].valid && cr[v] > 0 && (left[v] > 0 || (may_start && started < quota))) begin
            if (left[v] == 0) begin
              left[v] = PLEN; seq[v] = 0;
              pid[v] = (NODE << 12) | (started % 4096);
              pick_dest(mode, dx[v], dy[v]);
              started++;
              may_start = 1'b0;
            end
            nl[l].valid = 1'b1;
            nl[l].vc    = VC_W'(v);
            if (seq[v] == 0)         nl[l].flit.ftype = FT_HEAD;
            else if (left[v] == 1)   nl[l].flit.ftype = FT_TAIL;
            else                     nl[l].flit.ftype = FT_BODY;
            nl[l].flit.data[31:16] = 16'(pid[v]);
            nl[l].flit.data[15:8]  = 8'(seq[v]);
            nl[l].flit.data[7:0]   = (seq[v] == 0) ? {4'(dy[v]), 4'(dx[v])} : 8'(cycle + 1);
            seq[v]++; left[v]--; cr[v]--; sent_flits++;
          end
        end
        rr = (rr + 1) % NVC;
      end
      for (int l = 0; l < MAX_PFC; l++) link[l] <= nl[l];
    end
  end
endmodule
