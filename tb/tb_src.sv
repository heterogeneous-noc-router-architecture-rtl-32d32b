// tb_src: traffic source for one router input port in the router tests.
//
// Sends NPKT packets of PLEN flits, spread over the port's NVC virtual
// channels, up to PFC flits per clock, obeying credit flow control (one credit
// per VC slot, VC_DEPTH at reset).  A VC starts a new packet only after the
// previous one's tail.  Each packet is sent to a random output port of the
// router at (MY_X, MY_Y) by choosing its destination coordinates; OUT_W sets
// how often each output is chosen.  Flit layout: head [3:0]=x, [7:4]=y;
// all flits [15:8]=sequence number, [31:16]=packet id; non-head flits carry
// the low 8 bits of the cycle they were sent in [7:0].
module tb_src
  import hnoc_pkg::*;
#(
  parameter int P        = 0,
  parameter int PFC      = 1,
  parameter int NVC      = 2,
  parameter int VC_DEPTH = 8,
  parameter int NPKT     = 20,
  parameter int PLEN     = 8,
  parameter int MY_X     = 2,
  parameter int MY_Y     = 2,
  parameter int RATE     = 100,            // percent of cycles that may send
  parameter int OUT_W [NP] = '{1, 1, 3, 1, 1}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  int      cycle,
  output lane_t   link [MAX_PFC],
  input  credit_t cred [MAX_PFC],
  output int      sent_pkts,
  output int      sent_flits,
  output logic    done
);
  int cr   [NVC];
  int left [NVC];   // flits left in the open packet of each VC
  int pid  [NVC];
  int seq  [NVC];
  int dx   [NVC];
  int dy   [NVC];
  int started;
  int rr;

  function automatic void pick_dest(output int x, output int y);
    int tot, r, o;
    tot = 0;
    for (int i = 0; i < NP; i++) tot += OUT_W[i];
    r = int'($urandom % tot);
    o = 0;
    for (int i = 0; i < NP; i++) begin
      if (r < OUT_W[i]) begin o = i; break; end
      r -= OUT_W[i];
    end
    x = MY_X; y = MY_Y;
    case (o)
      1: y = MY_Y + 1 + int'($urandom % 2);                 // north
      2: begin x = MY_X + 1 + int'($urandom % 3); y = int'($urandom % 5); end
      3: y = MY_Y - 1 - int'($urandom % 2);                 // south
      4: begin x = MY_X - 1 - int'($urandom % 2); y = int'($urandom % 5); end
      default: ;
    endcase
  endfunction

  assign done = (started == NPKT) && (sent_flits == NPKT * PLEN);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        cr[v] = VC_DEPTH; left[v] = 0; pid[v] = 0; seq[v] = 0; dx[v] = 0; dy[v] = 0;
      end
      for (int l = 0; l < MAX_PFC; l++) link[l] <= '0;
      started = 0; rr = 0; sent_pkts = 0; sent_flits = 0;
    end else begin
      lane_t nl [MAX_PFC];
      for (int l = 0; l < MAX_PFC; l++) if (cred[l].valid) cr[cred[l].vc]++;
      for (int l = 0; l < MAX_PFC; l++) nl[l] = '0;
      if (enable && int'($urandom % 100) < RATE) begin
        for (int l = 0; l < PFC; l++) begin
          for (int j = 0; j < NVC; j++) begin
            int v;
            v = (rr + j) % NVC;
            if (!nl[l].valid && cr[v] > 0 && (left[v] > 0 || started < NPKT)) begin
              if (left[v] == 0) begin
                left[v] = PLEN; seq[v] = 0;
                pid[v] = (P << 12) | started;
                pick_dest(dx[v], dy[v]);
                started++;
              end
              nl[l].valid = 1'b1;
              nl[l].vc    = VC_W'(v);
              if (PLEN == 1)           nl[l].flit.ftype = FT_SINGLE;
              else if (seq[v] == 0)    nl[l].flit.ftype = FT_HEAD;
              else if (left[v] == 1)   nl[l].flit.ftype = FT_TAIL;
              else                     nl[l].flit.ftype = FT_BODY;
              nl[l].flit.data[31:16] = 16'(pid[v]);
              nl[l].flit.data[15:8]  = 8'(seq[v]);
              nl[l].flit.data[7:0]   = (seq[v] == 0) ? {4'(dy[v]), 4'(dx[v])} : 8'(cycle + 1);
              seq[v]++; left[v]--; cr[v]--; sent_flits++;
              if (left[v] == 0) sent_pkts++;
            end
          end
          rr = (rr + 1) % NVC;
        end
      end
      for (int l = 0; l < MAX_PFC; l++) link[l] <= nl[l];
    end
  end
endmodule
