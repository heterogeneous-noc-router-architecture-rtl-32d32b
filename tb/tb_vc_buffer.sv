// tb_vc_buffer: random test of the per-VC input buffer against a queue model.
// Two lanes write random VCs (often the same VC twice in one clock), one VC
// is read per clock by up to two flits; counts and the first two flits of
// every VC are compared with the model every clock.
module tb_vc_buffer;
  import hnoc_pkg::*;
  localparam int PFC = 2, NVC = 3, DEPTH = 8;
  logic  clk = 1'b0, rst_n = 1'b0;
  lane_t wr [MAX_PFC];
  logic [VC_W-1:0] rd_vc;
  logic [1:0] rd_cnt;
  logic [3:0] count [MAX_VC];
  flit_t peek [MAX_VC][MAX_PFC];
  flit_t model [NVC][$];
  int checks = 0, failures = 0, dual = 0;

  vc_buffer #(.PFC(PFC), .NVC(NVC), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr, .rd_vc, .rd_cnt, .count, .peek);

  always #5 clk = ~clk;

  initial begin
    for (int l = 0; l < MAX_PFC; l++) wr[l] = '0;
    rd_vc = '0; rd_cnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int room [NVC];
      @(negedge clk);
      // compare
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (int'(count[v]) != model[v].size()) begin
          failures++;
          $display("it %0d vc %0d: count %0d model %0d", it, v, count[v], model[v].size());
        end
        for (int k = 0; k < PFC; k++)
          if (k < model[v].size()) begin
            checks++;
            if (peek[v][k] != model[v][k]) begin
              failures++;
              $display("it %0d vc %0d peek %0d: %h expected %h", it, v, k, peek[v][k], model[v][k]);
            end
          end
      end
      // next stimulus
      rd_vc  = VC_W'($urandom % NVC);
      rd_cnt = 2'($urandom % (PFC + 1));
      if (int'(rd_cnt) > model[rd_vc].size()) rd_cnt = 2'(model[rd_vc].size());
      for (int v = 0; v < NVC; v++) room[v] = DEPTH - model[v].size() + ((int'(rd_vc) == v) ? int'(rd_cnt) : 0);
      for (int l = 0; l < MAX_PFC; l++) begin
        int v;
        wr[l] = '0;
        v = (l == 1 && $urandom % 2 == 0) ? int'(wr[0].vc) : int'($urandom % NVC);
        if ($urandom % 4 != 0 && room[v] > 0) begin
          wr[l].valid = 1'b1;
          wr[l].vc    = VC_W'(v);
          wr[l].flit.ftype = ftype_e'($urandom % 4);
          wr[l].flit.data  = $urandom;
          room[v]--;
        end
      end
      if (wr[0].valid && wr[1].valid && wr[0].vc == wr[1].vc) dual++;
      @(posedge clk);
      for (int k = 0; k < int'(rd_cnt); k++) void'(model[rd_vc].pop_front());
      for (int l = 0; l < MAX_PFC; l++) if (wr[l].valid) model[wr[l].vc].push_back(wr[l].flit);
    end
    checks++;
    if (dual == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
