// tb_output_port: the output register must show the crossbar lanes one clock
// later, and the credit counters must follow initial value - spent + returned,
// with credits returned on two lanes (also to the same VC in one clock).
module tb_output_port;
  import hnoc_pkg::*;
  localparam int PFC = 2, NVC = 3, CRED = 8;
  logic    clk = 1'b0, rst_n = 1'b0;
  lane_t   xb_lane [MAX_PFC];
  lane_t   out_link [MAX_PFC];
  credit_t cred_in [MAX_PFC];
  logic [1:0] cons [MAX_VC];
  logic [3:0] credits [MAX_VC];
  int      mc [NVC];
  int      outstanding [NVC][$];
  lane_t   prev [MAX_PFC];
  int checks = 0, failures = 0;

  output_port #(.PFC(PFC), .NVC(NVC), .CRED(CRED)) dut (
    .clk, .rst_n, .xb_lane, .out_link, .cred_in, .cons, .credits);

  always #5 clk = ~clk;

  initial begin
    for (int v = 0; v < NVC; v++) mc[v] = CRED;
    for (int l = 0; l < MAX_PFC; l++) begin xb_lane[l] = '0; cred_in[l] = '0; prev[l] = '0; end
    for (int v = 0; v < MAX_VC; v++) cons[v] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      int used [NVC];
      @(negedge clk);
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (int'(credits[v]) != mc[v]) begin
          failures++;
          $display("it %0d vc %0d: credits %0d expected %0d", it, v, credits[v], mc[v]);
        end
      end
      for (int l = 0; l < PFC; l++) begin
        checks++;
        if (out_link[l] != prev[l]) begin
          failures++;
          $display("it %0d lane %0d: link %h expected %h", it, l, out_link[l], prev[l]);
        end
      end
      for (int l = 0; l < MAX_PFC; l++) begin
        xb_lane[l] = '0;
        if ($urandom % 2) begin
          xb_lane[l].valid = 1'b1;
          xb_lane[l].vc = VC_W'($urandom % NVC);
          xb_lane[l].flit.ftype = ftype_e'($urandom % 4);
          xb_lane[l].flit.data = $urandom;
        end
      end
      // spend on one VC, return earlier spends
      for (int v = 0; v < NVC; v++) used[v] = 0;
      for (int v = 0; v < MAX_VC; v++) cons[v] = '0;
      begin
        int v, n;
        v = int'($urandom % NVC);
        n = int'($urandom % 3);
        if (n > mc[v]) n = mc[v];
        cons[v] = 2'(n);
      end
      for (int l = 0; l < MAX_PFC; l++) begin
        int v;
        cred_in[l] = '0;
        v = int'($urandom % NVC);
        if ($urandom % 2 && outstanding[v].size() > 0) begin
          cred_in[l].valid = 1'b1;
          cred_in[l].vc = VC_W'(v);
          void'(outstanding[v].pop_front());
          used[v]++;
        end
      end
      @(posedge clk);
      for (int l = 0; l < PFC; l++) prev[l] = xb_lane[l];
      for (int v = 0; v < NVC; v++) begin
        mc[v] = mc[v] - int'(cons[v]) + used[v];
        for (int k = 0; k < int'(cons[v]); k++) outstanding[v].push_back(1);
      end
    end
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
