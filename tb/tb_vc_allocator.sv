// tb_vc_allocator: random requests from all input VCs to random outputs, held
// until granted, and random release of allocated VCs.  Checks that a grant
// goes only to a requester, names a VC that is free and exists on that output,
// that each output grants at most once per clock and always grants when it
// has both a requester and a free VC, and that waiting is reported.  Also
// checks that no requester waits for more grants of its output than there
// are requesters (round robin).
module tb_vc_allocator;
  import hnoc_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            req      [NP][MAX_VC];
  port_e           req_port [NP][MAX_VC];
  logic            gnt      [NP][MAX_VC];
  logic [VC_W-1:0] gnt_vc   [NP][MAX_VC];
  credit_t         release_vc [NP][MAX_PFC];
  logic            wait_any;
  logic            busy [NP][MAX_VC];       // model: allocated output VCs
  int              hold [NP][MAX_VC];       // cycles until release
  int              waited [NP][MAX_VC];     // grants of own output while waiting
  logic            g_s  [NP][MAX_VC];       // grants sampled before the edge
  logic [VC_W-1:0] gv_s [NP][MAX_VC];
  int checks = 0, failures = 0, waits = 0;

  vc_allocator #(.IP_VC(DEF_IP_VC), .OP_VC(DEF_OP_VC)) dut (
    .clk, .rst_n, .req, .req_port, .gnt, .gnt_vc, .release_vc, .wait_any);

  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < NP; p++) begin
      for (int v = 0; v < MAX_VC; v++) begin
        req[p][v] = 1'b0; req_port[p][v] = P_LOCAL;
        busy[p][v] = 1'b0; hold[p][v] = 0; waited[p][v] = 0;
      end
      for (int k = 0; k < MAX_PFC; k++) release_vc[p][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // new requests
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < DEF_IP_VC[p]; v++)
          if (!req[p][v] && $urandom % 4 == 0) begin
            req[p][v] = 1'b1;
            req_port[p][v] = port_e'($urandom % NP);
            waited[p][v] = 0;
          end
      // releases
      for (int o = 0; o < NP; o++) begin
        int k;
        k = 0;
        for (int l = 0; l < MAX_PFC; l++) release_vc[o][l] = '0;
        for (int v = 0; v < DEF_OP_VC[o]; v++)
          if (busy[o][v] && k < MAX_PFC) begin
            if (hold[o][v] == 0) begin
              release_vc[o][k].valid = 1'b1;
              release_vc[o][k].vc = VC_W'(v);
              k++;
            end else hold[o][v]--;
          end
      end
      #1;
      // check grants
      begin
        int ngnt [NP];
        logic anyreq [NP];
        logic anywait;
        anywait = 1'b0;
        for (int o = 0; o < NP; o++) begin ngnt[o] = 0; anyreq[o] = 1'b0; end
        for (int p = 0; p < NP; p++)
          for (int v = 0; v < MAX_VC; v++) begin
            if (v < DEF_IP_VC[p] && req[p][v]) anyreq[req_port[p][v]] = 1'b1;
            if (gnt[p][v]) begin
              int o, ov;
              o = int'(req_port[p][v]); ov = int'(gnt_vc[p][v]);
              ngnt[o]++;
              checks++;
              if (!req[p][v] || v >= DEF_IP_VC[p] || ov >= DEF_OP_VC[o] || busy[o][ov]) begin
                failures++;
                $display("it %0d: bad grant in%0d vc%0d -> out%0d vc%0d req %0d busy %0d free %b", it, p, v, o, ov, req[p][v], busy[o][ov], dut.free_q[o]);
              end
            end else if (v < DEF_IP_VC[p] && req[p][v]) anywait = 1'b1;
          end
        for (int o = 0; o < NP; o++) begin
          logic anyfree;
          anyfree = 1'b0;
          for (int v = 0; v < DEF_OP_VC[o]; v++) if (!busy[o][v]) anyfree = 1'b1;
          checks++;
          if (ngnt[o] > 1 || (anyreq[o] && anyfree && ngnt[o] == 0)) begin
            failures++;
            $display("it %0d out %0d: %0d grants (requests %0d, free %0d)", it, o, ngnt[o], anyreq[o], anyfree);
          end
        end
        checks++;
        if (wait_any != anywait) begin
          failures++;
          $display("it %0d: wait_any %0d expected %0d", it, wait_any, anywait);
        end
        if (anywait) waits++;
        // round-robin bound: count grants of the same output seen while waiting
        for (int p = 0; p < NP; p++)
          for (int v = 0; v < DEF_IP_VC[p]; v++)
            if (req[p][v] && !gnt[p][v] && ngnt[req_port[p][v]] > 0) begin
              waited[p][v]++;
              checks++;
              if (waited[p][v] > NP * MAX_VC) begin
                failures++;
                $display("it %0d: in%0d vc%0d starved", it, p, v);
              end
            end
      end
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < MAX_VC; v++) begin
          g_s[p][v] = gnt[p][v];
          gv_s[p][v] = gnt_vc[p][v];
        end
      @(posedge clk);
      #1;
      for (int o = 0; o < NP; o++)
        for (int l = 0; l < MAX_PFC; l++)
          if (release_vc[o][l].valid) busy[o][release_vc[o][l].vc] = 1'b0;
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < MAX_VC; v++)
          if (g_s[p][v]) begin
            busy[req_port[p][v]][gv_s[p][v]] = 1'b1;
            hold[req_port[p][v]][gv_s[p][v]] = int'($urandom % 12);
            req[p][v] = 1'b0;
          end
    end
    checks++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
