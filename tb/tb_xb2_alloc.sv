// tb_xb2_alloc: random test of the egress lane selection.  For random head
// tags that respect the per-output limits, each output's lanes must take the
// matching shared buffers in ascending index order, unused lanes must be
// disabled, and `merge` must flag outputs fed from two input ports.
module tb_xb2_alloc;
  import hnoc_pkg::*;
  localparam int SB = 4;
  localparam int OPP [NP] = '{1, 1, 2, 1, 1};
  logic      clk = 1'b0, rst_n = 1'b0;
  cell_tag_t head_tag [SB];
  logic [1:0] sel [NP * MAX_PFC];
  logic      en  [NP * MAX_PFC];
  logic      merge;
  int checks = 0, failures = 0, merges = 0;

  xb2_alloc #(.SB(SB), .OP_PFC(OPP)) dut (.clk, .rst_n, .head_tag, .sel, .en, .merge);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      int cnt [NP];
      int lane_b [NP][MAX_PFC];
      int nl [NP];
      logic exp_merge;
      int first_src [NP];
      for (int o = 0; o < NP; o++) begin cnt[o] = 0; nl[o] = 0; first_src[o] = -1; end
      exp_merge = 1'b0;
      for (int b = 0; b < SB; b++) begin
        int o;
        head_tag[b] = '0;
        o = int'($urandom % NP);
        if ($urandom % 3 != 0 && cnt[o] < OPP[o]) begin
          head_tag[b].valid = 1'b1;
          head_tag[b].oport = PORT_W'(o);
          head_tag[b].ovc   = VC_W'($urandom % 2);
          head_tag[b].src   = PORT_W'($urandom % NP);
          lane_b[o][cnt[o]] = b;
          if (first_src[o] < 0) first_src[o] = int'(head_tag[b].src);
          else if (first_src[o] != int'(head_tag[b].src)) exp_merge = 1'b1;
          cnt[o]++;
        end
      end
      @(negedge clk);
      for (int o = 0; o < NP; o++)
        for (int l = 0; l < MAX_PFC; l++) begin
          checks++;
          if (l < cnt[o]) begin
            if (!en[o * MAX_PFC + l] || int'(sel[o * MAX_PFC + l]) != lane_b[o][l]) begin
              failures++;
              $display("it %0d out %0d lane %0d: en %0d sel %0d expected buffer %0d",
                       it, o, l, en[o * MAX_PFC + l], sel[o * MAX_PFC + l], lane_b[o][l]);
            end
          end else if (en[o * MAX_PFC + l]) begin
            failures++;
            $display("it %0d out %0d lane %0d: enabled without a flit", it, o, l);
          end
        end
      checks++;
      if (merge != exp_merge) begin
        failures++;
        $display("it %0d: merge %0d expected %0d", it, merge, exp_merge);
      end
      if (exp_merge) merges++;
    end
    checks++;
    if (merges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
