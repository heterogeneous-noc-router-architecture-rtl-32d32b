// tb_crossbar: random test of the crossbar: every output must carry the
// selected input, or zero when disabled.
module tb_crossbar;
  localparam int NI = 10, NO = 8, W = 34;
  logic [W-1:0] din [NI];
  logic [3:0]   sel [NO];
  logic         en  [NO];
  logic [W-1:0] dout [NO];
  int checks = 0, failures = 0;

  crossbar #(.NI(NI), .NO(NO), .W(W)) dut (.din, .sel, .en, .dout);

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int i = 0; i < NI; i++) din[i] = {$urandom, $urandom} & {W{1'b1}};
      for (int o = 0; o < NO; o++) begin
        sel[o] = 4'($urandom % NI);
        en[o]  = ($urandom % 4) != 0;
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (dout[o] !== (en[o] ? din[sel[o]] : '0)) begin
          failures++;
          $display("it %0d out %0d: sel %0d en %0d got %h", it, o, sel[o], en[o], dout[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
