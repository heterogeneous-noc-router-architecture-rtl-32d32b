// tb_shared_buffer: random test of the time-slotted shared buffer against a
// slot model: every clock up to two flits are written into random free slots;
// the slot view and the head must match the model, so a flit written into
// slot t must reach the head exactly t clocks later.
module tb_shared_buffer;
  import hnoc_pkg::*;
  localparam int DEPTH = 16, SU = 2;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      we [SU];
  logic [3:0] wslot [SU];
  cell_t     wcell [SU];
  cell_tag_t tags [DEPTH];
  cell_t     head;
  cell_t     model [DEPTH];
  int checks = 0, failures = 0, heads = 0;

  shared_buffer #(.DEPTH(DEPTH), .SPEEDUP(SU)) dut (.clk, .rst_n, .we, .wslot, .wcell, .tags, .head);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < DEPTH; t++) model[t] = '0;
    for (int k = 0; k < SU; k++) begin we[k] = 1'b0; wslot[k] = '0; wcell[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int t = 0; t < DEPTH; t++) begin
        checks++;
        if (tags[t].valid != model[t].tag.valid ||
            (model[t].tag.valid && tags[t] != model[t].tag)) begin
          failures++;
          $display("it %0d slot %0d: tag %h expected %h", it, t, tags[t], model[t].tag);
        end
      end
      checks++;
      if (head.tag.valid != model[0].tag.valid || (model[0].tag.valid && head != model[0])) begin
        failures++;
        $display("it %0d: head %h expected %h", it, head, model[0]);
      end
      if (model[0].tag.valid) heads++;
      for (int k = 0; k < SU; k++) begin
        int s;
        we[k] = 1'b0;
        s = 1 + int'($urandom % (DEPTH - 1));
        if ($urandom % 3 != 0 && !model[s].tag.valid && !(k == 1 && we[0] && int'(wslot[0]) == s)) begin
          we[k] = 1'b1;
          wslot[k] = 4'(s);
          wcell[k].tag.valid = 1'b1;
          wcell[k].tag.oport = PORT_W'($urandom % NP);
          wcell[k].tag.ovc   = VC_W'($urandom);
          wcell[k].tag.src   = PORT_W'($urandom % NP);
          wcell[k].flit.ftype = ftype_e'($urandom % 4);
          wcell[k].flit.data  = $urandom;
        end
      end
      @(posedge clk);
      for (int k = 0; k < SU; k++) if (we[k]) model[wslot[k]] = wcell[k];
      for (int t = 0; t < DEPTH - 1; t++) model[t] = model[t + 1];
      model[DEPTH - 1] = '0;
    end
    checks++;
    if (heads == 0) failures++;
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
