// crossbar: a full NI-to-NO crossbar of W-bit words.
//
// Output o carries input sel[o] when en[o] is set and zero otherwise; several
// outputs may take the same input.  The router uses it twice: the first
// crossbar (XB1) moves flits from the input-port lanes to the write ports of
// the shared buffers, the second (XB2) moves the flits leaving the shared
// buffers to the output-port lanes.  Purely combinational; the select signals
// come from the allocation stages.  That both crossbars exist follows the
// document; the plain multiplexer form is this design's.
module crossbar #(
  parameter int NI = 10,
  parameter int NO = 8,
  parameter int W  = 34,
  localparam int SW = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic [W-1:0]            din  [NI],
  input  logic [SW-1:0]           sel  [NO],
  input  logic                    en   [NO],
  output logic [W-1:0]            dout [NO]
);
  always_comb begin
    for (int o = 0; o < NO; o++)
      dout[o] = (en[o] && int'(sel[o]) < NI) ? din[sel[o]] : '0;
  end
endmodule
