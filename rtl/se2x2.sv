// se2x2: 2x2 switching element (SE / BSE) with a bar and a cross state.
//
// The element of every switch in this design: the Benes switch body, the
// crossbar grid and the address switch inside each processing element.
// scb = 0 (bar) connects in0->out0 and in1->out1; scb = 1 (cross) connects
// in0->out1 and in1->out0, as the switch control bit is defined for the Benes
// network. Purely combinational; W is the width of the switched signal (a
// width is this design's own choice, the document switches single signals).
module se2x2 #(
  parameter int W = 8
) (
  input  logic         scb,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);
  import clos_pkg::*;

  always_comb begin
    if (se_state_e'(scb) == SE_CROSS) begin
      out0 = in1;
      out1 = in0;
    end else begin
      out0 = in0;
      out1 = in1;
    end
  end
endmodule
