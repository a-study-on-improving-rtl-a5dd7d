// dtr_pe: processing element of the second part of the parallel control unit,
// destination-tag routing (DTR) for one SE of the centre or a merging column.
//
// Outlets of every SE are labelled 0 (upper) and 1 (lower). An address at an
// inlet must leave by the outlet given by its routing bit, bit BIT of the
// destination address (bit n-1 in the centre column, one bit lower in each
// following column, bit 0 in the last). After the division part the two
// addresses at an SE always have different routing bits, so the upper
// inlet's bit alone gives the SE state: 0 -> bar, 1 -> cross. If the upper
// inlet is idle the lower inlet decides (its bit inverted); with both idle
// the SE stays bar (this design's choice for idle SEs). The address pair is
// passed on through a 2x2 switch in the same state. Combinational.
module dtr_pe #(
  parameter int NB  = 5,
  parameter int BIT = 0
) (
  input  logic [NB-1:0] a_in  [2],
  input  logic          v_in  [2],
  output logic          scb,
  output logic [NB-1:0] a_out [2],
  output logic          v_out [2]
);
  logic [NB:0] sw_out [2];

  always_comb begin
    if (v_in[0])      scb = a_in[0][BIT];
    else if (v_in[1]) scb = ~a_in[1][BIT];
    else              scb = 1'b0;
  end

  se2x2 #(.W(NB+1)) u_addr_switch (
    .scb (scb),
    .in0 ({v_in[0], a_in[0]}),
    .in1 ({v_in[1], a_in[1]}),
    .out0(sw_out[0]),
    .out1(sw_out[1])
  );

  assign {v_out[0], a_out[0]} = sw_out[0];
  assign {v_out[1], a_out[1]} = sw_out[1];
endmodule
