// clos_switch: three-stage Clos switch C(n, n, r), N = n*r inputs and outputs.
//
// r input crossbars of n x n, n middle crossbars of r x r and r output
// crossbars of n x n, each an xbs grid of 2x2 elements. Input switch x sends
// its column y to row x of middle switch y; middle switch y sends its column z
// to row y of output switch z; input i is row i mod n of input switch i / n and
// output j is column j mod n of output switch j / n. The number of middle
// switches equals n, the configuration the routing algorithm is built for.
// Control: bar1[x][l][y] = 1 connects input l of input switch x to middle
// switch y; bar2[y][x][z] = 1 connects, in middle switch y, input switch x to
// output switch z; bar3[z][y][t] = 1 connects, in output switch z, middle
// switch y to output t. The data path is combinational; the idle top/right
// ports of the crossbars are not used here.
//
// The three-stage structure with m = n follows the document; the order of
// the crossbar indices in the control arrays is this design's choice.
module clos_switch #(
  parameter int NSW = 4,   // n: ports per input/output switch, middle switches
  parameter int RSW = 2,   // r: input/output switches
  parameter int W   = 8
) (
  input  logic [NSW-1:0][NSW-1:0] bar1 [RSW],
  input  logic [RSW-1:0][RSW-1:0] bar2 [NSW],
  input  logic [NSW-1:0][NSW-1:0] bar3 [RSW],
  input  logic [W-1:0]            data_in  [NSW*RSW],
  output logic [W-1:0]            data_out [NSW*RSW]
);
  logic [W-1:0] zero_n [NSW];
  logic [W-1:0] zero_r [RSW];
  logic [W-1:0] s1_out [RSW][NSW];   // [input switch][middle switch]
  logic [W-1:0] s2_out [NSW][RSW];   // [middle switch][output switch]

  always_comb begin
    for (int k = 0; k < NSW; k++) zero_n[k] = '0;
    for (int k = 0; k < RSW; k++) zero_r[k] = '0;
  end

  for (genvar x = 0; x < RSW; x++) begin : g_in
    logic [W-1:0] rin [NSW];
    logic [W-1:0] cout [NSW];
    for (genvar l = 0; l < NSW; l++) begin : g_p
      assign rin[l]     = data_in[x*NSW + l];
      assign s1_out[x][l] = cout[l];
    end
    xbs #(.ROWS(NSW), .COLS(NSW), .W(W)) u_xbs (
      .bar(bar1[x]), .row_in(rin), .col_in(zero_n), .col_out(cout), .row_out()
    );
  end

  for (genvar y = 0; y < NSW; y++) begin : g_mid
    logic [W-1:0] rin [RSW];
    logic [W-1:0] cout [RSW];
    for (genvar x = 0; x < RSW; x++) begin : g_p
      assign rin[x]       = s1_out[x][y];
      assign s2_out[y][x] = cout[x];
    end
    xbs #(.ROWS(RSW), .COLS(RSW), .W(W)) u_xbs (
      .bar(bar2[y]), .row_in(rin), .col_in(zero_r), .col_out(cout), .row_out()
    );
  end

  for (genvar z = 0; z < RSW; z++) begin : g_out
    logic [W-1:0] rin [NSW];
    logic [W-1:0] cout [NSW];
    for (genvar y = 0; y < NSW; y++) begin : g_p
      assign rin[y]               = s2_out[y][z];
      assign data_out[z*NSW + y]  = cout[y];
    end
    xbs #(.ROWS(NSW), .COLS(NSW), .W(W)) u_xbs (
      .bar(bar3[z]), .row_in(rin), .col_in(zero_n), .col_out(cout), .row_out()
    );
  end
endmodule
