// clos_pcu: parallel routing control for the three-stage Clos switch
// C(n, n, r) with n and r powers of two (N = n*r).
//
// Each n x n input switch is viewed as n/2 virtual 2x2 SEs followed by further
// splitting columns, which makes the Clos network look like a Benes network
// whose first log2(n) columns form the input switches, whose r x r
// sub-networks at depth log2(n) are the n middle switches and whose last
// log2(n) columns form the output switches. The Benes division part
// (div_columns, log2(n) columns of pe_groups) splits the requests so that
// every middle switch receives at most one request from each input switch and
// at most one for each output switch. The settings of the three crossbar
// stages then follow directly:
//   * input switch x: the request that ends at middle switch y, traced back
//     through the virtual SEs to its input l, sets bar1[x][l][y];
//   * middle switch y: the request from input switch x for output j sets
//     bar2[y][x][j / n] (destination tag);
//   * output switch z = j / n: bar3[z][y][j mod n].
// Timing: start is sampled with a_in/v_in (a_in[i] = output wanted by input
// i, v_in[i] = 0 for an idle input); the division takes 5*log2(n) clocks and
// the crossbar settings are registered one clock later, when done pulses
// (11 clocks for C(4,4,2)). Settings hold until the next start; a start while
// busy is ignored. Requires n >= 2.
//
// Viewing the input switches as virtual 2x2 SEs and dividing them with the
// Benes division follows the document; the middle-switch numbering, the
// back-tracing of inputs and setting the middle and output stages directly
// from the destination address are this design's own choices.
module clos_pcu #(
  parameter int NSW = 4,
  parameter int RSW = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [$clog2(NSW*RSW)-1:0] a_in [NSW*RSW],
  input  logic v_in [NSW*RSW],
  output logic busy,
  output logic done,
  output logic [NSW-1:0][NSW-1:0] bar1 [RSW],
  output logic [RSW-1:0][RSW-1:0] bar2 [NSW],
  output logic [NSW-1:0][NSW-1:0] bar3 [RSW],
  output logic [NSW*RSW/2-1:0]    rep_flags [$clog2(NSW)]
);
  import clos_pkg::*;

  localparam int N  = NSW * RSW;
  localparam int NB = $clog2(N);
  localparam int K1 = $clog2(NSW);

  logic [NB-1:0]  div_a [N];
  logic           div_v [N];
  logic           div_fin;
  logic [N/2-1:0] div_scb [K1];

  div_columns #(.N(N), .LEVELS(K1)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .a_in     (a_in),
    .v_in     (v_in),
    .busy     (busy),
    .fin      (div_fin),
    .scb      (div_scb),
    .rep_flags(rep_flags),
    .a_out    (div_a),
    .v_out    (div_v)
  );

  // Trace input numbers through the virtual SEs of the input switches.
  for (genvar k = 0; k < K1; k++) begin : g_lab
    localparam int M = N >> k;
    logic [NB-1:0] li [N];
    logic [NB-1:0] lo [N];
    if (k == 0) begin : g_first
      for (genvar i = 0; i < N; i++) begin : g_i
        assign li[i] = NB'(i);
      end
    end else begin : g_next
      assign li = g_lab[k-1].lo;
    end
    for (genvar h = 0; h < N/2; h++) begin : g_se
      se2x2 #(.W(NB)) u_vse (
        .scb (div_scb[k][h]),
        .in0 (li[split_in_pos(M, h, 0)]),
        .in1 (li[split_in_pos(M, h, 1)]),
        .out0(lo[split_out_pos(M, h, 0)]),
        .out1(lo[split_out_pos(M, h, 1)])
      );
    end
  end

  // Crossbar settings from the division result.
  logic [NSW-1:0][NSW-1:0] nb1 [RSW];
  logic [RSW-1:0][RSW-1:0] nb2 [NSW];
  logic [NSW-1:0][NSW-1:0] nb3 [RSW];

  always_comb begin
    for (int x = 0; x < RSW; x++) begin
      nb1[x] = '0;
      nb3[x] = '0;
    end
    for (int y = 0; y < NSW; y++) nb2[y] = '0;
    for (int y = 0; y < NSW; y++) begin
      for (int x = 0; x < RSW; x++) begin
        int src, dst;
        src = int'(g_lab[K1-1].lo[y*RSW + x]);
        dst = int'(div_a[y*RSW + x]);
        if (div_v[y*RSW + x]) begin
          nb1[x][src % NSW][y] = 1'b1;
          nb2[y][x][dst / NSW] = 1'b1;
          nb3[dst / NSW][y][dst % NSW] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int x = 0; x < RSW; x++) begin
        bar1[x] <= '0;
        bar3[x] <= '0;
      end
      for (int y = 0; y < NSW; y++) bar2[y] <= '0;
    end else begin
      done <= div_fin;
      if (div_fin) begin
        bar1 <= nb1;
        bar2 <= nb2;
        bar3 <= nb3;
      end
    end
  end
endmodule
