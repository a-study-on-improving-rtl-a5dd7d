// benes_pcu: parallel control unit (PCU) of an N x N Benes network.
//
// From the destination address of every input (a_in[i] = output wanted by
// input i, v_in[i] = 0 for an idle input) it computes the switch control bits
// of all 2n-1 columns of benes_switch (n = log2 N), so that every valid input
// reaches its output without conflict. It works in the two parts of the
// document's routing algorithm:
//   * division (columns 0 .. n-2): column K has 2^K independent pe_groups of
//     N/2^(K+1) PEs each, one per sub-network; each splits its addresses into
//     two sub-permutations (the looping algorithm's division, in parallel) and
//     hands them to the two groups below it;
//   * destination-tag routing (columns n-1 .. 2n-2): one dtr_pe per SE sets
//     the SE from one address bit; this part is combinational.
// Timing: start is sampled with a_in/v_in. Each division column takes five
// clocks and starts the next column with its done pulse; the DTR results are
// registered one clock after the last division column, when done pulses.
// Start-to-done latency is 5*(n-1)+1 clocks (21 for N = 32). scb and the
// routed addresses hold until the next start; a start while busy is ignored.
// Unlike the document's pipelined PCU, a new permutation is taken only when
// the previous one has finished (this design's simplification).
// a_out/v_out give the addresses as they leave the last column: a_out[j] = j
// for every valid one (a self-check of the routing). rep_flags marks, per
// division column and SE row, the PEs that acted as representative.
module benes_pcu #(
  parameter int N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [$clog2(N)-1:0] a_in [N],
  input  logic           v_in [N],
  output logic           busy,
  output logic           done,
  output logic [N/2-1:0] scb  [2*$clog2(N)-1],
  output logic [N/2-1:0] rep_flags [$clog2(N)-1],
  output logic [$clog2(N)-1:0] a_out [N],
  output logic           v_out [N]
);
  import clos_pkg::*;

  localparam int NB     = $clog2(N);
  localparam int STAGES = 2 * NB - 1;
  localparam int DIVS   = NB - 1;


  // ---------------- division part ----------------
  logic [NB-1:0]  div_a [N];
  logic           div_v [N];
  logic           div_fin;
  logic [N/2-1:0] div_scb [DIVS];

  div_columns #(.N(N), .LEVELS(DIVS)) u_div (
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

  for (genvar k = 0; k < DIVS; k++) begin : g_div_scb
    assign scb[k] = div_scb[k];
  end

  // ---------------- destination-tag routing part ----------------
  logic [N/2-1:0] dtr_scb [NB];

  for (genvar p = DIVS; p < STAGES; p++) begin : g_dtr
    localparam int K = STAGES - 1 - p;   // address bit used by this column
    localparam int M = N >> K;
    logic [NB-1:0] i [N];
    logic          iv [N];
    logic [NB-1:0] o [N];
    logic          ov [N];

    if (p == DIVS) begin : g_first
      assign i  = div_a;
      assign iv = div_v;
    end else begin : g_next
      assign i  = g_dtr[p-1].o;
      assign iv = g_dtr[p-1].ov;
    end

    for (genvar h = 0; h < N/2; h++) begin : g_se
      // centre column pairs positions 2h/2h+1; merging columns mirror the
      // splitting wiring
      localparam int I0 = (p == DIVS) ? 2*h   : split_out_pos(M, h, 0);
      localparam int I1 = (p == DIVS) ? 2*h+1 : split_out_pos(M, h, 1);
      localparam int O0 = (p == DIVS) ? 2*h   : split_in_pos(M, h, 0);
      localparam int O1 = (p == DIVS) ? 2*h+1 : split_in_pos(M, h, 1);
      logic [NB-1:0] pa [2], pao [2];
      logic          pv [2], pvo [2];
      assign pa[0] = i[I0];
      assign pa[1] = i[I1];
      assign pv[0] = iv[I0];
      assign pv[1] = iv[I1];
      dtr_pe #(.NB(NB), .BIT(K)) u_dtr (
        .a_in (pa),
        .v_in (pv),
        .scb  (dtr_scb[p-DIVS][h]),
        .a_out(pao),
        .v_out(pvo)
      );
      assign o[O0]  = pao[0];
      assign o[O1]  = pao[1];
      assign ov[O0] = pvo[0];
      assign ov[O1] = pvo[1];
    end
  end

  logic [N/2-1:0] dtr_scb_q [NB];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int p = 0; p < NB; p++) dtr_scb_q[p] <= '0;
      for (int j = 0; j < N; j++) begin
        a_out[j] <= '0;
        v_out[j] <= 1'b0;
      end
    end else begin
      done <= div_fin;
      if (div_fin) begin
        dtr_scb_q <= dtr_scb;
        a_out     <= g_dtr[STAGES-1].o;
        v_out     <= g_dtr[STAGES-1].ov;
      end
    end
  end

  for (genvar p = 0; p < NB; p++) begin : g_scb
    assign scb[DIVS + p] = dtr_scb_q[p];
  end

endmodule
