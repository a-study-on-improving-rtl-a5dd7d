// div_columns: the division part of the parallel control unit, LEVELS
// splitting columns of pe_groups for an N-input Benes-type network.
//
// Column k has 2^k independent pe_groups of N/2^(k+1) PEs, one per
// sub-network; each splits the addresses entering its sub-network into an
// upper and a lower sub-permutation and hands them to the two groups of the
// next column, whose start is the previous column's done pulse. Column k uses
// address bits n-1..k+1 as the region of interest (n = log2 N). Positions
// and SE rows follow clos_pkg. Timing: start (ignored while busy) is sampled
// with a_in/v_in; every column takes five clocks, so fin pulses 5*LEVELS
// clocks after start, when a_out/v_out hold the addresses entering the
// sub-networks of depth LEVELS and scb/rep_flags hold the settings of the
// LEVELS columns. Everything holds until the next start.
//
// Independent groups per column, each passing its two halves to the next
// column, follow the document; starting each column from the done pulse of
// the one before is this design's choice.
module div_columns #(
  parameter int N      = 32,
  parameter int LEVELS = $clog2(N) - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [$clog2(N)-1:0] a_in [N],
  input  logic           v_in [N],
  output logic           busy,
  output logic           fin,
  output logic [N/2-1:0] scb       [LEVELS],
  output logic [N/2-1:0] rep_flags [LEVELS],
  output logic [$clog2(N)-1:0] a_out [N],
  output logic           v_out [N]
);
  localparam int NB   = $clog2(N);
  localparam int DIVS = LEVELS;

  logic run;   // a permutation is being processed

  for (genvar k = 0; k < DIVS; k++) begin : g_lvl
    localparam int M = N >> k;
    localparam int P = M / 2;
    logic [NB-1:0] ai [N];
    logic          vi [N];
    logic [NB-1:0] ao [N];
    logic          vo [N];
    logic          go;
    logic          lfin;
    logic          gbusy [1 << k];
    logic          gdone [1 << k];

    if (k == 0) begin : g_first
      assign ai = a_in;
      assign vi = v_in;
      assign go = start && !run;
    end else begin : g_next
      assign ai = g_lvl[k-1].ao;
      assign vi = g_lvl[k-1].vo;
      assign go = g_lvl[k-1].lfin;
    end
    assign lfin = gdone[0];

    // a column is only started when its groups are idle
    a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) go |-> !gbusy[0]);

    for (genvar s = 0; s < (1 << k); s++) begin : g_grp
      logic [NB-1:0] ga [M];
      logic          gv [M];
      logic [NB-1:0] ua [P], la [P];
      logic          uv [P], lv [P];
      logic [P-1:0]  gscb, grep;

      for (genvar x = 0; x < M; x++) begin : g_in
        assign ga[x] = ai[s*M + x];
        assign gv[x] = vi[s*M + x];
      end

      pe_group #(.NB(NB), .K(k), .M(M), .P(P)) u_grp (
        .clk     (clk),
        .rst_n   (rst_n),
        .start   (go),
        .a_in    (ga),
        .v_in    (gv),
        .busy    (gbusy[s]),
        .done    (gdone[s]),
        .scb     (gscb),
        .rep_flag(grep),
        .up_a    (ua),
        .up_v    (uv),
        .lo_a    (la),
        .lo_v    (lv)
      );

      for (genvar q = 0; q < P; q++) begin : g_out
        assign ao[s*M + q]       = ua[q];
        assign vo[s*M + q]       = uv[q];
        assign ao[s*M + P + q]   = la[q];
        assign vo[s*M + P + q]   = lv[q];
        assign scb[k][s*P + q]       = gscb[q];
        assign rep_flags[k][s*P + q] = grep[q];
      end
    end
  end


  assign fin   = g_lvl[DIVS-1].lfin;
  assign a_out = g_lvl[DIVS-1].ao;
  assign v_out = g_lvl[DIVS-1].vo;

  always_ff @(posedge clk) begin
    if (!rst_n)             run <= 1'b0;
    else if (start && !run) run <= 1'b1;
    else if (fin)           run <= 1'b0;
  end

  assign busy = run;
endmodule
