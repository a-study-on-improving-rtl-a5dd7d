// benes_switch: N x N Benes switch body, 2*log2(N)-1 columns of N/2 SEs.
//
// Built as the recursive Benes network: a splitting column whose SEs send the
// upper outlet to the upper half-size sub-network and the lower outlet to the
// lower one, the two sub-networks, and a mirror-image merging column; the
// recursion ends with single 2x2 SEs in the centre column. Columns are
// numbered p = 0 .. 2n-2 from the inputs (n = log2 N), SE rows as described
// in clos_pkg. scb[p][h] = 0 sets SE S(p,h) to bar, 1 to cross. The
// data path is combinational; the settings come from benes_pcu.
//
// The column structure (2n-1 columns of N/2 SEs, recursive halving) follows
// the document; the exact row numbering of the sub-networks is this design's
// own choice, matched by the control unit.
module benes_switch #(
  parameter int N = 32,
  parameter int W = 8
) (
  input  logic [N/2-1:0] scb     [2*$clog2(N)-1],
  input  logic [W-1:0]   data_in [N],
  output logic [W-1:0]   data_out[N]
);
  import clos_pkg::*;

  localparam int NB     = $clog2(N);
  localparam int STAGES = 2 * NB - 1;

  for (genvar p = 0; p < STAGES; p++) begin : g_stage
    // size of the sub-networks this column belongs to
    localparam int K = (p < NB) ? p : (STAGES - 1 - p);
    localparam int M = N >> K;
    logic [W-1:0] i [N];   // signals entering column p, by position
    logic [W-1:0] o [N];   // signals leaving column p, by position

    if (p == 0) begin : g_first
      assign i = data_in;
    end else begin : g_next
      assign i = g_stage[p-1].o;
    end

    for (genvar h = 0; h < N/2; h++) begin : g_se
      if (p < NB - 1) begin : g_split
        se2x2 #(.W(W)) u_se (
          .scb (scb[p][h]),
          .in0 (i[split_in_pos(M, h, 0)]),
          .in1 (i[split_in_pos(M, h, 1)]),
          .out0(o[split_out_pos(M, h, 0)]),
          .out1(o[split_out_pos(M, h, 1)])
        );
      end else if (p == NB - 1) begin : g_centre
        se2x2 #(.W(W)) u_se (
          .scb (scb[p][h]),
          .in0 (i[2*h]),
          .in1 (i[2*h+1]),
          .out0(o[2*h]),
          .out1(o[2*h+1])
        );
      end else begin : g_merge
        se2x2 #(.W(W)) u_se (
          .scb (scb[p][h]),
          .in0 (i[split_out_pos(M, h, 0)]),
          .in1 (i[split_out_pos(M, h, 1)]),
          .out0(o[split_in_pos(M, h, 0)]),
          .out1(o[split_in_pos(M, h, 1)])
        );
      end
    end
  end

  assign data_out = g_stage[STAGES-1].o;
endmodule
