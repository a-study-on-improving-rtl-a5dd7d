// xbs: ROWS x COLS crossbar switch built as a grid of 2x2 basic switching
// elements (BSEs).
//
// Signals enter the rows from the left (row_in) and leave the columns at the
// bottom (col_out). Every BSE in the grid is normally in the cross state, so a
// row signal runs straight east and a column signal straight south; setting
// the BSE at (row i, column o) to bar turns row i down into column o. A call
// therefore needs one bar BSE, at its row/column crossing, as in the document's
// crossbar example. The ports on the top edge (col_in) and on the right edge
// (row_out) are the idle ports of a conventional crossbar; they are brought out
// unchanged, tie col_in to zero when they are not used.
//
// Control: bar[i][o] = 1 sets BSE (i,o) to bar. At most one bar per row and
// per column gives a conflict-free connection. Purely combinational.
module xbs #(
  parameter int ROWS = 4,
  parameter int COLS = 4,
  parameter int W    = 8
) (
  input  logic [ROWS-1:0][COLS-1:0] bar,
  input  logic [W-1:0]              row_in  [ROWS],
  input  logic [W-1:0]              col_in  [COLS],
  output logic [W-1:0]              col_out [COLS],
  output logic [W-1:0]              row_out [ROWS]
);
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      logic [W-1:0] west, north, east, south;
      if (c == 0) begin : g_w0
        assign west = row_in[r];
      end else begin : g_w
        assign west = g_c[c-1].east;
      end
      if (r == 0) begin : g_n0
        assign north = col_in[c];
      end else begin : g_n
        assign north = g_r[r-1].g_c[c].south;
      end
      // out0 = south, out1 = east: bar turns west->south and north->east
      se2x2 #(.W(W)) u_bse (
        .scb (~bar[r][c]),
        .in0 (west),
        .in1 (north),
        .out0(south),
        .out1(east)
      );
    end
    assign row_out[r] = g_c[COLS-1].east;
  end
  for (genvar c = 0; c < COLS; c++) begin : g_bottom
    assign col_out[c] = g_r[ROWS-1].g_c[c].south;
  end
endmodule
