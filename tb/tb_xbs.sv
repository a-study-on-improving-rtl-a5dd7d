// tb_xbs: crossbar grid of 2x2 elements. Sets a random partial one-to-one
// map (one bar element per used row and column), drives random rows and top
// ports, and checks every bottom output (the mapped row, else the top port
// straight through) and every right output (the row straight through, or the
// top port turned by the row's bar element). Includes the 4 x 4 example of
// routing input 2 to output 3 through the element in row 2, column 3.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_xbs;
  localparam int R = 4, C = 5, W = 8;
  logic [R-1:0][C-1:0] bar;
  logic [W-1:0] row_in [R], col_in [C], col_out [C], row_out [R];
  int checks = 0, failures = 0;

  xbs #(.ROWS(R), .COLS(C), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input int map [R]);
    for (int o = 0; o < C; o++) begin
      int src = -1;
      for (int i = 0; i < R; i++) if (map[i] == o) src = i;
      checks++;
      if (col_out[o] != ((src >= 0) ? row_in[src] : col_in[o])) begin
        failures++;
        $display("FAIL col_out[%0d]", o);
      end
    end
    for (int i = 0; i < R; i++) begin
      checks++;
      if (row_out[i] != ((map[i] >= 0) ? col_in[map[i]] : row_in[i])) begin
        failures++;
        $display("FAIL row_out[%0d]", i);
      end
    end
  endtask

  initial begin
    int map [R];
    int cols [C];
    // example: input i2 (row 1) to output o3 (column 2)
    bar = '0;
    bar[1][2] = 1'b1;
    for (int i = 0; i < R; i++) begin
      row_in[i] = W'(8'h10 + i);
      map[i] = -1;
    end
    map[1] = 2;
    for (int c = 0; c < C; c++) col_in[c] = W'(8'hA0 + c);
    #1;
    check_all(map);
    for (int t = 0; t < 300; t++) begin
      for (int c = 0; c < C; c++) cols[c] = c;
      for (int c = C - 1; c > 0; c--) begin
        int j, tmp;
        j = $urandom_range(c, 0);
        tmp = cols[c]; cols[c] = cols[j]; cols[j] = tmp;
      end
      bar = '0;
      for (int i = 0; i < R; i++) begin
        map[i] = ($urandom_range(3, 0) == 0) ? -1 : cols[i];
        if (map[i] >= 0) bar[i][map[i]] = 1'b1;
        row_in[i] = W'($urandom);
      end
      for (int c = 0; c < C; c++) col_in[c] = W'($urandom);
      #1;
      check_all(map);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
