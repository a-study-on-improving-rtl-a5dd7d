// tb_benes_switch: 8 x 8 and 16 x 16 Benes switch bodies against a recursive
// reference model of the Benes network (splitting column, two half-size
// networks, merging column). All-bar settings must give the identity; random
// settings must match the model and always give a permutation.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_benes_switch;
  localparam int W = 8;
  int checks = 0, failures = 0;

  logic [3:0]  scb8  [5];
  logic [W-1:0] in8 [8], out8 [8];
  logic [7:0]  scb16 [7];
  logic [W-1:0] in16 [16], out16 [16];

  benes_switch #(.N(8),  .W(W)) dut8  (.scb(scb8),  .data_in(in8),  .data_out(out8));
  benes_switch #(.N(16), .W(W)) dut16 (.scb(scb16), .data_in(in16), .data_out(out16));

  typedef int vec_t [16];
  typedef bit set_t [7][8];

  // Recursive Benes network of size n whose columns start at `first` and
  // whose SE rows start at `row`: splitting column, upper network (rows
  // row .. row+n/4-1 of the inner columns), lower network, merging column.
  function automatic vec_t model(input int n, input vec_t din, input set_t st,
                                 input int first, input int row);
    vec_t up, lo, uo, loo, dout;
    int ncol = 2 * $clog2(n) - 1;
    if (n == 2) begin
      dout = din;
      if (st[first][row]) begin dout[0] = din[1]; dout[1] = din[0]; end
      return dout;
    end
    for (int q = 0; q < n/2; q++) begin
      if (st[first][row + q]) begin up[q] = din[2*q+1]; lo[q] = din[2*q]; end
      else                    begin up[q] = din[2*q];   lo[q] = din[2*q+1]; end
    end
    uo  = model(n/2, up, st, first + 1, row);
    loo = model(n/2, lo, st, first + 1, row + n/4);
    for (int q = 0; q < n/2; q++) begin
      if (st[first + ncol - 1][row + q]) begin dout[2*q] = loo[q]; dout[2*q+1] = uo[q]; end
      else                               begin dout[2*q] = uo[q];  dout[2*q+1] = loo[q]; end
    end
    return dout;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      set_t c8, c16;
      vec_t d8, d16, e8, e16;
      bit seen [256];
      for (int p = 0; p < 7; p++)
        for (int h = 0; h < 8; h++) begin c8[p][h] = 0; c16[p][h] = 0; end
      for (int p = 0; p < 5; p++) begin
        scb8[p] = (t == 0) ? '0 : 4'($urandom);
        for (int h = 0; h < 4; h++) c8[p][h] = scb8[p][h];
      end
      for (int p = 0; p < 7; p++) begin
        scb16[p] = (t == 0) ? '0 : 8'($urandom);
        for (int h = 0; h < 8; h++) c16[p][h] = scb16[p][h];
      end
      for (int i = 0; i < 16; i++) begin d8[i] = 0; d16[i] = i + 1; end
      for (int i = 0; i < 8; i++)  begin in8[i]  = W'(i + 1);  d8[i] = i + 1; end
      for (int i = 0; i < 16; i++) in16[i] = W'(i + 1);
      #1;
      e8  = model(8, d8, c8, 0, 0);
      e16 = model(16, d16, c16, 0, 0);
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (out8[j] != W'(e8[j])) failures++;
        if (t == 0) begin checks++; if (out8[j] != W'(j + 1)) failures++; end
      end
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (out16[j] != W'(e16[j])) failures++;
        if (t == 0) begin checks++; if (out16[j] != W'(j + 1)) failures++; end
      end
      for (int k = 0; k < 256; k++) seen[k] = 0;
      for (int j = 0; j < 16; j++) seen[out16[j]] = 1;
      for (int j = 1; j <= 16; j++) begin checks++; if (!seen[j]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
