// tb_clos_switch: C(4,4,2) Clos switch body with directly driven crossbars.
// Input l of input switch x goes to middle switch l; middle switch y maps
// input switch x to output switch sigma_y(x); output switch z maps middle
// switch y to output tau_z(y) (random permutations). The expected output of
// every input follows from these choices, worked out in the testbench.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_clos_switch;
  localparam int NSW = 4, RSW = 2, N = 8, W = 8;
  logic [NSW-1:0][NSW-1:0] bar1 [RSW];
  logic [RSW-1:0][RSW-1:0] bar2 [NSW];
  logic [NSW-1:0][NSW-1:0] bar3 [RSW];
  logic [W-1:0] data_in [N], data_out [N];
  int checks = 0, failures = 0;

  clos_switch #(.NSW(NSW), .RSW(RSW), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int sigma [NSW][RSW];
      int tau [RSW][NSW];
      int perm [NSW];
      for (int y = 0; y < NSW; y++) begin
        bit sw;
        sw = $urandom_range(1, 0);
        sigma[y][0] = sw; sigma[y][1] = !sw;
      end
      for (int z = 0; z < RSW; z++) begin
        for (int k = 0; k < NSW; k++) perm[k] = k;
        for (int k = NSW - 1; k > 0; k--) begin
          int j, tmp;
          j = $urandom_range(k, 0); tmp = perm[k]; perm[k] = perm[j]; perm[j] = tmp;
        end
        for (int y = 0; y < NSW; y++) tau[z][y] = perm[y];
      end
      for (int x = 0; x < RSW; x++) begin
        bar1[x] = '0;
        bar3[x] = '0;
        for (int l = 0; l < NSW; l++) bar1[x][l][l] = 1'b1;
      end
      for (int y = 0; y < NSW; y++) begin
        bar2[y] = '0;
        for (int x = 0; x < RSW; x++) bar2[y][x][sigma[y][x]] = 1'b1;
      end
      for (int z = 0; z < RSW; z++)
        for (int y = 0; y < NSW; y++) bar3[z][y][tau[z][y]] = 1'b1;
      for (int i = 0; i < N; i++) data_in[i] = W'($urandom);
      #1;
      for (int x = 0; x < RSW; x++)
        for (int l = 0; l < NSW; l++) begin
          int z, j;
          z = sigma[l][x];
          j = z * NSW + tau[z][l];
          checks++;
          if (data_out[j] != data_in[x*NSW + l]) begin
            failures++;
            $display("FAIL input %0d -> output %0d", x*NSW + l, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
