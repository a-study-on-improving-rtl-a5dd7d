// tb_clos_pcu: routing control of a C(4,4,4) Clos network (16 inputs).
// Random full and partial permutations; checks the latency
// (5*log2(4) + 1 = 11 clocks), that every crossbar has at most one bar element
// per row and per column, and, by tracing each valid input through the three
// crossbar stages, that it reaches its requested output; idle inputs must
// set nothing.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_clos_pcu;
  localparam int NSW = 4, RSW = 4, N = 16, NB = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [NB-1:0] a_in [N];
  logic          v_in [N];
  logic [NSW-1:0][NSW-1:0] bar1 [RSW];
  logic [RSW-1:0][RSW-1:0] bar2 [NSW];
  logic [NSW-1:0][NSW-1:0] bar3 [RSW];
  logic [N/2-1:0] rep_flags [2];
  int checks = 0, failures = 0;

  clos_pcu #(.NSW(NSW), .RSW(RSW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit partial);
    int perm [N];
    bit v [N];
    int lat, nbar;
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < N; i++) begin
      v[i] = partial ? ($urandom_range(2, 0) != 0) : 1'b1;
      a_in[i] = NB'(perm[i]);
      v_in[i] = v[i];
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
    while (!done && lat < 60) begin @(negedge clk); lat++; end
    check(lat == 5 * 2 + 1, $sformatf("latency %0d", lat));
    // one bar per row and column in every crossbar
    nbar = 0;
    for (int x = 0; x < RSW; x++)
      for (int a = 0; a < NSW; a++) begin
        int rc = 0, cc = 0;
        for (int b = 0; b < NSW; b++) begin
          rc += bar1[x][a][b]; cc += bar1[x][b][a];
          nbar += bar1[x][a][b];
        end
        check(rc <= 1 && cc <= 1, "input switch row/column");
      end
    for (int y = 0; y < NSW; y++)
      for (int a = 0; a < RSW; a++) begin
        int rc = 0, cc = 0;
        for (int b = 0; b < RSW; b++) begin rc += bar2[y][a][b]; cc += bar2[y][b][a]; end
        check(rc <= 1 && cc <= 1, "middle switch row/column");
      end
    for (int z = 0; z < RSW; z++)
      for (int a = 0; a < NSW; a++) begin
        int rc = 0, cc = 0;
        for (int b = 0; b < NSW; b++) begin rc += bar3[z][a][b]; cc += bar3[z][b][a]; end
        check(rc <= 1 && cc <= 1, "output switch row/column");
      end
    // trace every input
    for (int i = 0; i < N; i++) begin
      int x, l, y, z, t;
      x = i / NSW; l = i % NSW; y = -1; z = -1; t = -1;
      for (int b = 0; b < NSW; b++) if (bar1[x][l][b]) y = b;
      if (!v[i]) begin
        check(y < 0, $sformatf("idle input %0d set a crosspoint", i));
      end else begin
        if (y >= 0) for (int b = 0; b < RSW; b++) if (bar2[y][x][b]) z = b;
        if (z >= 0) for (int b = 0; b < NSW; b++) if (bar3[z][y][b]) t = b;
        check(y >= 0 && z >= 0 && t >= 0 && z * NSW + t == perm[i],
              $sformatf("input %0d traced to %0d want %0d", i, z * NSW + t, perm[i]));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin a_in[i] = '0; v_in[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) run(t % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
