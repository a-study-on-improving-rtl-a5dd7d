// tb_pe_group: one group of processing elements (the first division column).
//
// Directed cases for N = 8 (four PEs), with the results worked out by hand
// from the algorithm:
//   * permutation 7 5 2 0 6 3 4 1: one cycle, representative PE 11, SE
//     states bar/cross/cross/bar, sub-permutations of output-SE numbers
//     {3,0,1,2} (upper) and {2,1,3,0} (lower);
//   * permutation 3 4 5 0 2 6 7 1: representative PE 11, states
//     cross/cross/bar/bar;
//   * the same with input 4 idle: an open chain PE 00 - 01 - 11 - 10 whose
//     end PEs carry suffixes 100 and 110; PE 10 is the representative and the
//     states are cross/cross/bar/bar.
// Then random full and partial permutations for a 16-PE group at level 0 and
// a 4-PE group at level 2 of a 32-input network, compared with the reference
// model, with the sub-permutation rule (no two addresses of the same output
// pair in one half) and the five-clock start-to-done latency checked.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_pe_group;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // N = 8, level 0
  logic          s8 = 0, b8, d8;
  logic [2:0]    a8 [8], ua8 [4], la8 [4];
  logic          v8 [8], uv8 [4], lv8 [4];
  logic [3:0]    scb8, rep8;
  pe_group #(.NB(3), .K(0)) dut8 (.clk, .rst_n, .start(s8), .a_in(a8), .v_in(v8),
    .busy(b8), .done(d8), .scb(scb8), .rep_flag(rep8),
    .up_a(ua8), .up_v(uv8), .lo_a(la8), .lo_v(lv8));

  // N = 32, level 0 (16 PEs)
  logic          s32 = 0, b32, d32;
  logic [4:0]    a32 [32], ua32 [16], la32 [16];
  logic          v32 [32], uv32 [16], lv32 [16];
  logic [15:0]   scb32, rep32;
  pe_group #(.NB(5), .K(0)) dut32 (.clk, .rst_n, .start(s32), .a_in(a32), .v_in(v32),
    .busy(b32), .done(d32), .scb(scb32), .rep_flag(rep32),
    .up_a(ua32), .up_v(uv32), .lo_a(la32), .lo_v(lv32));

  // N = 32, level 2 (8 addresses, 4 PEs)
  logic          s2 = 0, b2, d2;
  logic [4:0]    a2 [8], ua2 [4], la2 [4];
  logic          v2 [8], uv2 [4], lv2 [4];
  logic [3:0]    scb2, rep2;
  pe_group #(.NB(5), .K(2)) dutk2 (.clk, .rst_n, .start(s2), .a_in(a2), .v_in(v2),
    .busy(b2), .done(d2), .scb(scb2), .rep_flag(rep2),
    .up_a(ua2), .up_v(uv2), .lo_a(la2), .lo_v(lv2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run8(input int perm [8], input bit vld [8]);
    int lat = 0;
    for (int i = 0; i < 8; i++) begin a8[i] = 3'(perm[i]); v8[i] = vld[i]; end
    @(negedge clk); s8 = 1; @(negedge clk); s8 = 0; lat = 1;
    while (!d8 && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("N=8 latency %0d", lat));
  endtask

  // generic random run against the model
  task automatic run_rand(input int which, input bit partial);
    arr_t a; barr_t v, rs, rr;
    int nc, nch, m, k, lat, p_cnt;
    int perm [32];
    m = (which == 0) ? 32 : 8;
    k = (which == 0) ? 0 : 2;
    p_cnt = m / 2;
    // addresses of one level-k sub-network: all distinct in bits 4..k,
    // i.e. one address from each pair of bit-(k-1..0) groups
    for (int i = 0; i < m; i++) perm[i] = i;
    for (int i = m - 1; i > 0; i--) begin
      int j = $urandom_range(i, 0); int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < m; i++) begin
      a[i] = (perm[i] << k) | $urandom_range((1 << k) - 1, 0);
      v[i] = partial ? ($urandom_range(3, 0) != 0) : 1'b1;
    end
    split_ref(m, k, a, v, rs, rr, nc, nch);
    @(negedge clk);
    if (which == 0) begin
      for (int i = 0; i < 32; i++) begin a32[i] = 5'(a[i]); v32[i] = v[i]; end
      s32 = 1; @(negedge clk); s32 = 0;
    end else begin
      for (int i = 0; i < 8; i++) begin a2[i] = 5'(a[i]); v2[i] = v[i]; end
      s2 = 1; @(negedge clk); s2 = 0;
    end
    lat = 1;
    while (!((which == 0) ? d32 : d2) && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("latency %0d", lat));
    for (int p = 0; p < p_cnt; p++) begin
      bit s  = (which == 0) ? scb32[p] : scb2[p];
      bit r  = (which == 0) ? rep32[p] : rep2[p];
      check(s == rs[p], $sformatf("group %0d PE %0d state", which, p));
      check(r == rr[p], $sformatf("group %0d PE %0d representative", which, p));
    end
    // sub-permutation rule: within each half the regions above bit k differ
    for (int p = 0; p < p_cnt; p++)
      for (int q = p + 1; q < p_cnt; q++) begin
        if (which == 0) begin
          if (uv32[p] && uv32[q]) check((ua32[p] >> 1) != (ua32[q] >> 1), "upper half pair split");
          if (lv32[p] && lv32[q]) check((la32[p] >> 1) != (la32[q] >> 1), "lower half pair split");
        end else begin
          if (uv2[p] && uv2[q]) check((ua2[p] >> 3) != (ua2[q] >> 3), "upper half pair split");
          if (lv2[p] && lv2[q]) check((la2[p] >> 3) != (la2[q] >> 3), "lower half pair split");
        end
      end
  endtask

  initial begin
    int perm [8];
    bit vld [8];
    for (int i = 0; i < 8; i++) begin a8[i] = '0; v8[i] = 0; a2[i] = '0; v2[i] = 0; end
    for (int i = 0; i < 32; i++) begin a32[i] = '0; v32[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 7 5 2 0 6 3 4 1
    perm = '{7, 5, 2, 0, 6, 3, 4, 1};
    vld  = '{1, 1, 1, 1, 1, 1, 1, 1};
    run8(perm, vld);
    check(scb8 == 4'b0110, $sformatf("example 1 states %b", scb8));
    check(rep8 == 4'b1000, $sformatf("example 1 representative %b", rep8));
    check((ua8[0] >> 1) == 3 && (ua8[1] >> 1) == 0 && (ua8[2] >> 1) == 1 && (ua8[3] >> 1) == 2,
          "example 1 upper sub-permutation");
    check((la8[0] >> 1) == 2 && (la8[1] >> 1) == 1 && (la8[2] >> 1) == 3 && (la8[3] >> 1) == 0,
          "example 1 lower sub-permutation");
    // 3 4 5 0 2 6 7 1
    perm = '{3, 4, 5, 0, 2, 6, 7, 1};
    run8(perm, vld);
    check(scb8 == 4'b0011, $sformatf("example 2 states %b", scb8));
    check(rep8 == 4'b1000, $sformatf("example 2 representative %b", rep8));
    // input 4 idle
    vld[4] = 0;
    run8(perm, vld);
    check(scb8 == 4'b0011, $sformatf("example 3 states %b", scb8));
    check(rep8 == 4'b0100, $sformatf("example 3 representative %b", rep8));
    check(!uv8[2] || !lv8[2], "example 3 idle input stays idle");

    for (int t = 0; t < 150; t++) begin
      run_rand(0, t % 2);
      run_rand(1, t % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
