// tb_benes_pcu: parallel control unit of a 16 x 16 Benes network.
//
// Random full and partial permutations. For each: the start-to-done latency
// must be 5*(log2 16 - 1) + 1 = 16 clocks; every valid address must leave
// the last column at its own output (the unit's own routing of the address
// pairs); the settings are then applied to an independent, sequential model
// of the 16 x 16 Benes network and every input must reach its output; the
// first column must match the reference division model. A start while busy
// must be ignored.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_benes_pcu;
  import tb_model_pkg::*;
  localparam int N = 16, NB = 4, ST = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [NB-1:0] a_in [N], a_out [N];
  logic          v_in [N], v_out [N];
  logic [N/2-1:0] scb [ST];
  logic [N/2-1:0] rep_flags [NB-1];
  int checks = 0, failures = 0;

  benes_pcu #(.N(N)) dut (.*);

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

  // sequential Benes model: column p pairs, position maps of each column
  function automatic void apply(input logic [N/2-1:0] s [ST], input int din [N], output int dout [N]);
    int cur [N], nxt [N];
    cur = din;
    for (int p = 0; p < ST; p++) begin
      int k = (p < NB) ? p : (ST - 1 - p);
      int m = N >> k;
      for (int h = 0; h < N/2; h++) begin
        int sb = h / (m/2), q = h % (m/2);
        int i0, i1, o0, o1;
        if (p < NB - 1)       begin i0 = sb*m + 2*q; i1 = i0 + 1; o0 = sb*m + q; o1 = o0 + m/2; end
        else if (p == NB - 1) begin i0 = 2*h; i1 = 2*h + 1; o0 = i0; o1 = i1; end
        else                  begin o0 = sb*m + 2*q; o1 = o0 + 1; i0 = sb*m + q; i1 = i0 + m/2; end
        nxt[o0] = s[p][h] ? cur[i1] : cur[i0];
        nxt[o1] = s[p][h] ? cur[i0] : cur[i1];
      end
      cur = nxt;
    end
    dout = cur;
  endfunction

  task automatic run(input bit partial, input bit poke);
    arr_t a; barr_t v, rs, rr;
    int perm [N], din [N], dout [N];
    int nc, nch, lat;
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < N; i++) begin
      a[i] = perm[i];
      v[i] = partial ? ($urandom_range(2, 0) != 0) : 1'b1;
      a_in[i] = NB'(a[i]);
      v_in[i] = v[i];
      din[i] = i + 1;
    end
    split_ref(N, 0, a, v, rs, rr, nc, nch);
    @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
    while (!done && lat < 60) begin
      if (poke && lat == 3) begin
        check(busy, "busy while processing");
        start = 1;
        for (int i = 0; i < N; i++) a_in[i] = NB'(i);
      end else begin
        start = 0;
        for (int i = 0; i < N; i++) a_in[i] = NB'(a[i]);
      end
      @(negedge clk); lat++;
    end
    start = 0;
    check(lat == 5 * (NB - 1) + 1, $sformatf("latency %0d", lat));
    check(!busy, "idle after done");
    apply(scb, din, dout);
    for (int j = 0; j < N; j++) begin
      int src = -1;
      for (int i = 0; i < N; i++) if (v[i] && a[i] == j) src = i;
      if (src >= 0) begin
        check(v_out[j] && a_out[j] == NB'(j), $sformatf("address at output %0d", j));
        check(dout[j] == src + 1, $sformatf("model routing output %0d", j));
      end else
        check(!v_out[j], $sformatf("idle output %0d", j));
    end
    for (int p = 0; p < N/2; p++) begin
      check(scb[0][p] == rs[p], $sformatf("column 0 SE %0d", p));
      check(rep_flags[0][p] == rr[p], $sformatf("column 0 representative %0d", p));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin a_in[i] = '0; v_in[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) run(t % 3 == 2, t % 20 == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
