// tb_clos_network_top: end-to-end test of both switching systems at the
// default sizes (32 x 32 Benes network, C(4,4,2) Clos network).
//
// Each trial draws a random full or partial permutation (idle inputs with
// probability 1/4), starts the control unit, waits for done and checks:
// the start-to-done latency (21 clocks for the Benes system, 11 for the Clos
// system); that every requested input's data arrives at its output and every
// unrequested output carries nothing; that the addresses leave the Benes
// control unit in order; and that the first division column matches the
// reference model (same SE states and representatives). It also counts how
// often each mechanism occurred: full and partial permutations, columns with
// several cycles (several representatives), open chains of a partial
// permutation (end-node representatives), SEs whose own pair is
// complementary, cross states set by destination-tag routing, and a start
// issued while busy (which must be ignored). A mechanism that never occurred
// is a failure.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_clos_network_top;
  import tb_model_pkg::*;

  localparam int N   = 32;
  localparam int NB  = 5;
  localparam int NSW = 4;
  localparam int RSW = 2;
  localparam int NC  = NSW * RSW;
  localparam int NCB = 3;
  localparam int W   = 8;
  localparam int TRIALS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 bn_start = 1'b0;
  logic [NB-1:0]        bn_addr [N];
  logic                 bn_vld  [N];
  logic [W-1:0]         bn_data_in  [N];
  logic [W-1:0]         bn_data_out [N];
  logic                 bn_busy, bn_done;
  logic [N/2-1:0]       bn_scb [2*NB-1];
  logic [N/2-1:0]       bn_rep_flags [NB-1];
  logic [NB-1:0]        bn_routed_addr [N];
  logic                 bn_routed_vld  [N];
  logic                 cl_start = 1'b0;
  logic [NCB-1:0]       cl_addr [NC];
  logic                 cl_vld  [NC];
  logic [W-1:0]         cl_data_in  [NC];
  logic [W-1:0]         cl_data_out [NC];
  logic                 cl_busy, cl_done;
  logic [NC/2-1:0]      cl_rep_flags [2];

  clos_network_top dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0, n_multi = 0, n_chain = 0, n_self = 0,
      n_dtr_cross = 0, n_busy_start = 0, n_cl_full = 0, n_cl_partial = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gen_perm(input int n, input bit partial,
                          output arr_t a, output barr_t v);
    int perm [MAXM];
    for (int i = 0; i < n; i++) perm[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int j = $urandom_range(i, 0);
      int t = perm[i];
      perm[i] = perm[j];
      perm[j] = t;
    end
    for (int i = 0; i < n; i++) begin
      a[i] = perm[i];
      v[i] = partial ? ($urandom_range(3, 0) != 0) : 1'b1;
    end
  endtask

  task automatic run_benes(input bit partial, input bit poke_busy);
    arr_t a; barr_t v, rscb, rrep;
    int nc, nch, lat;
    bit any_valid;
    gen_perm(N, partial, a, v);
    any_valid = 0;
    for (int i = 0; i < N; i++) any_valid |= v[i];
    for (int i = 0; i < N; i++) begin
      bn_addr[i]    = NB'(a[i]);
      bn_vld[i]     = v[i];
      bn_data_in[i] = W'(i + 1);   // 0 means "nothing"
    end
    split_ref(N, 0, a, v, rscb, rrep, nc, nch);
    if (nc > 1) n_multi++;
    if (partial && nch > 0) n_chain++;
    for (int p = 0; p < N/2; p++)
      if (v[2*p] && v[2*p+1] && (a[2*p] >> 1) == (a[2*p+1] >> 1)) n_self++;
    @(negedge clk);
    bn_start = 1'b1;
    @(negedge clk);
    bn_start = 1'b0;
    lat = 1;
    while (!bn_done && lat < 100) begin
      if (poke_busy && lat == 7) begin
        // a second request while busy must be ignored
        check(bn_busy, "busy during processing");
        for (int i = 0; i < N; i++) bn_addr[i] = NB'(N - 1 - i);
        bn_start = 1'b1;
        @(negedge clk);
        bn_start = 1'b0;
        for (int i = 0; i < N; i++) bn_addr[i] = NB'(a[i]);
        n_busy_start++;
      end else begin
        @(negedge clk);
      end
      lat++;
    end
    check(lat == 5 * (NB - 1) + 1, $sformatf("benes latency %0d", lat));
    for (int j = 0; j < N; j++) begin
      int src = -1;
      for (int i = 0; i < N; i++) if (v[i] && a[i] == j) src = i;
      if (src >= 0) begin
        check(bn_data_out[j] == W'(src + 1),
              $sformatf("benes out %0d got %0d want %0d", j, bn_data_out[j], src + 1));
        check(bn_routed_vld[j] && bn_routed_addr[j] == NB'(j), "benes routed address");
      end else begin
        check(!bn_routed_vld[j], "benes idle output");
      end
    end
    for (int p = 0; p < N/2; p++) begin
      check(bn_scb[0][p] == rscb[p], $sformatf("benes column 0 SE %0d state", p));
      check(bn_rep_flags[0][p] == rrep[p], $sformatf("benes column 0 SE %0d representative", p));
    end
    for (int p = NB - 1; p < 2*NB - 1; p++) if (bn_scb[p] != '0) n_dtr_cross++;
    if (partial) n_partial++; else n_full++;
    if (!any_valid) $display("note: empty request set");
  endtask

  task automatic run_clos(input bit partial);
    arr_t a; barr_t v;
    int lat;
    gen_perm(NC, partial, a, v);
    for (int i = 0; i < NC; i++) begin
      cl_addr[i]    = NCB'(a[i]);
      cl_vld[i]     = v[i];
      cl_data_in[i] = W'(i + 1);
    end
    @(negedge clk);
    cl_start = 1'b1;
    @(negedge clk);
    cl_start = 1'b0;
    lat = 1;
    while (!cl_done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 5 * 2 + 1, $sformatf("clos latency %0d", lat));
    for (int j = 0; j < NC; j++) begin
      int src = -1;
      for (int i = 0; i < NC; i++) if (v[i] && a[i] == j) src = i;
      check(cl_data_out[j] == ((src >= 0) ? W'(src + 1) : W'(0)),
            $sformatf("clos out %0d got %0d want %0d", j, cl_data_out[j], src + 1));
    end
    if (partial) n_cl_partial++; else n_cl_full++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      bn_addr[i] = '0; bn_vld[i] = 1'b0; bn_data_in[i] = '0;
    end
    for (int i = 0; i < NC; i++) begin
      cl_addr[i] = '0; cl_vld[i] = 1'b0; cl_data_in[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TRIALS; t++) begin
      run_benes(t % 2 == 1, t % 50 == 3);
      run_clos(t % 2 == 1);
    end
    check(n_full > 0,        "mechanism: full permutation");
    check(n_partial > 0,     "mechanism: partial permutation");
    check(n_multi > 0,       "mechanism: several cycles / representatives in a column");
    check(n_chain > 0,       "mechanism: open chain with end-node representative");
    check(n_self > 0,        "mechanism: SE holding a complementary pair");
    check(n_dtr_cross > 0,   "mechanism: cross state set by destination-tag routing");
    check(n_busy_start > 0,  "mechanism: start while busy ignored");
    check(n_cl_full > 0,     "mechanism: Clos full permutation");
    check(n_cl_partial > 0,  "mechanism: Clos partial permutation");
    $display("mechanisms: full=%0d partial=%0d multi_cycle=%0d open_chain=%0d self_pair=%0d dtr_cross=%0d busy_start=%0d clos_full=%0d clos_partial=%0d",
             n_full, n_partial, n_multi, n_chain, n_self, n_dtr_cross, n_busy_start, n_cl_full, n_cl_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
