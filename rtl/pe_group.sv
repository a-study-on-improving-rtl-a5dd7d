// pe_group: one group of bus-connected PEs of the division part of the
// parallel control unit.
//
// The group takes the M = N >> K destination addresses entering one
// sub-network at division level K (two per PE, P = M/2 PEs) and splits them
// into an upper and a lower sub-permutation so that the two addresses of every
// output-SE pair (same bits NB-1..K+1, different bit K) go to different
// halves: the looping algorithm's division, done in parallel. It sets the
// states of the P SEs of this splitting column and passes each address pair
// through the PE's 2x2 switch: up_*[q] goes to the upper sub-network input q,
// lo_*[q] to the lower one. In every cycle (or open chain) of linked PEs the
// PE with the largest extended suffix becomes the representative and is set
// to bar; the others follow from the link states.
//
// Timing, as in the document's five-clock operation of a stage: start is
// sampled with a_in (initialising step); then one clock each for the first,
// second and third phase; then one clock for the terminating step, which
// registers scb, the outputs and f_r. done is high for one clock, five clocks
// after start. Outputs hold until the next start. A start while busy is
// ignored.
module pe_group #(
  parameter int NB = 5,
  parameter int K  = 0,
  parameter int M  = (1 << NB) >> K,
  parameter int P  = M / 2,
  parameter int SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB-1:0] a_in  [M],
  input  logic          v_in  [M],
  output logic          busy,
  output logic          done,
  output logic [P-1:0]  scb,
  output logic [P-1:0]  rep_flag,
  output logic [NB-1:0] up_a  [P],
  output logic          up_v  [P],
  output logic [NB-1:0] lo_a  [P],
  output logic          lo_v  [P]
);
  localparam int RB = NB - K - 1;

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_PH1,
    ST_PH2,
    ST_PH3,
    ST_TERM
  } grp_state_e;

  grp_state_e st;
  logic load, ph1, ph2, ph3, term;

  assign load = (st == ST_IDLE) && start;
  assign ph1  = (st == ST_PH1);
  assign ph2  = (st == ST_PH2);
  assign ph3  = (st == ST_PH3);
  assign term = (st == ST_TERM);
  assign busy = (st != ST_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= ST_IDLE;
      done <= 1'b0;
    end else begin
      done <= term;
      unique case (st)
        ST_IDLE: if (start) st <= ST_PH1;
        ST_PH1:  st <= ST_PH2;
        ST_PH2:  st <= ST_PH3;
        ST_PH3:  st <= ST_TERM;
        ST_TERM: st <= ST_IDLE;
        default: st <= ST_IDLE;
      endcase
    end
  end

  // buses and link registers
  logic [RB-1:0] bus_rg  [P][2];
  logic          bus_fv  [P][2];
  logic          nbr_ok  [P][2];
  logic [SW-1:0] nbr_pe  [P][2];
  logic          nbr_port[P][2];
  logic          fs      [P][2];
  logic [SW:0]   esuf    [P];
  logic [SW:0]   cyc_max [P];
  logic          f_r     [P];
  logic          status  [P];
  logic          rep_now [P];

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic [NB-1:0] a_pair [2];
    logic          v_pair [2];
    logic [NB-1:0] o_pair [2];
    logic          ov_pair[2];
    logic          scb_p;

    assign a_pair[0] = a_in[2*p];
    assign a_pair[1] = a_in[2*p+1];
    assign v_pair[0] = v_in[2*p];
    assign v_pair[1] = v_in[2*p+1];
    assign rep_now[p] = (cyc_max[p] == esuf[p]);

    pe #(.NB(NB), .K(K), .P(P), .SW(SW), .RB(RB), .ID(p)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .ph1      (ph1),
      .ph2      (ph2),
      .ph3      (ph3),
      .term     (term),
      .a_in     (a_pair),
      .v_in     (v_pair),
      .bus_rg   (bus_rg),
      .bus_fv   (bus_fv),
      .my_rg    (bus_rg[p]),
      .my_fv    (bus_fv[p]),
      .nbr_ok   (nbr_ok[p]),
      .nbr_pe   (nbr_pe[p]),
      .nbr_port (nbr_port[p]),
      .fs       (fs[p]),
      .esuf     (esuf[p]),
      .rep_in   (rep_now[p]),
      .status_in(status[p]),
      .f_r      (f_r[p]),
      .scb      (scb_p),
      .a_out    (o_pair),
      .v_out    (ov_pair)
    );

    assign scb[p]  = scb_p;
    assign up_a[p] = o_pair[0];
    assign up_v[p] = ov_pair[0];
    assign lo_a[p] = o_pair[1];
    assign lo_v[p] = ov_pair[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rep_flag <= '0;
    else if (term) for (int p = 0; p < P; p++) rep_flag[p] <= f_r[p];
  end

  link_fabric #(.P(P), .SW(SW)) u_links (
    .nbr_ok  (nbr_ok),
    .nbr_pe  (nbr_pe),
    .nbr_port(nbr_port),
    .fs      (fs),
    .esuf    (esuf),
    .rep     (f_r),
    .cyc_max (cyc_max),
    .status  (status)
  );
endmodule
