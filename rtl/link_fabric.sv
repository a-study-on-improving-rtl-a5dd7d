// link_fabric: the part of a PE group's buses that carries the representative
// competition (second phase) and the status propagation (third phase).
//
// The neighbour links found in the first phase join the PEs of a group into
// cycles (full permutation) or open chains (partial permutation). Walking a
// cycle means leaving a PE through one inlet's link, arriving at the
// neighbour on some inlet and leaving it through its other inlet; a "state"
// s = 2p+x is PE p about to leave through inlet x. The document finds, in
// each cycle, the PE with the largest extended suffix by a tournament in which
// losing PEs become transparent and pass suffixes on, and then lets the
// winner (the representative, state bar) trigger a ring of inverting and
// non-inverting gates that sets every other PE. Both steps were asynchronous
// and completed within one clock.
//
// Here both are computed by pointer doubling, which gives the same results
// with acyclic logic of depth log2(P): after level t every state knows the
// largest suffix and the XOR of link flags over the next 2^t links along its
// walk. Phase 2 output: cyc_max[p], the largest extended suffix in PE p's
// cycle or chain (p is the representative when this equals its own suffix).
// Phase 3 output: status[p] = XOR of the "not equal" flags on the path from
// the representative to p, i.e. the SE state with the representative at bar.
// Walks that are stopped at an open chain end instead of the representative
// are discarded by taking the other direction. Purely combinational.
module link_fabric #(
  parameter int P  = 16,
  parameter int SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          nbr_ok  [P][2],
  input  logic [SW-1:0] nbr_pe  [P][2],
  input  logic          nbr_port[P][2],
  input  logic          fs      [P][2],
  input  logic [SW:0]   esuf    [P],
  input  logic          rep     [P],
  output logic [SW:0]   cyc_max [P],
  output logic          status  [P]
);
  localparam int S  = 2 * P;
  localparam int PW = $clog2(S);
  localparam int L  = $clog2(P) + 1;   // 2^L > longest walk (P-1 links)

  // ptr2/mx: phase-2 walk; ptr3/par/rch: phase-3 walk towards the representative
  logic [PW-1:0] ptr2 [S], ptr3 [S], nptr2 [S], nptr3 [S];
  logic [SW:0]   mx   [S], nmx  [S];
  logic          par  [S], rch  [S], npar [S], nrch [S];

  always_comb begin
    for (int s = 0; s < S; s++) begin
      logic [PW-1:0] nxt;
      nxt = nbr_ok[s/2][s%2] ? PW'({nbr_pe[s/2][s%2], ~nbr_port[s/2][s%2]}) : PW'(s);
      ptr2[s] = nxt;
      mx[s]   = esuf[s/2];
      ptr3[s] = rep[s/2] ? PW'(s) : nxt;
      par[s]  = rep[s/2] ? 1'b0 : (nbr_ok[s/2][s%2] & fs[s/2][s%2]);
      rch[s]  = rep[s/2];
    end
    for (int t = 0; t < L; t++) begin
      for (int s = 0; s < S; s++) begin
        nptr2[s] = ptr2[ptr2[s]];
        nmx[s]   = (mx[ptr2[s]] > mx[s]) ? mx[ptr2[s]] : mx[s];
        nptr3[s] = ptr3[ptr3[s]];
        npar[s]  = par[s] ^ par[ptr3[s]];
        nrch[s]  = rch[ptr3[s]];
      end
      ptr2 = nptr2;
      mx   = nmx;
      ptr3 = nptr3;
      par  = npar;
      rch  = nrch;
    end
    for (int p = 0; p < P; p++) begin
      cyc_max[p] = (mx[2*p+1] > mx[2*p]) ? mx[2*p+1] : mx[2*p];
      status[p]  = rep[p] ? 1'b0 : (rch[2*p] ? par[2*p] : par[2*p+1]);
    end
  end
endmodule
