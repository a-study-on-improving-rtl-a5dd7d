// tb_model_pkg: reference models used by the testbenches, written
// sequentially and independently of the RTL.
//
// split_ref: the division of one splitting column of a Benes network, with the
// representative rule of the parallel algorithm. The m addresses (two per SE,
// SE p holds positions 2p and 2p+1) are linked where two valid addresses have
// the same bits above bit k. Each cycle or open chain of linked SEs gets as
// representative the SE with the largest extended suffix {end, p} (end = the
// SE has exactly one linked neighbour), which is set bar; every other SE is
// set by walking the links from it (same inlet position on both ends ->
// different states).
//
// This reference is this design's own sequential restatement of the
// document's division rule (largest extended suffix as representative, set
// bar), written independently of the RTL.
package tb_model_pkg;

  localparam int MAXM = 64;

  typedef int unsigned arr_t [MAXM];
  typedef bit          barr_t [MAXM];

  function automatic void split_ref(input int m, input int k,
                                    input arr_t addr, input barr_t vld,
                                    output barr_t scb, output barr_t rep,
                                    output int ncomp, output int nchain);
    int p_cnt = m / 2;
    int partner [MAXM];
    int nnb [MAXM];
    int esuf [MAXM];
    int comp [MAXM];
    bit set [MAXM];
    int queue [$];
    int sw = $clog2(p_cnt);
    if (sw == 0) sw = 1;
    ncomp = 0;
    nchain = 0;
    for (int a = 0; a < m; a++) begin
      partner[a] = -1;
      if (vld[a])
        for (int b = 0; b < m; b++)
          if (b != a && vld[b] && (addr[b] >> (k + 1)) == (addr[a] >> (k + 1)))
            partner[a] = b;
    end
    for (int p = 0; p < p_cnt; p++) begin
      nnb[p]  = (partner[2*p] >= 0) + (partner[2*p+1] >= 0);
      esuf[p] = ((nnb[p] == 1) ? (1 << sw) : 0) + p;
      comp[p] = -1;
      scb[p]  = 0;
      rep[p]  = 0;
      set[p]  = 0;
    end
    // components
    for (int p = 0; p < p_cnt; p++) begin
      if (comp[p] < 0) begin
        int best = p;
        bit has_end = 0;
        queue.push_back(p);
        comp[p] = ncomp;
        while (queue.size() > 0) begin
          int u = queue.pop_front();
          if (esuf[u] > esuf[best]) best = u;
          if (nnb[u] == 1) has_end = 1;
          for (int x = 0; x < 2; x++)
            if (partner[2*u+x] >= 0 && comp[partner[2*u+x] / 2] < 0) begin
              comp[partner[2*u+x] / 2] = ncomp;
              queue.push_back(partner[2*u+x] / 2);
            end
        end
        if (has_end) nchain++;
        rep[best] = 1;
        // status walk from the representative
        scb[best] = 0;
        set[best] = 1;
        queue.push_back(best);
        while (queue.size() > 0) begin
          int u = queue.pop_front();
          for (int x = 0; x < 2; x++) begin
            int b = partner[2*u+x];
            if (b >= 0 && !set[b / 2]) begin
              set[b / 2] = 1;
              scb[b / 2] = scb[u] ^ ((b % 2) == x);
              queue.push_back(b / 2);
            end
          end
        end
        ncomp++;
      end
    end
  endfunction

endpackage
