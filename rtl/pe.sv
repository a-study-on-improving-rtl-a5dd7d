// pe: processing element of the first (division) part of the parallel control
// unit, PE with binary suffix b(p) = ID inside a PE group.
//
// A PE stands for one 2x2 SE of a splitting column and holds that SE's pair of
// destination addresses: b(j) at its upper inlet and b(ja) at its lower
// inlet, each with a valid flag (an idle input has valid = 0). Its blocks
// follow the document's functional diagram:
//   * bus interface: it drives its own bus with the region of interest of its
//     two addresses (bits NB-1..K+1) and the valid flags, and compares every
//     other bus against its own addresses (neighbour search);
//   * neighbour-PE and link-status registers: for each inlet, the PE and the
//     inlet that hold the complementary address (same region, other value of
//     bit K), and the link status f_s (1 = "not equal": both addresses sit on
//     inlets of the same position, so the two SEs must take different states;
//     0 = "equal");
//   * extended suffix: {end flag, ID}; the end flag marks a PE with exactly one
//     neighbour, the end of an open chain in a partial permutation, so that an
//     end PE always wins the representative competition;
//   * representative flag f_r and the SE status / SCB;
//   * a 2x2 address switch that passes the address pair to the next stage in
//     the same state as the SE.
// Timing (strobes from pe_group, one clock each): load (initialising step),
// ph1 (neighbour search), ph2 (store f_r computed by the group's link fabric),
// ph3 (store the SE status), term (export SCB and addresses).
module pe #(
  parameter int NB = 5,             // address width, log2 N
  parameter int K  = 0,             // division level (reduction)
  parameter int P  = 16,            // PEs in the group
  parameter int SW = (P > 1) ? $clog2(P) : 1,
  parameter int RB = NB - K - 1,    // width of the region of interest
  parameter int ID = 0              // binary suffix b(p)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          ph1,
  input  logic          ph2,
  input  logic          ph3,
  input  logic          term,
  // address pair from the previous stage (A_in)
  input  logic [NB-1:0] a_in   [2],
  input  logic          v_in   [2],
  // buses of all PEs in the group: region of interest and f_v per inlet
  input  logic [RB-1:0] bus_rg [P][2],
  input  logic          bus_fv [P][2],
  output logic [RB-1:0] my_rg  [2],
  output logic          my_fv  [2],
  // neighbour registers and link status, read by the group's link fabric
  output logic          nbr_ok  [2],
  output logic [SW-1:0] nbr_pe  [2],
  output logic          nbr_port[2],
  output logic          fs      [2],
  output logic [SW:0]   esuf,
  // representative decision and SE status from the link fabric
  input  logic          rep_in,
  input  logic          status_in,
  output logic          f_r,
  // exported results (A_out and SCB)
  output logic          scb,
  output logic [NB-1:0] a_out  [2],
  output logic          v_out  [2]
);
  logic [NB-1:0] a_q [2];
  logic          v_q [2];
  logic          s_q;
  logic [NB:0]   sw_out [2];   // {valid, address} after the 2x2 switch

  se2x2 #(.W(NB+1)) u_addr_switch (
    .scb (s_q),
    .in0 ({v_q[0], a_q[0]}),
    .in1 ({v_q[1], a_q[1]}),
    .out0(sw_out[0]),
    .out1(sw_out[1])
  );

  // neighbour search (combinational part of the bus interface)
  logic          hit_ok  [2];
  logic [SW-1:0] hit_pe  [2];
  logic          hit_port[2];

  for (genvar x = 0; x < 2; x++) begin : g_bus
    assign my_rg[x] = a_q[x][NB-1:K+1];
    assign my_fv[x] = v_q[x];
  end

  always_comb begin
    for (int x = 0; x < 2; x++) begin
      hit_ok[x]   = 1'b0;
      hit_pe[x]   = '0;
      hit_port[x] = 1'b0;
      for (int q = 0; q < P; q++) begin
        for (int y = 0; y < 2; y++) begin
          if (v_q[x] && bus_fv[q][y] && bus_rg[q][y] == my_rg[x] &&
              !(q == ID && y == x)) begin
            hit_ok[x]   = 1'b1;
            hit_pe[x]   = SW'(q);
            hit_port[x] = y[0];
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int x = 0; x < 2; x++) begin
        a_q[x]      <= '0;
        v_q[x]      <= 1'b0;
        nbr_ok[x]   <= 1'b0;
        nbr_pe[x]   <= '0;
        nbr_port[x] <= 1'b0;
        fs[x]       <= 1'b0;
        a_out[x]    <= '0;
        v_out[x]    <= 1'b0;
      end
      f_r <= 1'b0;
      s_q <= 1'b0;
      scb <= 1'b0;
    end else begin
      if (load) begin
        // initialising step: import addresses, reset flags and registers
        for (int x = 0; x < 2; x++) begin
          a_q[x]    <= a_in[x];
          v_q[x]    <= v_in[x];
          nbr_ok[x] <= 1'b0;
          fs[x]     <= 1'b0;
        end
        f_r <= 1'b0;
        s_q <= 1'b0;
      end
      if (ph1) begin
        for (int x = 0; x < 2; x++) begin
          nbr_ok[x]   <= hit_ok[x];
          nbr_pe[x]   <= hit_pe[x];
          nbr_port[x] <= hit_port[x];
          // same inlet position on both sides -> "not equal"
          fs[x]       <= hit_ok[x] && (hit_port[x] == 1'(x));
        end
      end
      if (ph2) f_r <= rep_in;
      if (ph3) s_q <= status_in;
      if (term) begin
        scb <= s_q;
        for (int x = 0; x < 2; x++) begin
          {v_out[x], a_out[x]} <= sw_out[x];
        end
      end
    end
  end

  assign esuf = {nbr_ok[0] ^ nbr_ok[1], SW'(ID)};
endmodule
