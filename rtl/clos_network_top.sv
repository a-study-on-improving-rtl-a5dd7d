// clos_network_top: the two switching systems side by side.
//
//   * Benes system: an N x N Benes switch body (benes_switch) set by its
//     parallel control unit (benes_pcu). bn_addr[i]/bn_vld[i] request a
//     connection from input i to output bn_addr[i]; after bn_start the PCU
//     computes all switch control bits, and when bn_done pulses
//     (5*(log2 N - 1) + 1 clocks later) bn_data_out[j] carries bn_data_in[i]
//     for every requested pair (i, j). The settings, and so the connections,
//     hold until the next bn_start.
//   * Clos system: a C(n, n, r) three-stage Clos switch (clos_switch) set by
//     its parallel control unit (clos_pcu), with the same request interface
//     (cl_*) and a latency of 5*log2(n) + 1 clocks.
// bn_scb, bn_rep_flags and cl_rep_flags expose the switch settings and the
// representatives chosen by the division columns. Synchronous active-low
// reset rst_n. Switch data paths are combinational from the held settings.
//
// Pairing each switch body with its parallel control unit follows the
// document; placing the two systems side by side with separate ports, and
// making the requests ports rather than on-chip generated, are this design's
// choices.
module clos_network_top #(
  parameter int N   = 32,   // Benes network size
  parameter int NSW = 4,    // Clos: n
  parameter int RSW = 2,    // Clos: r
  parameter int W   = 8     // switched data width
) (
  input  logic clk,
  input  logic rst_n,
  // Benes system
  input  logic                 bn_start,
  input  logic [$clog2(N)-1:0] bn_addr [N],
  input  logic                 bn_vld  [N],
  input  logic [W-1:0]         bn_data_in  [N],
  output logic [W-1:0]         bn_data_out [N],
  output logic                 bn_busy,
  output logic                 bn_done,
  output logic [N/2-1:0]       bn_scb       [2*$clog2(N)-1],
  output logic [N/2-1:0]       bn_rep_flags [$clog2(N)-1],
  output logic [$clog2(N)-1:0] bn_routed_addr [N],
  output logic                 bn_routed_vld  [N],
  // Clos system
  input  logic                       cl_start,
  input  logic [$clog2(NSW*RSW)-1:0] cl_addr [NSW*RSW],
  input  logic                       cl_vld  [NSW*RSW],
  input  logic [W-1:0]               cl_data_in  [NSW*RSW],
  output logic [W-1:0]               cl_data_out [NSW*RSW],
  output logic                       cl_busy,
  output logic                       cl_done,
  output logic [NSW*RSW/2-1:0]       cl_rep_flags [$clog2(NSW)]
);
  benes_pcu #(.N(N)) u_bn_pcu (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (bn_start),
    .a_in     (bn_addr),
    .v_in     (bn_vld),
    .busy     (bn_busy),
    .done     (bn_done),
    .scb      (bn_scb),
    .rep_flags(bn_rep_flags),
    .a_out    (bn_routed_addr),
    .v_out    (bn_routed_vld)
  );

  benes_switch #(.N(N), .W(W)) u_bn_sw (
    .scb     (bn_scb),
    .data_in (bn_data_in),
    .data_out(bn_data_out)
  );

  logic [NSW-1:0][NSW-1:0] cl_bar1 [RSW];
  logic [RSW-1:0][RSW-1:0] cl_bar2 [NSW];
  logic [NSW-1:0][NSW-1:0] cl_bar3 [RSW];

  clos_pcu #(.NSW(NSW), .RSW(RSW)) u_cl_pcu (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (cl_start),
    .a_in     (cl_addr),
    .v_in     (cl_vld),
    .busy     (cl_busy),
    .done     (cl_done),
    .bar1     (cl_bar1),
    .bar2     (cl_bar2),
    .bar3     (cl_bar3),
    .rep_flags(cl_rep_flags)
  );

  clos_switch #(.NSW(NSW), .RSW(RSW), .W(W)) u_cl_sw (
    .bar1    (cl_bar1),
    .bar2    (cl_bar2),
    .bar3    (cl_bar3),
    .data_in (cl_data_in),
    .data_out(cl_data_out)
  );
endmodule
