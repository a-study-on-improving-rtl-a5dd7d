// clos_pkg: types and helpers shared by the Benes/Clos switch bodies and their
// parallel control units.
//
// A 2x2 switching element (SE) has two settings, bar and cross, chosen by one
// switch control bit (SCB): 0 is bar, 1 is cross. The Benes networks here are
// numbered recursively: in a column that belongs to sub-networks of size M
// (M = N >> K at division level K), SE row h = s*M/2 + q is the q-th SE of
// sub-network s. A splitting column takes its inputs from positions
// s*M+2q and s*M+2q+1 and sends its upper outlet to position s*M+q (upper
// half-size sub-network 2s) and its lower outlet to s*M+M/2+q (lower
// sub-network 2s+1). A merging column is the mirror image. The functions
// below give these positions so that the switch body and the control unit
// use the same wiring.
//
// The recursive structure is the document's; this particular numbering of
// rows and positions is this design's own choice.
package clos_pkg;

  typedef enum logic {
    SE_BAR   = 1'b0,
    SE_CROSS = 1'b1
  } se_state_e;

  // Position of inlet `port` (0 upper, 1 lower) of splitting-column SE row h,
  // for sub-networks of size m.
  function automatic int split_in_pos(int m, int h, int port);
    int s = h / (m / 2);
    int q = h % (m / 2);
    return s * m + 2 * q + port;
  endfunction

  // Position reached by outlet `port` (0 upper, 1 lower) of splitting-column
  // SE row h, for sub-networks of size m.
  function automatic int split_out_pos(int m, int h, int port);
    int s = h / (m / 2);
    int q = h % (m / 2);
    return s * m + port * (m / 2) + q;
  endfunction

endpackage
