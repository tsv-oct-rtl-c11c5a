// octt_pkg - shared constants and types of the on-communication TSV test (OCTT) link.
//
// The link protects a bundle of TSVs with a parity product code (PPC): M x N data bits are
// laid out as a grid and extended by one parity column, one parity row and one all-bit
// parity, giving (M+1)(N+1) TSVs. Code position r*(N+1)+c holds row r, column c; data bit
// r*N+c sits at row r, column c for r < M and c < N. The default shape, 4 x 8 (32 data bits,
// 45 TSVs), is the configuration whose area is reported for the scheme. The statistical
// detection period defaults to 128 cycles, the longest of the periods the scheme was evaluated
// with; picking that one is this design's choice.
package octt_pkg;

  localparam int unsigned PPC_M     = 4;    // data rows
  localparam int unsigned PPC_N     = 8;    // data columns
  localparam int unsigned SD_PERIOD = 128;  // statistical detection period T, in clock cycles

  // Number of TSVs (code bits) of an M x N product code.
  function automatic int unsigned code_bits(int unsigned m, int unsigned n);
    return (m + 1) * (n + 1);
  endfunction

  // States of the isolate-and-check controller.
  typedef enum logic [2:0] {
    IC_IDLE,     // waiting for a test request
    IC_DETECT,   // statistical detection running with the current isolation mask
    IC_ISOLATE,  // suspicious TSVs are isolated; pick the next one to re-check
    IC_CHECK,    // one suspicious TSV re-enabled, watching its row and column checks
    IC_DONE      // result stable in the faulty map
  } ic_state_e;

endpackage
