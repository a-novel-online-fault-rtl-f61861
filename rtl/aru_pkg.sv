// aru_pkg: sizes, encodings and helper functions shared by the fault-tolerant
// array and its autonomous restructuring unit (ARU).
//
// Configuration word layout (bit 0 first):
//   CLB k record at [k*REC_W +: REC_W], record = {func, in[N_IN-1], ..., in[0]}
//   primary output j selector at [N_CLB*REC_W + j*IN_W +: IN_W]
// An input number (a CLB input field or an output selector) below CF names a
// primary input of the array; CF + k names the output of CLB k. That is the
// relation "correcting factor + CLB number = input number", with the
// correcting factor set here to the number of primary inputs of the array.
// The 64-CLB count and the 8x8 arrangement follow the described array; the
// record layout, the 2-input LUT CLB and the number of primary inputs and
// outputs are this design's own choices.
package aru_pkg;

  // Array size
  localparam int unsigned N_CLB     = 64;  // configurable logic blocks
  localparam int unsigned GRID_COLS = 8;   // CLBs per row (8x8 array)
  localparam int unsigned N_PI      = 8;   // primary inputs of the array
  localparam int unsigned N_PO      = 8;   // primary outputs of the array
  localparam int unsigned N_IN      = 2;   // inputs per CLB
  localparam int unsigned LUT_W     = 4;   // truth-table bits per CLB (2-input LUT)

  // Correcting factor of Equation 1: input number = CF + CLB number
  localparam int unsigned CF        = N_PI;
  localparam int unsigned IN_W      = $clog2(N_CLB + CF);   // 7
  localparam int unsigned IDX_W     = $clog2(N_CLB);        // 6
  localparam int unsigned REC_W     = N_IN * IN_W + LUT_W;  // 18
  localparam int unsigned CFG_W     = N_CLB * REC_W + N_PO * IN_W;  // 1208

  // Outcome of one fault report
  typedef enum logic [1:0] {
    RES_REPAIRED = 2'd0,  // active CLB moved to a spare
    RES_RETIRED  = 2'd1,  // fault on an unused (spare) CLB: only marked faulty
    RES_KNOWN    = 2'd2,  // CLB was already marked faulty: nothing to do
    RES_NO_SPARE = 2'd3   // active CLB but no spare left: marked faulty, not moved
  } repair_result_e;

endpackage
