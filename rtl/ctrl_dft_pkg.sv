// ctrl_dft_pkg: shared constants and types for the delay-fault-testable controller.
//
// The controller under test is an ordinary Mealy finite-state machine whose state
// transition graph (STG) is given as a table of transitions. For delay testing it is
// wrapped with three extra ports (tmode, tsel, tout), one multiplexer per state
// flip-flop and an invalid test state/transition generator (ISTG), a small truth
// table that can force the state register to a state the functional logic would
// never load. This package holds:
//   * the test-mode encoding,
//   * the default example controller (2 primary inputs, 2 outputs, 2 state bits,
//     three reachable states and one unreachable code), and
//   * the default ISTG truth table for that controller.
// The widths of the example (2 input bits, 2 state bits) and the first ISTG row,
// "0101|01" (inputs I1&S1 = 01&01, output S2 = 01), follow the worked
// row-merging example of the method. The STG itself and the other ISTG rows are an
// example of this design's own, chosen so that every mechanism can be exercised:
// an unreachable state, two ISTG rows with the same first vector (told apart by
// tsel) and a row entered from the unreachable state.
//
// Table encoding: bit k of an input cube / care mask belongs to pi[k]; an input
// bit whose care bit is 0 is a don't-care ("-" in a KISS-style table).
package ctrl_dft_pkg;

  // Select of the per-flip-flop multiplexer in front of the state register.
  typedef enum logic {
    MODE_FUNC = 1'b0,  // state register loads the next state of the controller logic
    MODE_ISTG = 1'b1   // state register loads the state produced by the ISTG
  } test_mode_e;

  // ---------------------------------------------------------------------------
  // Example controller sizes
  // ---------------------------------------------------------------------------
  localparam int unsigned EX_NUM_PI   = 2;
  localparam int unsigned EX_NUM_PO   = 2;
  localparam int unsigned EX_NUM_SR   = 2;
  localparam int unsigned EX_N_TRANS  = 6;
  localparam int unsigned EX_N_ROWS   = 3;
  localparam int unsigned EX_TSEL_W   = 1;

  // State assignment (binary): A = 00 (reset), B = 01, C = 10; 11 is unreachable.
  localparam logic [EX_NUM_SR-1:0] EX_ST_A = 2'b00;
  localparam logic [EX_NUM_SR-1:0] EX_ST_B = 2'b01;
  localparam logic [EX_NUM_SR-1:0] EX_ST_C = 2'b10;
  localparam logic [EX_NUM_SR-1:0] EX_ST_U = 2'b11;

  // Example STG, one transition per row (row 0 is index 0):
  //   row  input  present  next  output
  //    0    0-      A        A     00
  //    1    1-      A        B     01
  //    2    -1      B        C     10
  //    3    -0      B        A     00
  //    4    1-      C        A     11
  //    5    0-      C        C     10
  localparam logic [EX_N_TRANS-1:0][EX_NUM_PI-1:0] EX_TR_IN =
    {2'b00, 2'b10, 2'b00, 2'b01, 2'b10, 2'b00};
  localparam logic [EX_N_TRANS-1:0][EX_NUM_PI-1:0] EX_TR_CARE =
    {2'b10, 2'b10, 2'b01, 2'b01, 2'b10, 2'b10};
  localparam logic [EX_N_TRANS-1:0][EX_NUM_SR-1:0] EX_TR_PS =
    {EX_ST_C, EX_ST_C, EX_ST_B, EX_ST_B, EX_ST_A, EX_ST_A};
  localparam logic [EX_N_TRANS-1:0][EX_NUM_SR-1:0] EX_TR_NS =
    {EX_ST_C, EX_ST_A, EX_ST_A, EX_ST_C, EX_ST_B, EX_ST_A};
  localparam logic [EX_N_TRANS-1:0][EX_NUM_PO-1:0] EX_TR_OUT =
    {2'b10, 2'b11, 2'b00, 2'b10, 2'b01, 2'b00};

  // Example ISTG truth table (Table-1 style: first vector I1&S1 in, S2 out):
  //   row  I1&S1   care   tsel (care)  S2
  //    0   01&01   1111   0    (yes)   01   merged row "0101|01"
  //    1   01&01   1111   1    (yes)   11   same first vector, told apart by tsel
  //    2   1-&11   1011   -    (no)    10   leaves the unreachable state
  // The input vector is {pi, ps}: pi in the upper bits, present state in the lower.
  localparam int unsigned EX_ISTG_IN_W = EX_NUM_PI + EX_NUM_SR;
  localparam logic [EX_N_ROWS-1:0][EX_ISTG_IN_W-1:0] EX_ROW_IN =
    {4'b1011, 4'b0101, 4'b0101};
  localparam logic [EX_N_ROWS-1:0][EX_ISTG_IN_W-1:0] EX_ROW_CARE =
    {4'b1011, 4'b1111, 4'b1111};
  localparam logic [EX_N_ROWS-1:0][EX_TSEL_W-1:0] EX_ROW_TSEL =
    {1'b0, 1'b1, 1'b0};
  localparam logic [EX_N_ROWS-1:0] EX_ROW_TSEL_CARE = 3'b011;
  localparam logic [EX_N_ROWS-1:0][EX_NUM_SR-1:0] EX_ROW_OUT =
    {EX_ST_C, EX_ST_U, EX_ST_B};

endpackage
