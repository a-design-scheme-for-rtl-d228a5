// dft_controller: controller with the non-scan delay-fault test architecture.
//
// A controller given as a state transition graph is made delay-testable without a
// scan chain. Valid two-pattern tests, whose state change is a real transition of
// the STG, are applied simply by running the controller. Invalid two-pattern tests
// (I1&S1, I2&S2), whose state change S1 -> S2 the controller logic never makes,
// are applied with the help of the invalid test state/transition generator (ISTG):
//
//   cycle k   : state register holds S1, I1 on pi, tmode = MODE_ISTG, tsel set.
//               The ISTG looks up S2 and the register loads it at the clock edge.
//   cycle k+1 : state register holds S2, I2 on pi, tmode = MODE_FUNC.
//               The controller logic is exercised at speed with I2&S2; its next
//               state is captured at the next edge and read on tout, its
//               outputs on po.
//
// Because no vector is ever shifted in, the clock runs at its functional rate
// throughout the test, and a test sequence costs one clock per vector (two tests
// can overlap when the second vector of one is the first vector of the next).
//
// Structure (one instance of each):
//   stg_comb      the controller's combinational part (next state and outputs)
//   istg          the ISTG truth table            (present only if HAS_ISTG)
//   state_reg_mux one multiplexer per flip-flop plus the state register
// tout is the state register itself, wired to pins so that the state reached by a
// test can be observed directly.
//
// HAS_ISTG = 0 is the lighter configuration in which only tout is added: the ISTG
// and the multiplexers are left out, tmode and tsel are ignored, and only valid
// two-pattern tests can be applied. The default, HAS_ISTG = 1, is the full scheme.
//
// Reset: rst is synchronous, active high, and loads RESET_STATE in either mode.
// All parameters default to the example controller in ctrl_dft_pkg.
module dft_controller
  import ctrl_dft_pkg::*;
#(
  parameter int unsigned NUM_PI  = EX_NUM_PI,
  parameter int unsigned NUM_PO  = EX_NUM_PO,
  parameter int unsigned NUM_SR  = EX_NUM_SR,
  parameter int unsigned N_TRANS = EX_N_TRANS,
  parameter logic [N_TRANS-1:0][NUM_PI-1:0] TR_IN   = EX_TR_IN,
  parameter logic [N_TRANS-1:0][NUM_PI-1:0] TR_CARE = EX_TR_CARE,
  parameter logic [N_TRANS-1:0][NUM_SR-1:0] TR_PS   = EX_TR_PS,
  parameter logic [N_TRANS-1:0][NUM_SR-1:0] TR_NS   = EX_TR_NS,
  parameter logic [N_TRANS-1:0][NUM_PO-1:0] TR_OUT  = EX_TR_OUT,
  parameter logic [NUM_SR-1:0] RESET_STATE = '0,
  parameter bit          HAS_ISTG = 1'b1,
  parameter int unsigned TSEL_W = EX_TSEL_W,
  parameter int unsigned N_ROWS = EX_N_ROWS,
  parameter logic [N_ROWS-1:0][NUM_PI+NUM_SR-1:0] ROW_IN   = EX_ROW_IN,
  parameter logic [N_ROWS-1:0][NUM_PI+NUM_SR-1:0] ROW_CARE = EX_ROW_CARE,
  parameter logic [N_ROWS-1:0][TSEL_W-1:0]        ROW_TSEL = EX_ROW_TSEL,
  parameter logic [N_ROWS-1:0]                    ROW_TSEL_CARE = EX_ROW_TSEL_CARE,
  parameter logic [N_ROWS-1:0][NUM_SR-1:0]        ROW_OUT  = EX_ROW_OUT
) (
  input  logic              clk,
  input  logic              rst,    // synchronous reset to RESET_STATE
  input  logic [NUM_PI-1:0] pi,     // primary inputs
  output logic [NUM_PO-1:0] po,     // primary outputs
  input  test_mode_e        tmode,  // MODE_FUNC: normal; MODE_ISTG: load ISTG output
  input  logic [TSEL_W-1:0] tsel,   // ISTG row select for shared first vectors
  output logic [NUM_SR-1:0] tout    // state register observation pins
);

  logic [NUM_SR-1:0] sr_q;
  logic [NUM_SR-1:0] ns_func;
  logic [NUM_SR-1:0] ns_istg;
  logic              stg_hit;
  logic              istg_hit;

  stg_comb #(
    .NUM_PI (NUM_PI), .NUM_PO (NUM_PO), .NUM_SR (NUM_SR), .N_TRANS(N_TRANS),
    .TR_IN  (TR_IN),  .TR_CARE(TR_CARE), .TR_PS (TR_PS), .TR_NS  (TR_NS),
    .TR_OUT (TR_OUT), .RESET_STATE(RESET_STATE)
  ) u_comb (
    .pi (pi),
    .ps (sr_q),
    .ns (ns_func),
    .po (po),
    .hit(stg_hit)
  );

  if (HAS_ISTG) begin : g_istg
    istg #(
      .NUM_PI(NUM_PI), .NUM_SR(NUM_SR), .TSEL_W(TSEL_W), .N_ROWS(N_ROWS),
      .ROW_IN(ROW_IN), .ROW_CARE(ROW_CARE), .ROW_TSEL(ROW_TSEL),
      .ROW_TSEL_CARE(ROW_TSEL_CARE), .ROW_OUT(ROW_OUT)
    ) u_istg (
      .pi  (pi),
      .ps  (sr_q),
      .tsel(tsel),
      .s2  (ns_istg),
      .hit (istg_hit)
    );

    state_reg_mux #(
      .NUM_SR(NUM_SR), .RESET_STATE(RESET_STATE)
    ) u_sr (
      .clk    (clk),
      .rst    (rst),
      .tmode  (tmode),
      .ns_func(ns_func),
      .ns_istg(ns_istg),
      .q      (sr_q)
    );
  end else begin : g_tout_only
    // Only tout is added: the register always takes the functional next state.
    assign ns_istg  = ns_func;
    assign istg_hit = 1'b0;

    state_reg_mux #(
      .NUM_SR(NUM_SR), .RESET_STATE(RESET_STATE)
    ) u_sr (
      .clk    (clk),
      .rst    (rst),
      .tmode  (MODE_FUNC),
      .ns_func(ns_func),
      .ns_istg(ns_istg),
      .q      (sr_q)
    );
  end

  assign tout = sr_q;

  // stg_hit and istg_hit are diagnostic only: they mark whether the present
  // (inputs, state) pair is covered by the STG or by an ISTG row.
  logic unused_hits;
  assign unused_hits = stg_hit ^ istg_hit ^ (^tsel) ^ tmode;

endmodule
