// state_reg_mux: controller state register with the test-mode multiplexer.
//
// One 2:1 multiplexer per state flip-flop chooses what the flip-flop loads: the
// next state from the controller's combinational logic (tmode = MODE_FUNC) or the
// state produced by the invalid test state/transition generator (tmode =
// MODE_ISTG). This is the whole sequential overhead of the test method: one
// multiplexer per flip-flop and no scan path, so every test vector is applied at
// the functional clock rate. The register contents are brought out on q, which the
// top level also drives onto the tout observation pins.
//
// Reset: rst is synchronous and active high and loads RESET_STATE, modelling the
// controller's reset signal that moves any state to the reset state in one clock
// ("a transition from any state to the reset state"). Synchronous rather than
// asynchronous reset is this design's choice.
//
// Timing: q changes one clock after the selected input; there is no other latency.
module state_reg_mux
  import ctrl_dft_pkg::*;
#(
  parameter int unsigned NUM_SR = EX_NUM_SR,
  parameter logic [NUM_SR-1:0] RESET_STATE = '0
) (
  input  logic              clk,
  input  logic              rst,      // synchronous reset to RESET_STATE
  input  test_mode_e        tmode,    // multiplexer select
  input  logic [NUM_SR-1:0] ns_func,  // next state from the controller logic
  input  logic [NUM_SR-1:0] ns_istg,  // next state from the ISTG
  output logic [NUM_SR-1:0] q         // state register contents
);

  logic [NUM_SR-1:0] d;

  always_comb begin
    unique case (tmode)
      MODE_ISTG: d = ns_istg;
      default:   d = ns_func;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_STATE;
    else     q <= d;
  end

endmodule
