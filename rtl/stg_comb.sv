// stg_comb: combinational part of a controller given as a state transition graph.
//
// This is the logic that sits between the state register and itself in a
// synthesized controller: from the primary inputs (pi) and the present state held
// in the state register (ps) it produces the next state (ns) and the primary
// outputs (po) of a Mealy machine. Cutting the state register out of the loop in
// this way gives exactly the combinational test generation model used for delay
// test generation: ps are the pseudo primary inputs, ns the pseudo primary outputs.
//
// How it works: the STG is a table of N_TRANS transitions. Row r fires when the
// present state equals TR_PS[r] and the inputs match the cube TR_IN[r] on every bit
// where TR_CARE[r] is 1. The lowest-numbered firing row wins and supplies TR_NS[r]
// and TR_OUT[r]. The `hit` output tells whether any row fired.
//
// Codes the STG never specifies (unreachable state codes, or an input cube no row
// of a state covers) are where a synthesis tool adds transitions of its own. This
// design fixes that behaviour so that it is known: with no firing row the next
// state is RESET_STATE and the outputs are all zero. That choice is this design's;
// the method only requires that the state assignment is known.
//
// Interface: purely combinational, no clock. Widths and the table are parameters;
// the defaults are the example controller of ctrl_dft_pkg.
module stg_comb
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
  parameter logic [NUM_SR-1:0] RESET_STATE = '0
) (
  input  logic [NUM_PI-1:0] pi,   // primary inputs
  input  logic [NUM_SR-1:0] ps,   // present state (pseudo primary inputs)
  output logic [NUM_SR-1:0] ns,   // next state (pseudo primary outputs)
  output logic [NUM_PO-1:0] po,   // primary outputs
  output logic              hit   // some STG transition covers (pi, ps)
);

  always_comb begin
    ns  = RESET_STATE;
    po  = '0;
    hit = 1'b0;
    // Scan from the last row down so that the lowest-numbered match is left last.
    for (int r = int'(N_TRANS) - 1; r >= 0; r--) begin
      if (ps == TR_PS[r] && ((pi ^ TR_IN[r]) & TR_CARE[r]) == '0) begin
        ns  = TR_NS[r];
        po  = TR_OUT[r];
        hit = 1'b1;
      end
    end
  end

endmodule
