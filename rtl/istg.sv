// istg: invalid test state/transition generator.
//
// An invalid two-pattern test (I1&S1, I2&S2) needs the state register to move from
// S1 to S2 under input I1 although the controller's own next-state logic would not
// take that transition (S2 may even be a state the controller can never reach).
// The ISTG is the truth table that supplies S2: with the state register holding S1
// and I1 on the primary inputs, it outputs S2; in test mode the state register
// loads that value on the next clock edge. The second vector I2&S2 is then applied
// through the controller's ordinary logic at full clock speed.
//
// How it works: N_ROWS rows, each one row of the truth table. The input vector is
// {pi, ps}. Row r matches when that vector agrees with ROW_IN[r] on every bit where
// ROW_CARE[r] is 1, and, if ROW_TSEL_CARE[r] is 1, when tsel equals ROW_TSEL[r].
// The tsel pins tell apart rows that share the same first vector but lead to
// different S2; a table in which m rows share one first vector needs ceil(log2 m)
// tsel bits. The lowest-numbered matching row drives s2. No match gives s2 = 0 and
// hit = 0; what the generator does outside its table is a don't-care of the method,
// and all-zero is this design's choice. Input don't-cares per row, the tsel care
// bit and the priority order are likewise this design's choices for a compact table.
//
// Interface: purely combinational. TSEL_W is at least 1 (a table needing no tsel
// simply clears every ROW_TSEL_CARE bit and the pin is unused).
module istg
  import ctrl_dft_pkg::*;
#(
  parameter int unsigned NUM_PI = EX_NUM_PI,
  parameter int unsigned NUM_SR = EX_NUM_SR,
  parameter int unsigned TSEL_W = EX_TSEL_W,
  parameter int unsigned N_ROWS = EX_N_ROWS,
  parameter logic [N_ROWS-1:0][NUM_PI+NUM_SR-1:0] ROW_IN   = EX_ROW_IN,
  parameter logic [N_ROWS-1:0][NUM_PI+NUM_SR-1:0] ROW_CARE = EX_ROW_CARE,
  parameter logic [N_ROWS-1:0][TSEL_W-1:0]        ROW_TSEL = EX_ROW_TSEL,
  parameter logic [N_ROWS-1:0]                    ROW_TSEL_CARE = EX_ROW_TSEL_CARE,
  parameter logic [N_ROWS-1:0][NUM_SR-1:0]        ROW_OUT  = EX_ROW_OUT
) (
  input  logic [NUM_PI-1:0] pi,    // first-vector inputs I1
  input  logic [NUM_SR-1:0] ps,    // first-vector state S1 (state register)
  input  logic [TSEL_W-1:0] tsel,  // selects among rows with equal I1&S1
  output logic [NUM_SR-1:0] s2,    // state of the second vector, S2
  output logic              hit    // some row matched
);

  logic [NUM_PI+NUM_SR-1:0] vec;
  assign vec = {pi, ps};

  always_comb begin
    s2  = '0;
    hit = 1'b0;
    for (int r = int'(N_ROWS) - 1; r >= 0; r--) begin
      if (((vec ^ ROW_IN[r]) & ROW_CARE[r]) == '0 &&
          (!ROW_TSEL_CARE[r] || tsel == ROW_TSEL[r])) begin
        s2  = ROW_OUT[r];
        hit = 1'b1;
      end
    end
  end

endmodule
