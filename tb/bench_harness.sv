// bench_harness: drives one dft_controller sized like a benchmark controller and
// checks it against a reference model (helper for tb_benchmark_sizes).
//
// The controller is generated from its size: NUM_STATES states, binary or one-hot
// state assignment. State s branches on input bit s % NUM_PI: on 0 it goes to
// state (5s+3) % NUM_STATES, on 1 to (5s+10) % NUM_STATES, with outputs taken from
// a multiplicative hash of (s, branch). The ISTG has 2**TSEL_W rows that all share
// the first vector (pi all ones, state 1), so tsel alone picks the row; row r
// loads a state the STG never enters from state 1 under that input: in one-hot
// the two-hot code of states r and r+1 (an unreachable code), in binary state
// (r+2) % NUM_STATES. The tables are built by constant functions from those
// rules; the reference model below evaluates the rules directly.
//
// Stimulus: reset, then CYCLES random clocks; whenever the model is in state 1
// the harness applies the shared first vector in test mode half of the time with
// a random tsel. po is checked before each edge and tout after it. `done` rises
// when finished; checks and failures are then final. Every tsel value must have
// been used and both modes must have occurred.
module bench_harness
  import ctrl_dft_pkg::*;
#(
  parameter int unsigned NUM_PI     = 3,
  parameter int unsigned NUM_PO     = 5,
  parameter int unsigned NUM_STATES = 4,
  parameter bit          ONE_HOT    = 1'b0,
  parameter int unsigned TSEL_W     = 1,
  parameter int unsigned CYCLES     = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned NUM_SR  = ONE_HOT ? NUM_STATES : $clog2(NUM_STATES);
  localparam int unsigned N_TRANS = 2 * NUM_STATES;
  localparam int unsigned N_ROWS  = 2 ** TSEL_W;
  localparam int unsigned IW      = NUM_PI + NUM_SR;

  function automatic logic [NUM_SR-1:0] code(input int s);
    return ONE_HOT ? NUM_SR'(1) << s : NUM_SR'(s);
  endfunction
  function automatic int next_idx(input int s, input int b);
    return (5 * s + 3 + 7 * b) % int'(NUM_STATES);
  endfunction
  function automatic logic [NUM_PO-1:0] out_val(input int s, input int b);
    return NUM_PO'((32'(2 * s + b + 1) * 32'd2654435761) >> 7);
  endfunction
  function automatic logic [NUM_SR-1:0] row_out(input int r);
    return ONE_HOT ? (code(r % int'(NUM_STATES)) | code((r + 1) % int'(NUM_STATES)))
                   : code((r + 2) % int'(NUM_STATES));
  endfunction

  // ---- table construction (row 2s+b is state s, branch b) ----
  function automatic logic [N_TRANS-1:0][NUM_PI-1:0] gen_in();
    for (int s = 0; s < int'(NUM_STATES); s++)
      for (int b = 0; b < 2; b++) gen_in[2*s+b] = NUM_PI'(b) << (s % int'(NUM_PI));
  endfunction
  function automatic logic [N_TRANS-1:0][NUM_PI-1:0] gen_care();
    for (int s = 0; s < int'(NUM_STATES); s++)
      for (int b = 0; b < 2; b++) gen_care[2*s+b] = NUM_PI'(1) << (s % int'(NUM_PI));
  endfunction
  function automatic logic [N_TRANS-1:0][NUM_SR-1:0] gen_ps();
    for (int s = 0; s < int'(NUM_STATES); s++)
      for (int b = 0; b < 2; b++) gen_ps[2*s+b] = code(s);
  endfunction
  function automatic logic [N_TRANS-1:0][NUM_SR-1:0] gen_ns();
    for (int s = 0; s < int'(NUM_STATES); s++)
      for (int b = 0; b < 2; b++) gen_ns[2*s+b] = code(next_idx(s, b));
  endfunction
  function automatic logic [N_TRANS-1:0][NUM_PO-1:0] gen_out();
    for (int s = 0; s < int'(NUM_STATES); s++)
      for (int b = 0; b < 2; b++) gen_out[2*s+b] = out_val(s, b);
  endfunction
  function automatic logic [N_ROWS-1:0][IW-1:0] gen_row_in();
    for (int r = 0; r < int'(N_ROWS); r++) gen_row_in[r] = {{NUM_PI{1'b1}}, code(1)};
  endfunction
  function automatic logic [N_ROWS-1:0][TSEL_W-1:0] gen_row_tsel();
    for (int r = 0; r < int'(N_ROWS); r++) gen_row_tsel[r] = TSEL_W'(r);
  endfunction
  function automatic logic [N_ROWS-1:0][NUM_SR-1:0] gen_row_out();
    for (int r = 0; r < int'(N_ROWS); r++) gen_row_out[r] = row_out(r);
  endfunction

  logic              rst;
  logic [NUM_PI-1:0] pi;
  logic [NUM_PO-1:0] po;
  test_mode_e        tmode;
  logic [TSEL_W-1:0] tsel;
  logic [NUM_SR-1:0] tout;

  dft_controller #(
    .NUM_PI(NUM_PI), .NUM_PO(NUM_PO), .NUM_SR(NUM_SR), .N_TRANS(N_TRANS),
    .TR_IN(gen_in()), .TR_CARE(gen_care()), .TR_PS(gen_ps()), .TR_NS(gen_ns()),
    .TR_OUT(gen_out()), .RESET_STATE(code(0)), .HAS_ISTG(1'b1),
    .TSEL_W(TSEL_W), .N_ROWS(N_ROWS),
    .ROW_IN(gen_row_in()), .ROW_CARE({N_ROWS{{IW{1'b1}}}}), .ROW_TSEL(gen_row_tsel()),
    .ROW_TSEL_CARE({N_ROWS{1'b1}}), .ROW_OUT(gen_row_out())
  ) dut (
    .clk(clk), .rst(rst), .pi(pi), .po(po), .tmode(tmode), .tsel(tsel), .tout(tout));

  // ---- reference model ----
  function automatic int state_of(input logic [NUM_SR-1:0] v);
    for (int s = 0; s < int'(NUM_STATES); s++) if (v == code(s)) return s;
    return -1;
  endfunction

  logic [NUM_SR-1:0] msr, nxt;
  logic [NUM_PO-1:0] epo;
  logic [N_ROWS-1:0] tsel_seen;
  int n_istg, n_func;

  initial begin
    int s, b;
    checks = 0; failures = 0; done = 1'b0; tsel_seen = '0; n_istg = 0; n_func = 0;
    rst = 1'b1; pi = '0; tmode = MODE_FUNC; tsel = '0;
    @(posedge clk); #1;
    msr = code(0);
    for (int k = 0; k < int'(CYCLES); k++) begin
      rst = ($urandom_range(0, 99) == 0);
      for (int j = 0; j < int'(NUM_PI); j++) pi[j] = 1'($urandom);
      tmode = ($urandom_range(0, 7) == 0) ? MODE_ISTG : MODE_FUNC;
      tsel = TSEL_W'($urandom);
      if (state_of(msr) == 1 && $urandom_range(0, 1) == 1) begin
        pi = '1; tmode = MODE_ISTG;
      end
      #1;
      s = state_of(msr);
      b = (s >= 0) ? int'(pi[s % int'(NUM_PI)]) : 0;
      epo = (s >= 0) ? out_val(s, b) : '0;
      checks++;
      if (po !== epo) begin
        failures++;
        $display("FAIL %m k=%0d po=%h expected %h", k, po, epo);
      end
      if (rst) nxt = code(0);
      else if (tmode == MODE_ISTG) begin
        if (pi == '1 && msr == code(1)) begin
          nxt = row_out(int'(tsel)); tsel_seen[tsel] = 1'b1; n_istg++;
        end else nxt = '0;
      end else begin
        nxt = (s >= 0) ? code(next_idx(s, b)) : code(0); n_func++;
      end
      @(posedge clk); #1;
      msr = nxt;
      checks++;
      if (tout !== msr) begin
        failures++;
        $display("FAIL %m k=%0d tout=%h expected %h", k, tout, msr);
      end
    end
    checks++;
    if (tsel_seen != '1 || n_istg == 0 || n_func == 0) begin
      failures++;
      $display("FAIL %m mechanisms: tsel_seen=%b istg=%0d func=%0d", tsel_seen, n_istg, n_func);
    end
    done = 1'b1;
  end
endmodule
