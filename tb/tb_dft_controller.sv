// tb_dft_controller: end-to-end test of the delay-testable controller at its
// default parameters (the example controller and ISTG of ctrl_dft_pkg).
//
// The testbench plays the tester. It first applies a directed test sequence made
// of two-pattern tests, one vector per clock with no idle cycles:
//   T1 valid   (10&A, 01&B)   applied by the controller's own behaviour
//   T2 invalid (01&B, 00&B)   S1 -> S2 forced through ISTG row 0 (tsel = 0)
//   T3 invalid (01&B, 10&U)   ISTG row 1 (tsel = 1) loads the unreachable state U
//   T4 invalid (10&U, 00&C)   ISTG row 2 leaves the unreachable state
// with the extra vectors needed to reach each test's first state, followed by
// random vectors, resets, modes and tsel values. Every cycle the primary outputs
// are compared with a reference model of the STG and the ISTG written here as
// explicit rules, and after every edge tout is compared with the predicted state
// register: a test's response must appear on tout exactly one clock after its
// second vector. The test application time of the directed sequence is checked to
// be one clock per vector and compared with the two scan-based estimates
// n(nFF+2)+nFF and 2n(nFF+1)+nFF for the same number of tests.
// Each mechanism must have happened at least once: reset, a functional transition,
// each ISTG row, tsel selecting between rows with a shared first vector, entering
// and leaving the unreachable state, and an ISTG miss.
module tb_dft_controller;
  import ctrl_dft_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst;
  logic [1:0] pi, po, tout;
  test_mode_e tmode;
  logic [0:0] tsel;

  dft_controller dut (
    .clk(clk), .rst(rst), .pi(pi), .po(po), .tmode(tmode), .tsel(tsel), .tout(tout));

  // ---------------- reference model ----------------
  localparam logic [1:0] A = 2'b00, B = 2'b01, C = 2'b10, U = 2'b11;

  function automatic logic [3:0] ref_func(input logic [1:0] i, input logic [1:0] s);
    // returns {next state, outputs}
    case (s)
      A: return i[1] ? {B, 2'b01} : {A, 2'b00};
      B: return i[0] ? {C, 2'b10} : {A, 2'b00};
      C: return i[1] ? {A, 2'b11} : {C, 2'b10};
      default: return {A, 2'b00};
    endcase
  endfunction

  // returns {hit, row(2), s2(2)}
  function automatic logic [4:0] ref_istg(input logic [1:0] i, input logic [1:0] s,
                                          input logic t);
    if (i == 2'b01 && s == B && !t) return {1'b1, 2'd0, B};
    if (i == 2'b01 && s == B && t)  return {1'b1, 2'd1, U};
    if (i[1] && s == U)             return {1'b1, 2'd2, C};
    return {1'b0, 2'd3, 2'b00};
  endfunction

  logic [1:0] model_sr;

  // mechanism counters
  int n_reset = 0, n_func = 0, n_istg_row[3] = '{0, 0, 0}, n_istg_miss = 0;
  int n_enter_u = 0, n_leave_u_func = 0, n_leave_u_istg = 0, n_tsel_split = 0;

  // One clock: drive a vector, check po before the edge, check tout after it.
  task automatic apply(input logic r, input logic [1:0] i, input test_mode_e m,
                       input logic t);
    logic [3:0] f;
    logic [4:0] g;
    logic [1:0] nxt;
    rst = r; pi = i; tmode = m; tsel = t;
    #1;
    f = ref_func(i, model_sr);
    g = ref_istg(i, model_sr, t);
    checks++;
    if (po !== f[1:0]) begin
      failures++;
      $display("FAIL t=%0t po=%b expected %b (sr=%b pi=%b)", $time, po, f[1:0], model_sr, i);
    end
    if (r) begin
      nxt = A; n_reset++;
    end else if (m == MODE_ISTG) begin
      nxt = g[1:0];
      if (g[4]) begin
        n_istg_row[g[3:2]]++;
        if (g[3:2] == 2'd1) n_tsel_split++;
      end else n_istg_miss++;
    end else begin
      nxt = f[3:2]; n_func++;
    end
    if (!r && model_sr != U && nxt == U) n_enter_u++;
    if (!r && model_sr == U && nxt != U) begin
      if (m == MODE_ISTG) n_leave_u_istg++; else n_leave_u_func++;
    end
    @(posedge clk);
    model_sr = nxt;
    #1;
    checks++;
    if (tout !== model_sr) begin
      failures++;
      $display("FAIL t=%0t tout=%b expected %b", $time, tout, model_sr);
    end
  endtask

  int cyc_start, cyc_end, cycle_count = 0;
  always @(posedge clk) cycle_count++;

  initial begin
    rst = 1'b1; pi = '0; tmode = MODE_FUNC; tsel = '0;
    model_sr = A;
    apply(1'b1, 2'b00, MODE_FUNC, 1'b0);            // reset

    // ---- directed test sequence: 4 two-pattern tests, 14 vectors ----
    cyc_start = cycle_count;
    // T1 valid: A --10--> B, then second vector 01&B (B --01--> C)
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);
    apply(1'b0, 2'b01, MODE_FUNC, 1'b0);
    checks++; if (tout !== C) begin failures++; $display("FAIL T1 response %b", tout); end
    // reach B from C: C --10--> A --10--> B
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);
    // T2 invalid: 01&B with ISTG (tsel 0) -> B, second vector 00&B -> A
    apply(1'b0, 2'b01, MODE_ISTG, 1'b0);
    checks++; if (tout !== B) begin failures++; $display("FAIL T2 S2 %b", tout); end
    apply(1'b0, 2'b00, MODE_FUNC, 1'b0);
    checks++; if (tout !== A) begin failures++; $display("FAIL T2 response %b", tout); end
    // reach B: A --10--> B
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);
    // T3 invalid: 01&B with ISTG (tsel 1) -> U; its second vector 10&U is also
    // the first vector of T4 (overlap), applied through ISTG row 2 -> C
    apply(1'b0, 2'b01, MODE_ISTG, 1'b1);
    checks++; if (tout !== U) begin failures++; $display("FAIL T3 S2 %b", tout); end
    apply(1'b0, 2'b10, MODE_ISTG, 1'b0);
    checks++; if (tout !== C) begin failures++; $display("FAIL T4 S2 %b", tout); end
    // T4 second vector 00&C -> C
    apply(1'b0, 2'b00, MODE_FUNC, 1'b0);
    checks++; if (tout !== C) begin failures++; $display("FAIL T4 response %b", tout); end
    // T3 proper second vector 10&U in functional mode: U leaves to reset state
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);            // C --10--> A
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);            // A --10--> B
    apply(1'b0, 2'b01, MODE_ISTG, 1'b1);            // B => U
    apply(1'b0, 2'b10, MODE_FUNC, 1'b0);            // 10&U -> A
    checks++; if (tout !== A) begin failures++; $display("FAIL T3 response %b", tout); end
    cyc_end = cycle_count;

    // at-speed: one clock per vector, 14 vectors, no shift cycles
    checks++;
    if (cyc_end - cyc_start != 14) begin
      failures++;
      $display("FAIL directed sequence took %0d clocks, expected 14", cyc_end - cyc_start);
    end
    // scan-based estimates for the same n = 4 tests on nFF = 2 flip-flops
    checks++;
    if (!(cyc_end - cyc_start < 2 * 4 * (2 + 1) + 2)) begin
      failures++;
      $display("FAIL not shorter than the enhanced-scan estimate");
    end
    $display("directed sequence: %0d clocks; standard scan %0d, enhanced scan %0d",
             cyc_end - cyc_start, 4 * (2 + 2) + 2, 2 * 4 * (2 + 1) + 2);

    // ---- random phase ----
    for (int k = 0; k < 3000; k++) begin
      apply($urandom_range(0, 30) == 0, 2'($urandom), test_mode_e'($urandom_range(0, 1)),
            1'($urandom));
    end

    checks++;
    if (n_reset == 0 || n_func == 0 || n_istg_row[0] == 0 || n_istg_row[1] == 0 ||
        n_istg_row[2] == 0 || n_istg_miss == 0 || n_enter_u == 0 || n_leave_u_func == 0 ||
        n_leave_u_istg == 0 || n_tsel_split == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: reset=%0d func=%0d istg_row0=%0d row1=%0d row2=%0d miss=%0d",
             n_reset, n_func, n_istg_row[0], n_istg_row[1], n_istg_row[2], n_istg_miss);
    $display("            enter_unreachable=%0d leave_func=%0d leave_istg=%0d tsel_split=%0d",
             n_enter_u, n_leave_u_func, n_leave_u_istg, n_tsel_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
