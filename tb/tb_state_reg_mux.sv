// tb_state_reg_mux: self-check of the test-mode multiplexer and state register.
//
// Random next-state values, modes and resets are driven for 400 clocks. After
// each edge the register must hold RESET_STATE if reset was high, else the
// ISTG value in MODE_ISTG and the controller value in MODE_FUNC, exactly one
// clock after they were presented. A non-zero RESET_STATE is used so that a
// reset cannot be mistaken for a cleared register. Both modes and reset must
// each have happened.
module tb_state_reg_mux;
  import ctrl_dft_pkg::*;

  localparam int unsigned W = 3;
  localparam logic [W-1:0] RST_VAL = 3'b101;

  int checks = 0, failures = 0;
  int n_func = 0, n_istg = 0, n_rst = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  test_mode_e tmode;
  logic [W-1:0] ns_func, ns_istg, q, expected;

  state_reg_mux #(.NUM_SR(W), .RESET_STATE(RST_VAL)) dut (
    .clk(clk), .rst(rst), .tmode(tmode), .ns_func(ns_func), .ns_istg(ns_istg), .q(q));

  initial begin
    rst = 1'b1; tmode = MODE_FUNC; ns_func = '0; ns_istg = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== RST_VAL) begin failures++; $display("FAIL reset value %b", q); end
    for (int k = 0; k < 400; k++) begin
      rst     = ($urandom_range(0, 9) == 0);
      tmode   = test_mode_e'($urandom_range(0, 1));
      ns_func = W'($urandom);
      ns_istg = W'($urandom);
      if (rst)                    begin expected = RST_VAL; n_rst++;  end
      else if (tmode == MODE_ISTG) begin expected = ns_istg; n_istg++; end
      else                        begin expected = ns_func; n_func++; end
      @(posedge clk); #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL k=%0d rst=%b tmode=%0d: q=%b expected %b", k, rst, tmode, q, expected);
      end
    end
    checks++;
    if (n_func == 0 || n_istg == 0 || n_rst == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: func=%0d istg=%0d rst=%0d", n_func, n_istg, n_rst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
