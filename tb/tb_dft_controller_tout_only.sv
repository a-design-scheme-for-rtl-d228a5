// tb_dft_controller_tout_only: the lighter configuration in which only the tout
// observation pins are added (HAS_ISTG = 0), next to the full scheme.
//
// Both instances get the same random inputs, resets, tmode and tsel for 2000
// clocks. The tout-only instance must always follow the controller's own STG,
// whatever tmode says, since it has neither the ISTG nor the multiplexers; the
// full instance must follow the ISTG whenever tmode selects it. Both are compared
// with a reference model of the example STG and ISTG written here. At least one
// cycle must occur in which the two instances load different states, showing that
// the ISTG path is what tells them apart.
module tb_dft_controller_tout_only;
  import ctrl_dft_pkg::*;

  int checks = 0, failures = 0, n_diverge = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst;
  logic [1:0] pi, po_a, po_b, tout_a, tout_b;
  test_mode_e tmode;
  logic [0:0] tsel;

  dft_controller #(.HAS_ISTG(1'b0)) dut_a (
    .clk(clk), .rst(rst), .pi(pi), .po(po_a), .tmode(tmode), .tsel(tsel), .tout(tout_a));
  dft_controller #(.HAS_ISTG(1'b1)) dut_b (
    .clk(clk), .rst(rst), .pi(pi), .po(po_b), .tmode(tmode), .tsel(tsel), .tout(tout_b));

  function automatic logic [3:0] ref_func(input logic [1:0] i, input logic [1:0] s);
    case (s)
      2'b00: return i[1] ? 4'b01_01 : 4'b00_00;
      2'b01: return i[0] ? 4'b10_10 : 4'b00_00;
      2'b10: return i[1] ? 4'b00_11 : 4'b10_10;
      default: return 4'b00_00;
    endcase
  endfunction

  function automatic logic [1:0] ref_istg(input logic [1:0] i, input logic [1:0] s,
                                          input logic t);
    if (i == 2'b01 && s == 2'b01) return t ? 2'b11 : 2'b01;
    if (i[1] && s == 2'b11)       return 2'b10;
    return 2'b00;
  endfunction

  logic [1:0] sa, sb, na, nb;

  initial begin
    rst = 1'b1; pi = '0; tmode = MODE_FUNC; tsel = '0;
    @(posedge clk); #1;
    sa = 2'b00; sb = 2'b00;
    for (int k = 0; k < 2000; k++) begin
      rst = ($urandom_range(0, 40) == 0);
      pi = 2'($urandom);
      tmode = test_mode_e'($urandom_range(0, 1));
      tsel = 1'($urandom);
      #1;
      checks++;
      if (po_a !== ref_func(pi, sa)[1:0] || po_b !== ref_func(pi, sb)[1:0]) begin
        failures++;
        $display("FAIL k=%0d po_a=%b po_b=%b", k, po_a, po_b);
      end
      na = rst ? 2'b00 : ref_func(pi, sa)[3:2];
      nb = rst ? 2'b00 : (tmode == MODE_ISTG) ? ref_istg(pi, sb, tsel) : ref_func(pi, sb)[3:2];
      if (sa == sb && na != nb) n_diverge++;
      @(posedge clk); #1;
      sa = na; sb = nb;
      checks++;
      if (tout_a !== sa || tout_b !== sb) begin
        failures++;
        $display("FAIL k=%0d tout_a=%b (exp %b) tout_b=%b (exp %b)", k, tout_a, sa, tout_b, sb);
      end
    end
    checks++;
    if (n_diverge == 0) begin failures++; $display("FAIL instances never diverged"); end
    $display("divergences: %0d", n_diverge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
