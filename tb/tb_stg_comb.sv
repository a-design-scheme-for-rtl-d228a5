// tb_stg_comb: exhaustive self-check of the controller logic against the example STG.
//
// Every (input, present state) pair of the default 2-input, 2-state-bit controller
// is applied and the next state, outputs and hit flag are compared with a
// reference written here as a plain case statement over the STG:
//   A=00: 0- -> A/00, 1- -> B/01     B=01: -1 -> C/10, -0 -> A/00
//   C=10: 1- -> A/11, 0- -> C/10     11 (unreachable): -> A/00, no hit
// A second instance with a one-hot state assignment of the same machine checks
// that the table works for other encodings.
module tb_stg_comb;
  import ctrl_dft_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] pi, ps, ns, po;
  logic       hit;
  stg_comb dut (.pi(pi), .ps(ps), .ns(ns), .po(po), .hit(hit));

  // One-hot assignment of the same STG: A=001, B=010, C=100.
  logic [2:0] ps_oh, ns_oh;
  logic [1:0] po_oh;
  logic       hit_oh;
  stg_comb #(
    .NUM_PI(2), .NUM_PO(2), .NUM_SR(3), .N_TRANS(6),
    .TR_IN  ({2'b00, 2'b10, 2'b00, 2'b01, 2'b10, 2'b00}),
    .TR_CARE({2'b10, 2'b10, 2'b01, 2'b01, 2'b10, 2'b10}),
    .TR_PS  ({3'b100, 3'b100, 3'b010, 3'b010, 3'b001, 3'b001}),
    .TR_NS  ({3'b100, 3'b001, 3'b001, 3'b100, 3'b010, 3'b001}),
    .TR_OUT ({2'b10, 2'b11, 2'b00, 2'b10, 2'b01, 2'b00}),
    .RESET_STATE(3'b001)
  ) dut_oh (.pi(pi), .ps(ps_oh), .ns(ns_oh), .po(po_oh), .hit(hit_oh));

  task automatic ref_model(input logic [1:0] i, input logic [1:0] s,
                           output logic [1:0] n, output logic [1:0] o, output logic h);
    h = 1'b1;
    case (s)
      2'b00: if (i[1]) begin n = 2'b01; o = 2'b01; end else begin n = 2'b00; o = 2'b00; end
      2'b01: if (i[0]) begin n = 2'b10; o = 2'b10; end else begin n = 2'b00; o = 2'b00; end
      2'b10: if (i[1]) begin n = 2'b00; o = 2'b11; end else begin n = 2'b10; o = 2'b10; end
      default: begin n = 2'b00; o = 2'b00; h = 1'b0; end
    endcase
  endtask

  function automatic logic [2:0] to_oh(input logic [1:0] s);
    return 3'b001 << s;
  endfunction

  initial begin
    logic [1:0] en, eo;
    logic       eh;
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 4; i++) begin
        pi = 2'(i); ps = 2'(s);
        ps_oh = (s == 3) ? 3'b011 : to_oh(2'(s));
        #1;
        ref_model(2'(i), 2'(s), en, eo, eh);
        checks++;
        if (ns !== en || po !== eo || hit !== eh) begin
          failures++;
          $display("FAIL bin pi=%b ps=%b: got ns=%b po=%b hit=%b, expected %b %b %b",
                   pi, ps, ns, po, hit, en, eo, eh);
        end
        checks++;
        if (hit_oh !== eh || po_oh !== eo || (eh && ns_oh !== to_oh(en)) ||
            (!eh && ns_oh !== 3'b001)) begin
          failures++;
          $display("FAIL one-hot pi=%b ps=%b: got ns=%b po=%b hit=%b",
                   pi, ps_oh, ns_oh, po_oh, hit_oh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
