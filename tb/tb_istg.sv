// tb_istg: exhaustive self-check of the invalid test state/transition generator.
//
// All 32 combinations of pi (2 bits), ps (2 bits) and tsel (1 bit) are applied to
// the default table and compared with a reference written here as explicit rules:
//   pi=01, ps=01, tsel=0 -> S2=01   (the merged row "0101|01")
//   pi=01, ps=01, tsel=1 -> S2=11   (same first vector, other tsel)
//   pi=1-, ps=11         -> S2=10   (any tsel)
//   anything else        -> no hit, S2=00
// A second instance whose table needs no tsel checks that an all-don't-care tsel
// leaves the pin without effect.
module tb_istg;
  import ctrl_dft_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] pi, ps, s2, s2b;
  logic       tsel, hit, hitb;
  istg dut (.pi(pi), .ps(ps), .tsel(tsel), .s2(s2), .hit(hit));

  // Single-row table with tsel ignored: 10&00 -> 11.
  istg #(
    .NUM_PI(2), .NUM_SR(2), .TSEL_W(1), .N_ROWS(1),
    .ROW_IN(4'b1000), .ROW_CARE(4'b1111), .ROW_TSEL(1'b1),
    .ROW_TSEL_CARE(1'b0), .ROW_OUT(2'b11)
  ) dut_b (.pi(pi), .ps(ps), .tsel(tsel), .s2(s2b), .hit(hitb));

  int hits_seen = 0;

  initial begin
    logic [1:0] es;
    logic       eh;
    for (int v = 0; v < 32; v++) begin
      {tsel, pi, ps} = 5'(v);
      #1;
      eh = 1'b1;
      if (pi == 2'b01 && ps == 2'b01 && !tsel)      es = 2'b01;
      else if (pi == 2'b01 && ps == 2'b01 && tsel)  es = 2'b11;
      else if (pi[1] && ps == 2'b11)                es = 2'b10;
      else begin es = 2'b00; eh = 1'b0; end
      checks++;
      if (s2 !== es || hit !== eh) begin
        failures++;
        $display("FAIL pi=%b ps=%b tsel=%b: got s2=%b hit=%b, expected %b %b",
                 pi, ps, tsel, s2, hit, es, eh);
      end
      if (hit) hits_seen++;
      checks++;
      if ((pi == 2'b10 && ps == 2'b00) ? (s2b !== 2'b11 || !hitb)
                                       : (s2b !== 2'b00 || hitb)) begin
        failures++;
        $display("FAIL second table pi=%b ps=%b tsel=%b: s2=%b hit=%b",
                 pi, ps, tsel, s2b, hitb);
      end
    end
    // 1 + 1 + 2 pi values x 2 tsel values for the unreachable-state row
    checks++;
    if (hits_seen != 6) begin
      failures++;
      $display("FAIL hit count %0d, expected 6", hits_seen);
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
