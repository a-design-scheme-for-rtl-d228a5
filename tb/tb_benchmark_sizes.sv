// tb_benchmark_sizes: the controller with its test logic at the sizes of the four
// benchmark controllers, in binary and one-hot state assignment.
//
// Input, output and state counts follow the benchmark table: dk15 3/5/4,
// dk17 2/3/8, kirkman 12/6/16, sand 11/9/32; the number of state flip-flops is
// log2 of the state count (binary) or the state count (one-hot). The tsel width of
// each case follows from its extra-pin count, |tsel| + |tout| + 1; where that is
// zero (dk17, binary) one tsel bit is kept. The transition tables themselves are
// generated (see bench_harness), since only the sizes are known. Each instance
// runs random vectors with test-mode transitions and checks po and tout every
// clock against its reference model.
module tb_benchmark_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  int   c[NCFG], f[NCFG];
  logic d[NCFG];

  //               PI  PO  ST  OH  TSEL
  bench_harness #(3,  5,  4,  0,  1) u_dk15_bin (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  bench_harness #(3,  5,  4,  1,  1) u_dk15_oh  (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  bench_harness #(2,  3,  8,  0,  1) u_dk17_bin (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  bench_harness #(2,  3,  8,  1,  2) u_dk17_oh  (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));
  bench_harness #(12, 6, 16,  0,  3) u_kirk_bin (.clk(clk), .checks(c[4]), .failures(f[4]), .done(d[4]));
  bench_harness #(12, 6, 16,  1,  1) u_kirk_oh  (.clk(clk), .checks(c[5]), .failures(f[5]), .done(d[5]));
  bench_harness #(11, 9, 32,  0,  4, 6000) u_sand_bin (.clk(clk), .checks(c[6]), .failures(f[6]), .done(d[6]));
  bench_harness #(11, 9, 32,  1,  3, 6000) u_sand_oh  (.clk(clk), .checks(c[7]), .failures(f[7]), .done(d[7]));

  initial begin
    int checks, failures;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (50000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
