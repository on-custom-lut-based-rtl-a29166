// tb_obf_benchmark_sizes: the obfuscation banks at the benchmark sizes.
//
// Runs programming, activation and a wrong key (see top_activation_run) on
// three tops sized for the gate counts replaced in the benchmarks: 12 cells
// (C2670), 28 cells (B12) and 50 cells (AES, FIR, IIR, DES). The 15-cell
// C7552 size is the default and is covered by tb_custom_lut_obf_top.
module tb_obf_benchmark_sizes;

  logic clk = 0;
  always #5 clk = ~clk;

  logic d12, d28, d50;
  int c12, c28, c50, f12, f28, f50;

  top_activation_run #(.NC(12)) r12 (.clk(clk), .done(d12), .checks(c12), .failures(f12));
  top_activation_run #(.NC(28)) r28 (.clk(clk), .done(d28), .checks(c28), .failures(f28));
  top_activation_run #(.NC(50)) r50 (.clk(clk), .done(d50), .checks(c50), .failures(f50));

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c12 + c28 + c50, f12 + f28 + f50 + 1);
    $finish;
  end

  initial begin
    wait (d12 && d28 && d50);
    $display("NC=12: %0d checks, NC=28: %0d checks, NC=50: %0d checks", c12, c28, c50);
    $display("TB_RESULT checks=%0d failures=%0d", c12 + c28 + c50, f12 + f28 + f50);
    $finish;
  end

endmodule
