// tb_key_mux2: self-checking testbench for key_mux2.
//
// Applies all eight combinations of the two data wires and the key bit and
// checks that key 0 passes d0 and key 1 passes d1. A watchdog ends the run
// with a failure if it does not finish.
module tb_key_mux2;

  int checks = 0;
  int failures = 0;

  logic d0, d1, key, y;
  key_mux2 dut (.d0(d0), .d1(d1), .key(key), .y(y));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 8; v++) begin
        bit exp;
        {key, d1, d0} = 3'(v);
        #1;
        exp = (v >= 4) ? v[1] : v[0];
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL key=%0b d1=%0b d0=%0b: y=%0b expected %0b", key, d1, d0, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
