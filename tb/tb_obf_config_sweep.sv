// tb_obf_config_sweep: every LUT-size configuration of both cell variants.
//
// Instantiates the LUT+MUX cell as LUT 7+1 ... 2+6 MUXes and the
// LUT+LUT cell as LUT 7+1 ... 2+6 two-input LUTs (the configurations of the
// C7552 size sweep), all with 8 wires, and compares each with the reference
// model for random keys and all 256 input patterns.
module tb_obf_config_sweep;
  import obf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  logic [KMAX-1:0] mkey [2:7];
  logic [KMAX-1:0] lkey [2:7];
  logic            my   [2:7];
  logic            ly   [2:7];

  for (genvar n = 2; n <= 7; n++) begin : g_mux
    localparam int KW = (1 << n) + 8 - n;
    lut_mux_cell #(.LUT_N(n)) dut (.x(x), .key(mkey[n][KW-1:0]), .y(my[n]));
  end
  for (genvar n = 2; n <= 7; n++) begin : g_ll
    localparam int KW = (1 << n) + 4 * (8 - n);
    lut_lut_cell #(.LUT_N(n)) dut (.x(x), .key(lkey[n][KW-1:0]), .y(ly[n]));
  end

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    for (int r = 0; r < 20; r++) begin
      for (int n = 2; n <= 7; n++) mkey[n] = rand_key((1 << n) + 8 - n);
      for (int n = 2; n <= 7; n++) lkey[n] = rand_key((1 << n) + 4 * (8 - n));
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        for (int n = 2; n <= 7; n++) begin
          checks++;
          if (my[n] !== ref_lut_mux(x, mkey[n], n)) begin
            failures++;
            if (failures < 10) $display("FAIL LUT+MUX %0d+%0d x=%h", n, 8 - n, x);
          end
        end
        for (int n = 2; n <= 7; n++) begin
          checks++;
          if (ly[n] !== ref_lut_lut(x, lkey[n], n)) begin
            failures++;
            if (failures < 10) $display("FAIL LUT+LUT %0d+%0d x=%h", n, 8 - n, x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
