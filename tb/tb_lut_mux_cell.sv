// tb_lut_mux_cell: self-checking testbench for lut_mux_cell.
//
// Instantiates the cell at its default size (LUT 4 + 4 MUXes) and at
// LUT 3 + 5 MUXes (a MUX tree), LUT 5 + 3 MUXes and LUT 7 + 1 MUX. Every instance gets random keys and all
// 256 input patterns, compared with the reference model. The default cell
// is then keyed to stand for a known gate cone,
//   y = (x1 & x2) | (x4 ^ x6)
// with MUX 0 taking its dummy-side wire x1 (key 1) and the other MUXes their
// key-0 wires, and is checked against that expression directly; a key with
// one MUX select flipped must then corrupt the output for some pattern.
// Watchdog as in the other testbenches.
module tb_lut_mux_cell;
  import obf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  logic [19:0]  key4; logic y4;
  logic [12:0]  key3; logic y3;
  logic [34:0]  key5; logic y5;
  logic [128:0] key7; logic y7;

  lut_mux_cell              dut4 (.x(x), .key(key4), .y(y4));
  lut_mux_cell #(.LUT_N(3)) dut3 (.x(x), .key(key3), .y(y3));
  lut_mux_cell #(.LUT_N(5)) dut5 (.x(x), .key(key5), .y(y5));
  lut_mux_cell #(.LUT_N(7)) dut7 (.x(x), .key(key7), .y(y7));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%h: got %0b expected %0b", what, x, got, exp);
    end
  endtask

  initial begin
    logic [KMAX-1:0] k4, k3, k5, k7;
    logic [15:0] tt;
    int corrupt;
    x = '0; key4 = '0; key3 = '0; key5 = '0; key7 = '0;
    for (int r = 0; r < 40; r++) begin
      k4 = rand_key(20); k3 = rand_key(13); k5 = rand_key(35); k7 = rand_key(129);
      key4 = k4[19:0]; key3 = k3[12:0]; key5 = k5[34:0]; key7 = k7[128:0];
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        check(y4, ref_lut_mux(x, k4, 4), "4+4 random");
        check(y3, ref_lut_mux(x, k3, 3), "3+5 random");
        check(y5, ref_lut_mux(x, k5, 5), "5+3 random");
        check(y7, ref_lut_mux(x, k7, 7), "7+1 random");
      end
    end

    // Known cone on the default cell. LUT inputs: in0 = MUX0 -> x1 (key 1),
    // in1 = MUX1 -> x2 (key 0), in2 = MUX2 -> x4 (key 0), in3 = MUX3 -> x6
    // (key 0). LUT function: (in0 & in1) | (in2 ^ in3).
    for (int a = 0; a < 16; a++)
      tt[a] = (a[0] & a[1]) | (a[2] ^ a[3]);
    key4 = {4'b0001, tt};
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check(y4, (x[1] & x[2]) | (x[4] ^ x[6]), "keyed cone");
    end
    // Wrong routing key: MUX0 takes x0 instead of x1.
    key4 = {4'b0000, tt};
    corrupt = 0;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      if (y4 != ((x[1] & x[2]) | (x[4] ^ x[6]))) corrupt++;
    end
    checks++;
    if (corrupt == 0) begin
      failures++;
      $display("FAIL wrong MUX key did not change the function");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
