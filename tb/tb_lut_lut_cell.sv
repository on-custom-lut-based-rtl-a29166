// tb_lut_lut_cell: self-checking testbench for lut_lut_cell.
//
// Instantiates the cell at its default size (LUT 3 + 5 two-input LUTs) and
// at LUT 2 + 6, LUT 4 + 4 and LUT 7 + 1. Every instance gets random keys and
// all 256 input patterns, compared with the reference model. The default
// cell is then keyed to stand for a known 8-input cone,
//   y = ((x0 & x1) ^ x2) | ((x3 | x4) & (x5 ^ (x6 & x7)))
// and checked against that expression directly, and keyed with its first
// small LUT acting as a plain routing choice (pass x1) to check that a
// 2-input LUT can take the place of a 2:1 MUX. Watchdog as elsewhere.
module tb_lut_lut_cell;
  import obf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x;
  logic [27:0]  key3; logic y3;
  logic [27:0]  key2; logic y2;
  logic [31:0]  key4; logic y4;
  logic [131:0] key7; logic y7;

  lut_lut_cell              dut3 (.x(x), .key(key3), .y(y3));
  lut_lut_cell #(.LUT_N(2)) dut2 (.x(x), .key(key2), .y(y2));
  lut_lut_cell #(.LUT_N(4)) dut4 (.x(x), .key(key4), .y(y4));
  lut_lut_cell #(.LUT_N(7)) dut7 (.x(x), .key(key7), .y(y7));

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

  // 2-input truth tables, address {b, a}.
  localparam logic [3:0] T_AND  = 4'b1000;
  localparam logic [3:0] T_OR   = 4'b1110;
  localparam logic [3:0] T_XOR  = 4'b0110;
  localparam logic [3:0] T_PASS_B = 4'b1100;  // output = second input

  initial begin
    logic [KMAX-1:0] k3, k2, k4, k7;
    logic [7:0] tt;
    x = '0; key3 = '0; key2 = '0; key4 = '0; key7 = '0;
    for (int r = 0; r < 40; r++) begin
      k3 = rand_key(28); k2 = rand_key(28); k4 = rand_key(32); k7 = rand_key(132);
      key3 = k3[27:0]; key2 = k2[27:0]; key4 = k4[31:0]; key7 = k7[131:0];
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        check(y3, ref_lut_lut(x, k3, 3), "3+5 random");
        check(y2, ref_lut_lut(x, k2, 2), "2+6 random");
        check(y4, ref_lut_lut(x, k4, 4), "4+4 random");
        check(y7, ref_lut_lut(x, k7, 7), "7+1 random");
      end
    end

    // Known cone. Small LUTs: S0 = x0&x1, S1 = S0^x2, S2 = x3|x4,
    // S3 = x6&x7, S4 = x5^S3. Main LUT: in0 | (in1 & in2).
    for (int a = 0; a < 8; a++) tt[a] = a[0] | (a[1] & a[2]);
    key3 = {T_XOR, T_AND, T_OR, T_XOR, T_AND, tt};
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check(y3, ((x[0] & x[1]) ^ x[2]) | ((x[3] | x[4]) & (x[5] ^ (x[6] & x[7]))),
            "keyed cone");
    end
    // S0 as a routing choice passing x1, S1 passing S0, main LUT = in0:
    // the cell output must follow x1 alone.
    for (int a = 0; a < 8; a++) tt[a] = a[0];
    key3 = {T_XOR, T_AND, T_OR, 4'b1010, T_PASS_B, tt};
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check(y3, x[1], "small LUT as MUX");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
