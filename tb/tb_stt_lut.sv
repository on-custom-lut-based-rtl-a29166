// tb_stt_lut: self-checking testbench for stt_lut.
//
// Instantiates the LUT at its default size (4 inputs) and at 2 and 3
// inputs. For each, it loads named truth tables (AND, OR, XOR, a constant)
// and random ones, applies every input combination and compares the output
// with the function the truth table stands for. A watchdog ends the run
// with a failure if it does not finish.
module tb_stt_lut;

  int checks = 0;
  int failures = 0;

  logic [3:0]  in4;  logic [15:0] cfg4; logic out4;
  logic [2:0]  in3;  logic [7:0]  cfg3; logic out3;
  logic [1:0]  in2;  logic [3:0]  cfg2; logic out2;

  stt_lut                dut4 (.in(in4), .cfg(cfg4), .out(out4));
  stt_lut #(.N(3))       dut3 (.in(in3), .cfg(cfg3), .out(out3));
  stt_lut #(.N(2))       dut2 (.in(in2), .cfg(cfg2), .out(out2));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Truth table of a named function of n inputs, built by evaluating it.
  function automatic logic [15:0] table_of(input int fn, input int n);
    logic [15:0] t = '0;
    for (int a = 0; a < (1 << n); a++) begin
      logic [3:0] v = 4'(a);
      case (fn)
        0: t[a] = (n == 2) ? &v[1:0] : (n == 3) ? &v[2:0] : &v;   // AND
        1: t[a] = (n == 2) ? |v[1:0] : (n == 3) ? |v[2:0] : |v;   // OR
        2: t[a] = (n == 2) ? ^v[1:0] : (n == 3) ? ^v[2:0] : ^v;   // XOR
        default: t[a] = 1'b1;                                    // constant 1
      endcase
    end
    return t;
  endfunction

  function automatic bit eval_fn(input int fn, input logic [3:0] v, input int n);
    logic [3:0] m = 4'((1 << n) - 1);
    case (fn)
      0: return (v & m) == m;
      1: return (v & m) != 0;
      2: return ^(v & m);
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    in4 = '0; in3 = '0; in2 = '0; cfg4 = '0; cfg3 = '0; cfg2 = '0;
    // Named functions: the output must be the function of the inputs.
    for (int fn = 0; fn < 4; fn++) begin
      cfg4 = table_of(fn, 4); cfg3 = table_of(fn, 3)[7:0]; cfg2 = table_of(fn, 2)[3:0];
      for (int a = 0; a < 16; a++) begin
        in4 = 4'(a); in3 = 3'(a); in2 = 2'(a);
        #1;
        check(out4, eval_fn(fn, 4'(a), 4), "N=4 named");
        check(out3, eval_fn(fn, 4'(a), 3), "N=3 named");
        check(out2, eval_fn(fn, 4'(a), 2), "N=2 named");
      end
    end
    // Random truth tables, every address.
    for (int r = 0; r < 50; r++) begin
      cfg4 = 16'($urandom); cfg3 = 8'($urandom); cfg2 = 4'($urandom);
      for (int a = 0; a < 16; a++) begin
        in4 = 4'(a); in3 = 3'(a); in2 = 2'(a);
        #1;
        check(out4, cfg4[a], "N=4 random");
        check(out3, cfg3[a % 8], "N=3 random");
        check(out2, cfg2[a % 4], "N=2 random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
