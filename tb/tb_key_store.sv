// tb_key_store: self-checking testbench for key_store.
//
// Shifts random keys into a 20-bit store (its default size), one bit per
// clock, least significant bit first, and checks that after exactly
// KEY_BITS accepted bits the stored word equals the key, that the word holds
// while prog_en is low, and that a half-finished load shows the first bits
// only half-way up the word. A watchdog ends the run with a failure.
module tb_key_store;

  localparam int KB = 20;

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic prog_en = 0;
  logic prog_din = 0;
  logic [KB-1:0] key;

  key_store dut (.clk(clk), .prog_en(prog_en), .prog_din(prog_din), .key(key));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [KB-1:0] got, input logic [KB-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Shift 'n' bits of 'k' in, LSB first; returns the cycles prog_en was high.
  task automatic shift_in(input logic [KB-1:0] k, input int n, output int cycles);
    cycles = 0;
    for (int b = 0; b < n; b++) begin
      prog_en  <= 1'b1;
      prog_din <= k[b];
      @(posedge clk);
      cycles++;
    end
    prog_en <= 1'b0;
    prog_din <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    logic [KB-1:0] k, prev;
    int cyc;
    @(posedge clk);
    for (int r = 0; r < 40; r++) begin
      k = KB'($urandom);
      shift_in(k, KB, cyc);
      check(key, k, "full load");
      checks++;
      if (cyc != KB) begin
        failures++;
        $display("FAIL load took %0d cycles, expected %0d", cyc, KB);
      end
      // Hold: no change while prog_en is low, whatever prog_din does.
      prev = key;
      for (int i = 0; i < 10; i++) begin
        prog_din <= 1'($urandom);
        @(posedge clk);
      end
      check(key, prev, "hold");
    end
    // Partial load: after 5 more bits the new bits sit in the top 5 places
    // and the rest of the old word has moved down by 5.
    prev = key;
    k = KB'($urandom);
    shift_in(k, 5, cyc);
    check(key, {k[4:0], prev[KB-1:5]}, "partial load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
