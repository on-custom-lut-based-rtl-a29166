// key_store: configuration memory holding the obfuscation key.
//
// Holds KEY_BITS configuration bits (LUT contents and MUX selects) for the
// customized LUT cells. The key is written once, during activation in a
// trusted facility, through a serial programming port: while prog_en is high,
// every clock shifts prog_din in at the top and moves the word one place
// towards bit 0, so after KEY_BITS cycles the first bit sent sits in key[0].
// In the target technology each bit is a non-volatile MTJ latch that is
// idle (leakage only) in use; here each bit is a flip-flop with the same
// logical behaviour. The store has no reset, on purpose: non-volatile
// contents survive a reset, and a device that was never programmed has an
// unknown (wrong) key. The store is kept apart from the test scan chain, so
// the key cannot be read out; there is no read port.
//
// Interface: clk, prog_en, prog_din in; key[KEY_BITS-1:0] out to the cells.
// Timing: one bit per clock while prog_en is high; key changes one cycle
// after each accepted bit and is static otherwise.
module key_store #(
  parameter int unsigned KEY_BITS = 20
) (
  input  logic                clk,
  input  logic                prog_en,
  input  logic                prog_din,
  output logic [KEY_BITS-1:0] key
);

  if (KEY_BITS < 2) begin : g_bad_size
    $error("key_store: KEY_BITS must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (prog_en) key <= {prog_din, key[KEY_BITS-1:1]};
  end

endmodule
