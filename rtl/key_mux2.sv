// key_mux2: key-selected 2:1 MUX for routing obfuscation.
//
// Placed in front of a LUT input, it passes either the true circuit wire or a
// dummy wire taken from elsewhere in the circuit; which one is the true wire
// is known only through the key bit. y = key ? d1 : d0.
//
// Interface: d0, d1 data inputs, key select bit, y output.
// Timing: combinational, no clock.
module key_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic key,
  output logic y
);

  always_comb y = key ? d1 : d0;

endmodule
