// stt_lut: N-input look-up table whose contents are the configuration key.
//
// The output is the configuration bit addressed by the inputs: out = cfg[in].
// In the target technology the 2**N configuration bits sit in non-volatile
// MTJ latches and the path from the LUT inputs to the output is a plain MUX
// tree, which is exactly what this module describes; the storage itself is
// outside (see key_store), so this block is purely combinational.
//
// Interface: in[N-1:0] (in[0] is the least significant address bit),
// cfg[2**N-1:0] (cfg[k] is the output for in == k), out.
// Timing: combinational, no clock.
module stt_lut #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      in,
  input  logic [(1<<N)-1:0] cfg,
  output logic              out
);

  always_comb out = cfg[in];

endmodule
