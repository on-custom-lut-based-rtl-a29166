// obf_pkg: constants shared by the customized-LUT obfuscation cells.
//
// A customized cell replaces what would otherwise be one 8-input LUT placed
// over a cone of gates. Both variants keep that 8-signal input footprint but
// use a smaller LUT plus 2:1 key MUXes (LUT+MUX) or plus 2-input LUTs
// (LUT+LUT). The default sizes (LUT 4 + 4 MUXes, LUT 3 + 5 two-input LUTs)
// are the configurations evaluated as the main ones. The key widths below
// define how many configuration bits each cell needs; the bit layout inside a
// cell's key is this design's own choice and is described in each cell.
package obf_pkg;

  // Number of signal inputs of a customized cell (the replaced 8-input LUT).
  localparam int unsigned CELL_INPUTS = 8;

  // Default LUT sizes of the two variants.
  localparam int unsigned LUT_MUX_LUT_N = 4;
  localparam int unsigned LUT_LUT_LUT_N = 3;

  // Size of the small LUTs of the LUT+LUT variant.
  localparam int unsigned SMALL_LUT_N = 2;

  // Configuration bits of an n-input LUT.
  function automatic int unsigned lut_cfg_bits(int unsigned n);
    return 1 << n;
  endfunction

  // LUT+MUX cell: LUT contents plus one select bit per 2:1 MUX.
  function automatic int unsigned lut_mux_key_bits(int unsigned lut_n);
    return lut_cfg_bits(lut_n) + (CELL_INPUTS - lut_n);
  endfunction

  // LUT+LUT cell: LUT contents plus the contents of every 2-input LUT.
  function automatic int unsigned lut_lut_key_bits(int unsigned lut_n);
    return lut_cfg_bits(lut_n) + (CELL_INPUTS - lut_n) * lut_cfg_bits(SMALL_LUT_N);
  endfunction

endpackage
