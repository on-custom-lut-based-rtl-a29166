// custom_lut_obf_top: banks of customized-LUT obfuscation cells.
//
// The two cell variants stand side by side, each as an independent bank of
// NUM_CELLS cells with its own key store and programming port:
//   - LUT+MUX bank: lut_mux_cell (LUT of size MUX_LUT_N + 2:1 key MUXes),
//     the variant that needs fewer non-volatile bits;
//   - LUT+LUT bank: lut_lut_cell (LUT of size LL_LUT_N + 2-input LUTs),
//     the variant with the lower area and power.
// Each cell stands in for one gate cone chosen by the gate-replacement step;
// its eight input wires (true and dummy wires) and its output are ports,
// where the host netlist connects. NUM_CELLS defaults to 15, the number of
// gates replaced in the C7552 benchmark; the host netlist itself is not part
// of this RTL.
//
// Keys: bank b's key store holds NUM_CELLS cell keys, cell c at bits
// [c*W +: W] with W the cell key width (20 for LUT 4 + 4 MUXes, 28 for
// LUT 3 + 5 two-input LUTs). A bank is programmed by shifting its whole key
// in serially, least significant bit first, NUM_CELLS*W cycles with
// <bank>_prog_en high. Until then the bank computes an unknown function.
// Timing: the cells are combinational from x to y; only programming is
// clocked.
module custom_lut_obf_top
  import obf_pkg::*;
#(
  parameter int unsigned NUM_CELLS = 15,
  parameter int unsigned MUX_LUT_N = LUT_MUX_LUT_N,
  parameter int unsigned LL_LUT_N  = LUT_LUT_LUT_N
) (
  input  logic                                  clk,
  // LUT+MUX bank
  input  logic                                  mux_prog_en,
  input  logic                                  mux_prog_din,
  input  logic [NUM_CELLS-1:0][CELL_INPUTS-1:0] mux_x,
  output logic [NUM_CELLS-1:0]                  mux_y,
  // LUT+LUT bank
  input  logic                                  ll_prog_en,
  input  logic                                  ll_prog_din,
  input  logic [NUM_CELLS-1:0][CELL_INPUTS-1:0] ll_x,
  output logic [NUM_CELLS-1:0]                  ll_y
);

  localparam int unsigned MUX_KW = lut_mux_key_bits(MUX_LUT_N);
  localparam int unsigned LL_KW  = lut_lut_key_bits(LL_LUT_N);

  logic [NUM_CELLS*MUX_KW-1:0] mux_key;
  logic [NUM_CELLS*LL_KW-1:0]  ll_key;

  key_store #(.KEY_BITS(NUM_CELLS*MUX_KW)) u_mux_keys (
    .clk     (clk),
    .prog_en (mux_prog_en),
    .prog_din(mux_prog_din),
    .key     (mux_key)
  );

  key_store #(.KEY_BITS(NUM_CELLS*LL_KW)) u_ll_keys (
    .clk     (clk),
    .prog_en (ll_prog_en),
    .prog_din(ll_prog_din),
    .key     (ll_key)
  );

  for (genvar c = 0; c < NUM_CELLS; c++) begin : g_cell
    lut_mux_cell #(.LUT_N(MUX_LUT_N)) u_mux_cell (
      .x  (mux_x[c]),
      .key(mux_key[c*MUX_KW +: MUX_KW]),
      .y  (mux_y[c])
    );

    lut_lut_cell #(.LUT_N(LL_LUT_N)) u_ll_cell (
      .x  (ll_x[c]),
      .key(ll_key[c*LL_KW +: LL_KW]),
      .y  (ll_y[c])
    );
  end

endmodule
