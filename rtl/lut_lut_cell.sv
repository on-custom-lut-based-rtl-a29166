// lut_lut_cell: customized LUT, variant 2 (LUT + LUT).
//
// Replaces an 8-input LUT by a LUT of size LUT_N fed through NUM_L2 =
// 8 - LUT_N two-input LUTs. A 2-input LUT can act as a 2:1 routing choice
// between its two wires (a MUX with a fixed select) or as any other 2-input
// function, so the small LUTs add a layer of logic as well as routing
// obfuscation in front of the main LUT.
//
// Topology, for x[0..7] standing for inputs I1..I8:
//   LUT_N = 3 (default, 3+5):  in0 = S1(S0(x0,x1), x2)
//                              in1 = S2(x3,x4)
//                              in2 = S4(x5, S3(x6,x7))
//   LUT_N = 4..7 (4+4 ... 7+1): in_j = S_j(x[2j], x[2j+1]) for j < NUM_L2,
//                              in_j = x[NUM_L2 + j] otherwise
//   LUT_N = 2 (2+6):           in0 = S2(S0(x0,x1), S1(x2,x3))
//                              in1 = S5(S3(x4,x5), S4(x6,x7))
// Sj(a,b) is a 2-input LUT with a on its address bit 0. The 3+5 and 7+1
// arrangements follow the published drawings of the cell; the 2+6 tree and
// the pairing order of 4+4 ... 6+2 are this design's choice.
// Key layout, KEY_W = 2**LUT_N + 4*NUM_L2 bits:
//   key[2**LUT_N-1:0]              main LUT contents
//   key[2**LUT_N + 4i +: 4]        contents of small LUT Si
// Timing: combinational; the key comes from key_store and is static in use.
module lut_lut_cell
  import obf_pkg::*;
#(
  parameter int unsigned LUT_N  = LUT_LUT_LUT_N,
  parameter int unsigned NUM_L2 = CELL_INPUTS - LUT_N,
  parameter int unsigned KEY_W  = lut_lut_key_bits(LUT_N)
) (
  input  logic [CELL_INPUTS-1:0] x,
  input  logic [KEY_W-1:0]       key,
  output logic                   y
);

  localparam int unsigned CFG_W = lut_cfg_bits(LUT_N);
  localparam int unsigned S_W   = lut_cfg_bits(SMALL_LUT_N);

  if (LUT_N < 2 || LUT_N > 7) begin : g_bad_size
    $error("lut_lut_cell: LUT_N must be between 2 and 7");
  end

  // Address inputs and outputs of the small LUTs.
  logic [NUM_L2-1:0][1:0] s_in;
  logic [NUM_L2-1:0]      s_out;
  logic [LUT_N-1:0]       lut_in;

  for (genvar i = 0; i < NUM_L2; i++) begin : g_small
    stt_lut #(.N(SMALL_LUT_N)) u_s (
      .in (s_in[i]),
      .cfg(key[CFG_W + S_W*i +: S_W]),
      .out(s_out[i])
    );
  end

  if (LUT_N == 3) begin : g_3p5
    always_comb begin
      s_in[0] = {x[1], x[0]};
      s_in[1] = {x[2], s_out[0]};
      s_in[2] = {x[4], x[3]};
      s_in[3] = {x[7], x[6]};
      s_in[4] = {s_out[3], x[5]};
    end
    assign lut_in = {s_out[4], s_out[2], s_out[1]};
  end else if (LUT_N == 2) begin : g_2p6
    always_comb begin
      s_in[0] = {x[1], x[0]};
      s_in[1] = {x[3], x[2]};
      s_in[2] = {s_out[1], s_out[0]};
      s_in[3] = {x[5], x[4]};
      s_in[4] = {x[7], x[6]};
      s_in[5] = {s_out[4], s_out[3]};
    end
    assign lut_in = {s_out[5], s_out[2]};
  end else begin : g_pairs
    for (genvar j = 0; j < LUT_N; j++) begin : g_in
      if (j < NUM_L2) begin : g_small_in
        assign s_in[j]   = {x[2*j+1], x[2*j]};
        assign lut_in[j] = s_out[j];
      end else begin : g_direct
        assign lut_in[j] = x[NUM_L2+j];
      end
    end
  end

  stt_lut #(.N(LUT_N)) u_lut (
    .in (lut_in),
    .cfg(key[CFG_W-1:0]),
    .out(y)
  );

endmodule
