// lut_mux_cell: customized LUT, variant 1 (LUT + MUX).
//
// Replaces an 8-input LUT by a LUT of size LUT_N whose first NUM_MUX =
// 8 - LUT_N inputs are each driven by a key-selected 2:1 MUX. Each MUX picks
// between the true circuit wire and a dummy wire routed from elsewhere, so
// the key hides both the LUT function (logic obfuscation) and which wires
// reach the LUT (routing obfuscation). With the default LUT_N = 4 there are
// 4 MUXes, 8 signal inputs, and 2^4 * 2^(2^4) key configurations.
//
// Input mapping, Mj(a,b) being MUX j passing a with key 0 and b with key 1:
//   LUT_N = 4..7 (4+4 ... 7+1): in_j = Mj(x[2j], x[2j+1]) for j < NUM_MUX,
//                              in_j = x[NUM_MUX + j] otherwise
//   LUT_N = 3 (3+5):           in0 = M1(M0(x0,x1), x2), in1 = M2(x3,x4),
//                              in2 = M4(x5, M3(x6,x7))
//   LUT_N = 2 (2+6):           in0 = M2(M0(x0,x1), M1(x2,x3)),
//                              in1 = M5(M3(x4,x5), M4(x6,x7))
// The 3+5 and 2+6 MUX trees are the LUT+LUT cell's arrangements with each
// 2-input LUT replaced by a 2:1 MUX, since the two variants map onto each
// other that way; the wire order throughout is this design's choice.
// Key layout, KEY_W = 2**LUT_N + NUM_MUX bits:
//   key[2**LUT_N-1:0]     LUT contents, bit k is the output for LUT input k
//   key[2**LUT_N + j]     select of MUX j
// Timing: combinational; the key comes from key_store and is static in use.
module lut_mux_cell
  import obf_pkg::*;
#(
  parameter int unsigned LUT_N   = LUT_MUX_LUT_N,
  parameter int unsigned NUM_MUX = CELL_INPUTS - LUT_N,
  parameter int unsigned KEY_W   = lut_mux_key_bits(LUT_N)
) (
  input  logic [CELL_INPUTS-1:0] x,
  input  logic [KEY_W-1:0]       key,
  output logic                   y
);

  localparam int unsigned CFG_W = lut_cfg_bits(LUT_N);

  if (LUT_N < 2 || LUT_N > 7) begin : g_bad_size
    $error("lut_mux_cell: LUT_N must be between 2 and 7");
  end

  // Data inputs and outputs of the MUXes.
  logic [NUM_MUX-1:0][1:0] m_in;
  logic [NUM_MUX-1:0]      m_out;
  logic [LUT_N-1:0]        lut_in;

  for (genvar i = 0; i < NUM_MUX; i++) begin : g_mux
    key_mux2 u_mux (
      .d0 (m_in[i][0]),
      .d1 (m_in[i][1]),
      .key(key[CFG_W+i]),
      .y  (m_out[i])
    );
  end

  if (LUT_N == 3) begin : g_3p5
    always_comb begin
      m_in[0] = {x[1], x[0]};
      m_in[1] = {x[2], m_out[0]};
      m_in[2] = {x[4], x[3]};
      m_in[3] = {x[7], x[6]};
      m_in[4] = {m_out[3], x[5]};
    end
    assign lut_in = {m_out[4], m_out[2], m_out[1]};
  end else if (LUT_N == 2) begin : g_2p6
    always_comb begin
      m_in[0] = {x[1], x[0]};
      m_in[1] = {x[3], x[2]};
      m_in[2] = {m_out[1], m_out[0]};
      m_in[3] = {x[5], x[4]};
      m_in[4] = {x[7], x[6]};
      m_in[5] = {m_out[4], m_out[3]};
    end
    assign lut_in = {m_out[5], m_out[2]};
  end else begin : g_pairs
    for (genvar j = 0; j < LUT_N; j++) begin : g_in
      if (j < NUM_MUX) begin : g_mux_in
        assign m_in[j]   = {x[2*j+1], x[2*j]};
        assign lut_in[j] = m_out[j];
      end else begin : g_direct
        assign lut_in[j] = x[NUM_MUX+j];
      end
    end
  end

  stt_lut #(.N(LUT_N)) u_lut (
    .in (lut_in),
    .cfg(key[CFG_W-1:0]),
    .out(y)
  );

endmodule
