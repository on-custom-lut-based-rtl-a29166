// obf_ref_pkg: reference models of the customized-LUT cells for testbenches.
//
// Plain behavioural functions, written from the cell descriptions and not
// from the RTL: a LUT returns the configuration bit addressed by its inputs,
// a LUT+MUX cell routes wire pairs through key-selected 2:1 MUXes into its
// LUT, and a LUT+LUT cell passes its wires through 2-input LUTs in the
// arrangement documented for each LUT size. Keys are passed zero-extended to
// KMAX bits, laid out as in the cells (main LUT contents in the low bits).
package obf_ref_pkg;

  localparam int KMAX = 256;

  // n-input LUT: bit 'addr' of the truth table.
  function automatic bit ref_lut(input logic [KMAX-1:0] tt, input int unsigned addr);
    return tt[addr];
  endfunction

  // Pick a 4-bit truth table of a 2-input LUT out of a key.
  function automatic logic [3:0] small_tt(input logic [KMAX-1:0] key, input int base, input int i);
    logic [3:0] t;
    for (int b = 0; b < 4; b++) t[b] = key[base + 4*i + b];
    return t;
  endfunction

  // 2-input LUT with a on address bit 0 and b on address bit 1.
  function automatic bit lut2(input logic [3:0] tt, input bit a, input bit b);
    return tt[{b, a}];
  endfunction

  function automatic bit ref_lut_mux(input logic [7:0] x, input logic [KMAX-1:0] key,
                                     input int lut_n);
    int nmux = 8 - lut_n;
    int cfg  = 1 << lut_n;
    bit [6:0] in;
    bit m0, m1, m3, m4;
    int addr = 0;
    in = '0;
    // MUX j: key bit 0 passes the first wire, 1 the second.
    if (lut_n == 3) begin
      m0 = key[cfg+0] ? x[1] : x[0];
      in[0] = key[cfg+1] ? x[2] : m0;
      in[1] = key[cfg+2] ? x[4] : x[3];
      m3 = key[cfg+3] ? x[7] : x[6];
      in[2] = key[cfg+4] ? m3 : x[5];
    end else if (lut_n == 2) begin
      m0 = key[cfg+0] ? x[1] : x[0];
      m1 = key[cfg+1] ? x[3] : x[2];
      in[0] = key[cfg+2] ? m1 : m0;
      m3 = key[cfg+3] ? x[5] : x[4];
      m4 = key[cfg+4] ? x[7] : x[6];
      in[1] = key[cfg+5] ? m4 : m3;
    end else begin
      for (int j = 0; j < lut_n; j++)
        if (j < nmux) in[j] = key[cfg + j] ? x[2*j+1] : x[2*j];
        else          in[j] = x[nmux + j];
    end
    for (int j = 0; j < lut_n; j++) if (in[j]) addr += (1 << j);
    return ref_lut(key, addr);
  endfunction

  function automatic bit ref_lut_lut(input logic [7:0] x, input logic [KMAX-1:0] key,
                                     input int lut_n);
    int nl2 = 8 - lut_n;
    int cfg = 1 << lut_n;
    bit [6:0] in;
    bit s0, s1, s3, s4;
    int addr = 0;
    in = '0; s1 = 0; s4 = 0;
    if (lut_n == 3) begin
      // I1 and I2 meet first, the result meets I3; I4-I5 pair; I7-I8 pair
      // meets I6.
      s0 = lut2(small_tt(key, cfg, 0), x[0], x[1]);
      in[0] = lut2(small_tt(key, cfg, 1), s0, x[2]);
      in[1] = lut2(small_tt(key, cfg, 2), x[3], x[4]);
      s3 = lut2(small_tt(key, cfg, 3), x[6], x[7]);
      in[2] = lut2(small_tt(key, cfg, 4), x[5], s3);
    end else if (lut_n == 2) begin
      s0 = lut2(small_tt(key, cfg, 0), x[0], x[1]);
      s1 = lut2(small_tt(key, cfg, 1), x[2], x[3]);
      in[0] = lut2(small_tt(key, cfg, 2), s0, s1);
      s3 = lut2(small_tt(key, cfg, 3), x[4], x[5]);
      s4 = lut2(small_tt(key, cfg, 4), x[6], x[7]);
      in[1] = lut2(small_tt(key, cfg, 5), s3, s4);
    end else begin
      for (int j = 0; j < lut_n; j++)
        if (j < nl2) in[j] = lut2(small_tt(key, cfg, j), x[2*j], x[2*j+1]);
        else         in[j] = x[nl2 + j];
    end
    for (int j = 0; j < lut_n; j++) if (in[j]) addr += (1 << j);
    return ref_lut(key, addr);
  endfunction

  // Random key of 'bits' bits, zero above.
  function automatic logic [KMAX-1:0] rand_key(input int bits);
    logic [KMAX-1:0] k = '0;
    for (int b = 0; b < bits; b++) k[b] = 1'($urandom);
    return k;
  endfunction

endpackage
