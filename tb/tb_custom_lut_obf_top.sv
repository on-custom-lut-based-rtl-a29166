// tb_custom_lut_obf_top: end-to-end testbench of the obfuscation banks.
//
// Runs the top at its default size (15 cells per bank, LUT 4 + 4 MUXes and
// LUT 3 + 5 two-input LUTs) through the life of a locked part:
//   1. random keys: both banks are programmed over their serial ports with
//      random keys, and every cell is compared with the reference model on
//      random input patterns;
//   2. activation: the correct keys are programmed, making every LUT+MUX
//      cell compute (x1 & x2) | (x4 ^ x6) and every LUT+LUT cell compute
//      ((x0 & x1) ^ x2) | ((x3 | x4) & (x5 ^ (x6 & x7))), checked for all
//      256 patterns against those expressions;
//   3. wrong keys: each cell's key gets one bit flipped; the outputs must
//      follow the reference model for the wrong key and differ from the
//      intended function in at least one cell of each bank.
// It counts the mechanisms exercised (programming of each bank, MUX selects
// 0 and 1, small LUTs acting as a routing choice and as logic, unlocking,
// output corruption under a wrong key) and fails any that never happened.
// Programming must take exactly one clock per key bit.
module tb_custom_lut_obf_top;
  import obf_ref_pkg::*;

  localparam int NC    = 15;
  localparam int MUXKW = 20;
  localparam int LLKW  = 28;

  int checks = 0;
  int failures = 0;

  logic clk = 0;
  logic mux_prog_en = 0, mux_prog_din = 0, ll_prog_en = 0, ll_prog_din = 0;
  logic [NC-1:0][7:0] mux_x, ll_x;
  logic [NC-1:0]      mux_y, ll_y;

  custom_lut_obf_top dut (
    .clk(clk),
    .mux_prog_en(mux_prog_en), .mux_prog_din(mux_prog_din), .mux_x(mux_x), .mux_y(mux_y),
    .ll_prog_en(ll_prog_en), .ll_prog_din(ll_prog_din), .ll_x(ll_x), .ll_y(ll_y)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-cell keys, zero-extended for the reference model.
  logic [KMAX-1:0] mk [NC];
  logic [KMAX-1:0] lk [NC];

  // Mechanism counters.
  int n_prog_mux = 0, n_prog_ll = 0;
  int n_sel0 = 0, n_sel1 = 0;
  int n_small_route = 0, n_small_logic = 0;
  int n_unlocked = 0, n_corrupt_mux = 0, n_corrupt_ll = 0;

  localparam logic [3:0] T_AND = 4'b1000, T_OR = 4'b1110, T_XOR = 4'b0110;

  task automatic check(input bit got, input bit exp, input string what, input int c);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s cell %0d: got %0b expected %0b", what, c, got, exp);
    end
  endtask

  // Shift both banks' keys in together, LSB first; count the clocks.
  task automatic program_keys();
    logic [NC*MUXKW-1:0] mw;
    logic [NC*LLKW-1:0]  lw;
    int cyc_m = 0, cyc_l = 0;
    for (int c = 0; c < NC; c++) begin
      mw[c*MUXKW +: MUXKW] = mk[c][MUXKW-1:0];
      lw[c*LLKW +: LLKW]   = lk[c][LLKW-1:0];
    end
    for (int b = 0; b < NC*LLKW; b++) begin
      mux_prog_en  <= (b < NC*MUXKW);
      mux_prog_din <= (b < NC*MUXKW) ? mw[b] : 1'b0;
      ll_prog_en   <= 1'b1;
      ll_prog_din  <= lw[b];
      @(posedge clk);
      if (b < NC*MUXKW) cyc_m++;
      cyc_l++;
    end
    mux_prog_en <= 0; ll_prog_en <= 0;
    @(posedge clk);
    checks += 2;
    if (cyc_m != NC*MUXKW || cyc_l != NC*LLKW) begin
      failures++;
      $display("FAIL programming took %0d/%0d cycles", cyc_m, cyc_l);
    end
    n_prog_mux++; n_prog_ll++;
    // Census of the routing elements configured.
    for (int c = 0; c < NC; c++) begin
      for (int j = 0; j < 4; j++) if (mk[c][16+j]) n_sel1++; else n_sel0++;
      for (int i = 0; i < 5; i++) begin
        logic [3:0] t = small_tt(lk[c], 8, i);
        if (t == 4'b1010 || t == 4'b1100) n_small_route++;
        else if (t != 4'b0000 && t != 4'b1111) n_small_logic++;
      end
    end
  endtask

  function automatic bit mux_cone(input logic [7:0] v);
    return (v[1] & v[2]) | (v[4] ^ v[6]);
  endfunction

  function automatic bit ll_cone(input logic [7:0] v);
    return ((v[0] & v[1]) ^ v[2]) | ((v[3] | v[4]) & (v[5] ^ (v[6] & v[7])));
  endfunction

  initial begin
    logic [15:0] tt4;
    logic [7:0]  tt3;
    bit differs_m [NC];
    bit differs_l [NC];
    mux_x = '0; ll_x = '0;
    @(posedge clk);

    // 1. Random keys.
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < NC; c++) begin
        mk[c] = rand_key(MUXKW);
        lk[c] = rand_key(LLKW);
        // Make one small LUT per cell a routing choice.
        for (int b = 0; b < 4; b++) lk[c][8 + 4*(c % 5) + b] = 1'((r[0] ? 4'b1100 : 4'b1010) >> b);
      end
      program_keys();
      for (int p = 0; p < 300; p++) begin
        for (int c = 0; c < NC; c++) begin
          mux_x[c] = 8'($urandom);
          ll_x[c]  = 8'($urandom);
        end
        #1;
        for (int c = 0; c < NC; c++) begin
          check(mux_y[c], ref_lut_mux(mux_x[c], mk[c], 4), "random key LUT+MUX", c);
          check(ll_y[c],  ref_lut_lut(ll_x[c],  lk[c], 3), "random key LUT+LUT", c);
        end
      end
    end

    // 2. Activation with the correct keys.
    for (int a = 0; a < 16; a++) tt4[a] = (a[0] & a[1]) | (a[2] ^ a[3]);
    for (int a = 0; a < 8; a++)  tt3[a] = a[0] | (a[1] & a[2]);
    for (int c = 0; c < NC; c++) begin
      mk[c] = '0; lk[c] = '0;
      mk[c][19:0] = {4'b0001, tt4};
      lk[c][27:0] = {T_XOR, T_AND, T_OR, T_XOR, T_AND, tt3};
    end
    program_keys();
    begin
      automatic int bad = 0;
      for (int v = 0; v < 256; v++) begin
        for (int c = 0; c < NC; c++) begin mux_x[c] = 8'(v); ll_x[c] = 8'(v); end
        #1;
        for (int c = 0; c < NC; c++) begin
          check(mux_y[c], mux_cone(8'(v)), "unlocked LUT+MUX", c);
          check(ll_y[c],  ll_cone(8'(v)),  "unlocked LUT+LUT", c);
          if (mux_y[c] != mux_cone(8'(v)) || ll_y[c] != ll_cone(8'(v))) bad++;
        end
      end
      if (bad == 0) n_unlocked++;
    end

    // 3. One wrong key bit per cell.
    for (int c = 0; c < NC; c++) begin
      automatic int bm, bl;
      bm = $urandom_range(MUXKW-1);
      bl = $urandom_range(LLKW-1);
      mk[c][bm] = ~mk[c][bm];
      lk[c][bl] = ~lk[c][bl];
      differs_m[c] = 0; differs_l[c] = 0;
    end
    program_keys();
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < NC; c++) begin mux_x[c] = 8'(v); ll_x[c] = 8'(v); end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(mux_y[c], ref_lut_mux(mux_x[c], mk[c], 4), "wrong key LUT+MUX", c);
        check(ll_y[c],  ref_lut_lut(ll_x[c],  lk[c], 3), "wrong key LUT+LUT", c);
        if (mux_y[c] != mux_cone(8'(v))) differs_m[c] = 1;
        if (ll_y[c]  != ll_cone(8'(v)))  differs_l[c] = 1;
      end
    end
    for (int c = 0; c < NC; c++) begin
      if (differs_m[c]) n_corrupt_mux++;
      if (differs_l[c]) n_corrupt_ll++;
    end

    $display("mechanisms: prog_mux=%0d prog_ll=%0d mux_sel0=%0d mux_sel1=%0d small_route=%0d small_logic=%0d unlocked=%0d corrupt_mux_cells=%0d corrupt_ll_cells=%0d",
             n_prog_mux, n_prog_ll, n_sel0, n_sel1, n_small_route, n_small_logic,
             n_unlocked, n_corrupt_mux, n_corrupt_ll);
    begin
      automatic int counts[9];
      counts = '{n_prog_mux, n_prog_ll, n_sel0, n_sel1, n_small_route,
                 n_small_logic, n_unlocked, n_corrupt_mux, n_corrupt_ll};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
