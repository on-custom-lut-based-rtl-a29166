// top_activation_run: drives one custom_lut_obf_top of NC cells per bank
// through programming, activation and a wrong key, for size-sweep tests.
//
// It programs every LUT+MUX cell to compute (x1 & x2) | (x4 ^ x6) and every
// LUT+LUT cell to compute ((x0 & x1) ^ x2) | ((x3 | x4) & (x5 ^ (x6 & x7))),
// gives each cell a different input pattern drawn at random, and checks all
// outputs against those expressions; it then flips one random key bit per
// cell and checks every cell against the reference model for that key and
// that each cell's output now differs from its cone for some pattern.
// Outputs: done (pulses high at the end), checks and failures counts.
module top_activation_run
  import obf_ref_pkg::*;
#(
  parameter int NC = 15
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int MUXKW = 20;
  localparam int LLKW  = 28;

  logic mux_prog_en, mux_prog_din, ll_prog_en, ll_prog_din;
  logic [NC-1:0][7:0] mux_x, ll_x;
  logic [NC-1:0]      mux_y, ll_y;

  custom_lut_obf_top #(.NUM_CELLS(NC)) dut (
    .clk(clk),
    .mux_prog_en(mux_prog_en), .mux_prog_din(mux_prog_din), .mux_x(mux_x), .mux_y(mux_y),
    .ll_prog_en(ll_prog_en), .ll_prog_din(ll_prog_din), .ll_x(ll_x), .ll_y(ll_y)
  );

  logic [KMAX-1:0] mk [NC];
  logic [KMAX-1:0] lk [NC];

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL NC=%0d %s: got %0b expected %0b", NC, what, got, exp);
    end
  endtask

  task automatic program_keys();
    for (int b = 0; b < NC*LLKW; b++) begin
      mux_prog_en  <= (b < NC*MUXKW);
      mux_prog_din <= (b < NC*MUXKW) ? mk[b / MUXKW][b % MUXKW] : 1'b0;
      ll_prog_en   <= 1'b1;
      ll_prog_din  <= lk[b / LLKW][b % LLKW];
      @(posedge clk);
    end
    mux_prog_en <= 1'b0; ll_prog_en <= 1'b0;
    @(posedge clk);
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
    bit diff_m [NC];
    bit diff_l [NC];
    checks = 0; failures = 0; done = 0;
    mux_prog_en = 0; mux_prog_din = 0; ll_prog_en = 0; ll_prog_din = 0;
    mux_x = '0; ll_x = '0;
    for (int a = 0; a < 16; a++) tt4[a] = (a[0] & a[1]) | (a[2] ^ a[3]);
    for (int a = 0; a < 8; a++)  tt3[a] = a[0] | (a[1] & a[2]);
    for (int c = 0; c < NC; c++) begin
      mk[c] = '0; lk[c] = '0;
      mk[c][19:0] = {4'b0001, tt4};
      lk[c][27:0] = {4'b0110, 4'b1000, 4'b1110, 4'b0110, 4'b1000, tt3};
    end
    @(posedge clk);
    program_keys();
    for (int p = 0; p < 500; p++) begin
      for (int c = 0; c < NC; c++) begin mux_x[c] = 8'($urandom); ll_x[c] = 8'($urandom); end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(mux_y[c], mux_cone(mux_x[c]), "activated LUT+MUX");
        check(ll_y[c],  ll_cone(ll_x[c]),   "activated LUT+LUT");
      end
    end
    for (int c = 0; c < NC; c++) begin
      automatic int bm = $urandom_range(MUXKW-1);
      automatic int bl = $urandom_range(LLKW-1);
      mk[c][bm] = ~mk[c][bm];
      lk[c][bl] = ~lk[c][bl];
      diff_m[c] = 0; diff_l[c] = 0;
    end
    program_keys();
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < NC; c++) begin mux_x[c] = 8'(v); ll_x[c] = 8'(v); end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(mux_y[c], ref_lut_mux(mux_x[c], mk[c], 4), "wrong key LUT+MUX");
        check(ll_y[c],  ref_lut_lut(ll_x[c],  lk[c], 3), "wrong key LUT+LUT");
        if (mux_y[c] != mux_cone(8'(v))) diff_m[c] = 1;
        if (ll_y[c]  != ll_cone(8'(v)))  diff_l[c] = 1;
      end
    end
    for (int c = 0; c < NC; c++) begin
      checks += 2;
      if (!diff_m[c] || !diff_l[c]) begin
        failures++;
        $display("FAIL NC=%0d cell %0d: a wrong key left the function intact", NC, c);
      end
    end
    done = 1;
  end

endmodule
