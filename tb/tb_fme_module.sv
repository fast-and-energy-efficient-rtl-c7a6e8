// tb_fme_module: fractional search of 8x8 and 16x16 PUs around given integer
// vectors on a synthetic frame pair. A memory model serves the window rows and
// columns and the current-block rows. For every PU the best quarter-sample
// vector, its SAD and the cycle count (63 / 104 from the first window request
// to res_valid) are compared with the reference HEVC interpolation and search.
// Cases include an integer result that wins (IME SAD 0) and fractional wins in
// every direction.
module tb_fme_module;
  import tb_ref_pkg::*;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int px = 0, py = 0;
  int n_int = 0, n_frac = 0;

  logic st8, bz8, wr8, wv8, rv8, rr8;
  logic [3:0] wi8;
  mv_t  wm8, im8;
  logic [13:0] is8, sad8;
  qmv_t q8;
  pix_t wl8 [16], cl8 [8];
  fme_module #(.N(8)) d8 (.clk(clk), .rst_n(rst_n), .start(st8), .ime_sad(is8), .ime_mv(im8),
    .busy(bz8), .win_req(wr8), .win_vert(wv8), .win_idx(wi8), .win_mv(wm8), .win_line(wl8),
    .cur_line(cl8), .res_valid(rv8), .res_ready(rr8), .res_sad(sad8), .res_qmv(q8));

  logic st16, bz16, wr16, wv16, rv16, rr16;
  logic [4:0] wi16;
  mv_t  wm16, im16;
  logic [15:0] is16, sad16;
  qmv_t q16;
  pix_t wl16 [24], cl16 [16];
  fme_module #(.N(16)) d16 (.clk(clk), .rst_n(rst_n), .start(st16), .ime_sad(is16), .ime_mv(im16),
    .busy(bz16), .win_req(wr16), .win_vert(wv16), .win_idx(wi16), .win_mv(wm16), .win_line(wl16),
    .cur_line(cl16), .res_valid(rv16), .res_ready(rr16), .res_sad(sad16), .res_qmv(q16));

  always_comb begin
    for (int r = 0; r < 16; r++)
      wl8[r] = wv8 ? 8'(ref_pix(px + int'(wm8.x) - 4 + int'(wi8), py + int'(wm8.y) - 4 + r))
                   : 8'(ref_pix(px + int'(wm8.x) - 4 + r, py + int'(wm8.y) - 4 + int'(wi8)));
    for (int k = 0; k < 8; k++) cl8[k] = 8'(cur_pix(px + k, py + int'(wi8) - 4));
    for (int r = 0; r < 24; r++)
      wl16[r] = wv16 ? 8'(ref_pix(px + int'(wm16.x) - 4 + int'(wi16), py + int'(wm16.y) - 4 + r))
                     : 8'(ref_pix(px + int'(wm16.x) - 4 + r, py + int'(wm16.y) - 4 + int'(wi16)));
    for (int k = 0; k < 16; k++) cl16[k] = 8'(cur_pix(px + k, py + int'(wi16) - 4));
  end

  task automatic run_pu(int n, int mx, int my, int isad);
    int cyc = 0, started = 0, esad, eqx, eqy;
    fme_ref(px, py, n, mx, my, isad, esad, eqx, eqy);
    @(negedge clk);
    if (n == 8) begin st8 = 1; im8.x = 8'(mx); im8.y = 8'(my); is8 = 14'(isad); end
    else        begin st16 = 1; im16.x = 8'(mx); im16.y = 8'(my); is16 = 16'(isad); end
    @(negedge clk);
    st8 = 0; st16 = 0;
    forever begin
      if ((n == 8 ? wr8 : wr16)) started = 1;
      if ((n == 8 ? rv8 : rv16)) break;
      if (started) cyc++;
      @(negedge clk);
    end
    checks++;
    if (n == 8) begin
      if (32'(sad8) != esad || int'(q8.x) != eqx || int'(q8.y) != eqy || cyc != 63) begin
        failures++;
        $display("8x8: got %0d (%0d,%0d) %0d cyc, want %0d (%0d,%0d) 63", sad8, q8.x, q8.y, cyc, esad, eqx, eqy);
      end
    end else begin
      if (32'(sad16) != esad || int'(q16.x) != eqx || int'(q16.y) != eqy || cyc != 104) begin
        failures++;
        $display("16x16: got %0d (%0d,%0d) %0d cyc, want %0d (%0d,%0d) 104", sad16, q16.x, q16.y, cyc, esad, eqx, eqy);
      end
    end
    if (eqx % 4 == 0 && eqy % 4 == 0) n_int++; else n_frac++;
  endtask

  int cases [6][2] = '{'{0, 0}, '{1, 0}, '{0, -1}, '{-1, 1}, '{1, 1}, '{-1, 0}};

  initial begin
    st8 = 0; st16 = 0; rr8 = 1; rr16 = 1; is8 = '0; is16 = '0; im8 = '0; im16 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    gx = 3; gy = -2;
    for (int c = 0; c < 6; c++) begin
      px = 300 + 24 * c; py = 120 + 8 * c;
      // integer candidate off by cases[c]; SAD 0 for the first case forces it
      run_pu(8, gx + cases[c][0], gy + cases[c][1], (c == 0) ? 0 : blk_sad(px, py, 8, gx + cases[c][0], gy + cases[c][1]));
      run_pu(16, gx + cases[c][0], gy + cases[c][1], (c == 0) ? 0 : blk_sad(px, py, 16, gx + cases[c][0], gy + cases[c][1]));
    end
    $display("integer wins %0d, fractional wins %0d", n_int, n_frac);
    checks++;
    if (n_int == 0 || n_frac == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
