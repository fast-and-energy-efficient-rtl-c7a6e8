// tb_me_top: end-to-end run of the whole motion estimator on two 64x64 CTUs
// of a synthetic frame pair, with the default configuration (four 8x8 and two
// 16x16 chains). A memory model answers all integer- and fractional-search
// reads. The table read-out (under random back-pressure) must deliver all 80
// PUs in order, each with the SAD and quarter-sample vector of the reference
// integer search followed by the reference fractional search. Counted and
// required at least once: TZS results stalled behind a busy FME, short and
// 240-candidate integer searches, integer and fractional winners, and
// read-out back-pressure; the table must be released once per CTU.
module tb_me_top;
  import tb_ref_pkg::*;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int cx = 0, cy = 0;
  int checks = 0, failures = 0;
  int n_stall = 0, n_short = 0, n_long = 0, n_int = 0, n_frac = 0, n_bp = 0, n_rel = 0, cyc_ctu = 0;

  logic cs, cb;
  logic t8_req [4], f8_req [4], f8_vert [4];
  logic [2:0] t8_line [4];
  logic [3:0] f8_idx [4];
  mv_t t8_cand_mv [4][16], f8_mv [4];
  logic [4:0] t8_pu [4], f8_pu [4];
  pix_t t8_cur_line [4][8], t8_ref_line [4][16][8], f8_win_line [4][16], f8_cur_line [4][8];
  logic t16_req [2], f16_req [2], f16_vert [2];
  logic [3:0] t16_line [2];
  logic [4:0] f16_idx [2];
  mv_t t16_cand_mv [2][16], f16_mv [2];
  logic [4:0] t16_pu [2], f16_pu [2];
  pix_t t16_cur_line [2][16], t16_ref_line [2][16][16], f16_win_line [2][24], f16_cur_line [2][16];
  logic stall [6];
  logic ov, ordy;
  logic [6:0] oi;
  logic [15:0] os;
  qmv_t oq;

  me_top dut (.clk(clk), .rst_n(rst_n), .ctu_start(cs), .ctu_busy(cb),
    .t8_req(t8_req), .t8_line(t8_line), .t8_cand_mv(t8_cand_mv), .t8_pu(t8_pu),
    .t8_cur_line(t8_cur_line), .t8_ref_line(t8_ref_line),
    .f8_req(f8_req), .f8_vert(f8_vert), .f8_idx(f8_idx), .f8_mv(f8_mv), .f8_pu(f8_pu),
    .f8_win_line(f8_win_line), .f8_cur_line(f8_cur_line),
    .t16_req(t16_req), .t16_line(t16_line), .t16_cand_mv(t16_cand_mv), .t16_pu(t16_pu),
    .t16_cur_line(t16_cur_line), .t16_ref_line(t16_ref_line),
    .f16_req(f16_req), .f16_vert(f16_vert), .f16_idx(f16_idx), .f16_mv(f16_mv), .f16_pu(f16_pu),
    .f16_win_line(f16_win_line), .f16_cur_line(f16_cur_line),
    .tzs_stall(stall), .out_valid(ov), .out_ready(ordy), .out_idx(oi), .out_sad(os), .out_qmv(oq));

  // ---------------------------------------------------------- memory model
  always_comb begin
    for (int m = 0; m < 4; m++) begin
      int px, py, fx, fy;
      px = cx + pu8_x(m, int'(t8_pu[m])); py = cy + pu8_y(m, int'(t8_pu[m]));
      fx = cx + pu8_x(m, int'(f8_pu[m])); fy = cy + pu8_y(m, int'(f8_pu[m]));
      for (int k = 0; k < 8; k++) begin
        t8_cur_line[m][k] = 8'(cur_pix(px + k, py + int'(t8_line[m])));
        for (int c = 0; c < 16; c++)
          t8_ref_line[m][c][k] = 8'(ref_pix(px + int'(t8_cand_mv[m][c].x) + k, py + int'(t8_cand_mv[m][c].y) + int'(t8_line[m])));
        f8_cur_line[m][k] = 8'(cur_pix(fx + k, fy + int'(f8_idx[m]) - 4));
      end
      for (int r = 0; r < 16; r++)
        f8_win_line[m][r] = f8_vert[m]
          ? 8'(ref_pix(fx + int'(f8_mv[m].x) - 4 + int'(f8_idx[m]), fy + int'(f8_mv[m].y) - 4 + r))
          : 8'(ref_pix(fx + int'(f8_mv[m].x) - 4 + r, fy + int'(f8_mv[m].y) - 4 + int'(f8_idx[m])));
    end
    for (int m = 0; m < 2; m++) begin
      int px, py, fx, fy;
      px = cx + pu16_x(int'(t16_pu[m])); py = cy + pu16_y(m, int'(t16_pu[m]));
      fx = cx + pu16_x(int'(f16_pu[m])); fy = cy + pu16_y(m, int'(f16_pu[m]));
      for (int k = 0; k < 16; k++) begin
        t16_cur_line[m][k] = 8'(cur_pix(px + k, py + int'(t16_line[m])));
        for (int c = 0; c < 16; c++)
          t16_ref_line[m][c][k] = 8'(ref_pix(px + int'(t16_cand_mv[m][c].x) + k, py + int'(t16_cand_mv[m][c].y) + int'(t16_line[m])));
        f16_cur_line[m][k] = 8'(cur_pix(fx + k, fy + int'(f16_idx[m]) - 4));
      end
      for (int r = 0; r < 24; r++)
        f16_win_line[m][r] = f16_vert[m]
          ? 8'(ref_pix(fx + int'(f16_mv[m].x) - 4 + int'(f16_idx[m]), fy + int'(f16_mv[m].y) - 4 + r))
          : 8'(ref_pix(fx + int'(f16_mv[m].x) - 4 + r, fy + int'(f16_mv[m].y) - 4 + int'(f16_idx[m])));
    end
  end

  // ---------------------------------------------------------- monitors
  int t_run [6];
  logic tzs_done [6];
  for (genvar m = 0; m < 4; m++) begin : g_m8
    assign tzs_done[m] = dut.g_c8[m].u_tzs.res_valid;
  end
  for (genvar m = 0; m < 2; m++) begin : g_m16
    assign tzs_done[4+m] = dut.g_c16[m].u_tzs.res_valid;
  end
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 6; c++) if (stall[c]) n_stall++;
    if (dut.tbl_release) begin n_rel++; $display("table released %0d cycles after CTU start", cyc_ctu); end
    cyc_ctu++;
    // integer search length per chain, from first line request to result
    for (int m = 0; m < 4; m++) begin
      if (tzs_done[m] && t_run[m] > 0) begin
        if (t_run[m] == 31) n_short++;
        if (t_run[m] == 148) n_long++;
        t_run[m] = 0;
      end else if (t8_req[m] || t_run[m] > 0) t_run[m]++;
    end
    for (int m = 0; m < 2; m++) begin
      if (tzs_done[4+m] && t_run[4+m] > 0) begin
        if (t_run[4+m] == 56) n_short++;
        if (t_run[4+m] == 272) n_long++;
        t_run[4+m] = 0;
      end else if (t16_req[m] || t_run[4+m] > 0) t_run[4+m]++;
    end
  end

  function automatic void expected(int e, output int sad, output int qx, output int qy);
    int n, px, py, isad, imx, imy, icyc;
    if (e < 64) begin n = 8;  px = cx + pu8_x(e / 16, e % 16); py = cy + pu8_y(e / 16, e % 16); end
    else begin n = 16; px = cx + pu16_x((e - 64) % 8); py = cy + pu16_y((e - 64) / 8, (e - 64) % 8); end
    tzs_ref(px, py, n, isad, imx, imy, icyc);
    fme_ref(px, py, n, imx, imy, isad, sad, qx, qy);
  endfunction

  task automatic run_ctu(int x0, int y0);
    int nread = 0;
    cx = x0; cy = y0;
    @(negedge clk); cs = 1; cyc_ctu = 0;
    @(negedge clk); cs = 0;
    while (nread < 80) begin
      ordy = 1'($urandom_range(0, 3) != 0);
      #1;
      if (ov && !ordy) n_bp++;
      if (ov && ordy) begin
        int esad, eqx, eqy;
        expected(nread, esad, eqx, eqy);
        checks++;
        if (32'(oi) != nread || 32'(os) != esad || int'(oq.x) != eqx || int'(oq.y) != eqy) begin
          failures++;
          $display("PU %0d: got idx %0d sad %0d (%0d,%0d), want %0d (%0d,%0d)", nread, oi, os, oq.x, oq.y, esad, eqx, eqy);
        end
        if (eqx % 4 == 0 && eqy % 4 == 0) n_int++; else n_frac++;
        nread++;
      end
      @(negedge clk);
    end
    ordy = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (cb) failures++;
  endtask

  initial begin
    cs = 0; ordy = 0;
    for (int c = 0; c < 6; c++) t_run[c] = 0;
    gx = 13; gy = -7;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_ctu(256, 128);
    gx = -2; gy = 1;
    run_ctu(640, 320);
    $display("stall cycles %0d, short/long searches %0d/%0d, integer/fractional winners %0d/%0d, back-pressure %0d, table releases %0d",
             n_stall, n_short, n_long, n_int, n_frac, n_bp, n_rel);
    checks++;
    if (n_stall == 0 || n_short == 0 || n_long == 0 || n_int == 0 || n_frac == 0 || n_bp == 0 || n_rel != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
