// tb_tzs_module: integer search of 8x8 and 16x16 PUs on a synthetic frame
// pair with known global motion. A memory model answers the line requests.
// For every PU the best vector, its SAD and the number of cycles from the
// first line request to res_valid are compared with the reference search;
// the shortest (31 / 56 cycles) and longest (148 / 272 cycles, 240
// candidates) searches must each occur at least once. A result is also held
// back for some cycles to check that it stays valid until accepted.
module tb_tzs_module;
  import tb_ref_pkg::*;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int px = 0, py = 0;
  int n_short8 = 0, n_long8 = 0, n_short16 = 0, n_long16 = 0;

  // ---- 8x8 unit
  logic s8, b8, rq8, rv8, rr8;
  logic [2:0] ln8;
  mv_t  cmv8 [16], mv8;
  pix_t cl8 [8], rl8 [16][8];
  logic [13:0] sad8;
  tzs_module #(.N(8)) d8 (.clk(clk), .rst_n(rst_n), .start(s8), .busy(b8), .mem_req(rq8),
    .mem_line(ln8), .mem_cand_mv(cmv8), .cur_line(cl8), .ref_line(rl8),
    .res_valid(rv8), .res_ready(rr8), .res_sad(sad8), .res_mv(mv8));
  // ---- 16x16 unit
  logic s16, b16, rq16, rv16, rr16;
  logic [3:0] ln16;
  mv_t  cmv16 [16], mv16;
  pix_t cl16 [16], rl16 [16][16];
  logic [15:0] sad16;
  tzs_module #(.N(16)) d16 (.clk(clk), .rst_n(rst_n), .start(s16), .busy(b16), .mem_req(rq16),
    .mem_line(ln16), .mem_cand_mv(cmv16), .cur_line(cl16), .ref_line(rl16),
    .res_valid(rv16), .res_ready(rr16), .res_sad(sad16), .res_mv(mv16));

  // memory model
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      cl8[k] = 8'(cur_pix(px + k, py + int'(ln8)));
      for (int c = 0; c < 16; c++)
        rl8[c][k] = 8'(ref_pix(px + int'(cmv8[c].x) + k, py + int'(cmv8[c].y) + int'(ln8)));
    end
    for (int k = 0; k < 16; k++) begin
      cl16[k] = 8'(cur_pix(px + k, py + int'(ln16)));
      for (int c = 0; c < 16; c++)
        rl16[c][k] = 8'(ref_pix(px + int'(cmv16[c].x) + k, py + int'(cmv16[c].y) + int'(ln16)));
    end
  end

  task automatic run_pu(int n, int hold);
    int cyc = 0, started = 0, esad, ex, ey, ecyc;
    tzs_ref(px, py, n, esad, ex, ey, ecyc);
    @(negedge clk);
    if (n == 8) begin s8 = 1; rr8 = 0; end else begin s16 = 1; rr16 = 0; end
    @(negedge clk);
    s8 = 0; s16 = 0;
    forever begin
      if ((n == 8 ? rq8 : rq16)) started = 1;
      if ((n == 8 ? rv8 : rv16)) break;
      if (started) cyc++;
      @(negedge clk);
    end
    repeat (hold) begin
      @(negedge clk);
      checks++;
      if (!(n == 8 ? rv8 : rv16)) failures++;
    end
    checks++;
    if (n == 8) begin
      if (32'(sad8) != esad || int'(mv8.x) != ex || int'(mv8.y) != ey || cyc != ecyc) begin
        failures++;
        $display("8x8 PU (%0d,%0d): got sad %0d mv (%0d,%0d) %0d cyc; want %0d (%0d,%0d) %0d",
                 px, py, sad8, mv8.x, mv8.y, cyc, esad, ex, ey, ecyc);
      end
      if (cyc == 31) n_short8++;
      if (cyc == 148) n_long8++;
      rr8 = 1;
    end else begin
      if (32'(sad16) != esad || int'(mv16.x) != ex || int'(mv16.y) != ey || cyc != ecyc) begin
        failures++;
        $display("16x16 PU (%0d,%0d): got sad %0d mv (%0d,%0d) %0d cyc; want %0d (%0d,%0d) %0d",
                 px, py, sad16, mv16.x, mv16.y, cyc, esad, ex, ey, ecyc);
      end
      if (cyc == 56) n_short16++;
      if (cyc == 272) n_long16++;
      rr16 = 1;
    end
    @(negedge clk);
    rr8 = 0; rr16 = 0;
  endtask

  int motions [8][2] = '{'{1, 0}, '{0, 1}, '{-1, -1}, '{3, 2}, '{9, -6}, '{-21, 14}, '{37, 29}, '{-50, -3}};

  initial begin
    s8 = 0; s16 = 0; rr8 = 0; rr16 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 8; m++) begin
      gx = motions[m][0]; gy = motions[m][1];
      for (int p = 0; p < 2; p++) begin
        px = 200 + 8 * p + 40 * m; py = 100 + 16 * p;
        run_pu(8, (p == 1) ? 3 : 0);
        run_pu(16, 0);
      end
    end
    $display("short/long searches: 8x8 %0d/%0d, 16x16 %0d/%0d", n_short8, n_long8, n_short16, n_long16);
    checks++;
    if (n_short8 == 0 || n_long8 == 0 || n_short16 == 0 || n_long16 == 0) failures++;
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
