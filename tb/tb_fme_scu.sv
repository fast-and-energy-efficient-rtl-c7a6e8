// tb_fme_scu: fills the 48 fractional accumulators through the 12 trees with
// random lines (12 candidates at a time, N lines each, in a shuffled tree
// order), then checks the best SAD and quarter-sample vector against the
// model, including runs where the integer candidate must win, and that the
// result arrives log2(N)+7 cycles after the line marked last.
module tb_fme_scu;
  import tb_ref_pkg::*;
  import me_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tv [12], tf [12], tl, rv;
  logic [5:0] ta [12];
  pix_t rf [12][N], cu [12][N];
  logic [13:0] isad, rsad;
  mv_t imv;
  qmv_t rq;
  int checks = 0, failures = 0, cyc = 0;

  fme_scu #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .t_valid(tv), .t_first(tf), .t_acc(ta), .t_last(tl),
    .ref_vec(rf), .cur_vec(cu), .ime_sad(isad), .ime_mv(imv),
    .res_valid(rv), .res_sad(rsad), .res_qmv(rq));

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int t = 0; t < 12; t++) begin tv[t] = 0; tf[t] = 0; ta[t] = '0; end
    tl = 0; isad = '0; imv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      automatic int sums [48];
      automatic int bs, bx, by, last_cyc, got_cyc;
      automatic int rot = $urandom_range(0, 11);
      imv.x = 8'($urandom_range(0, 20)) - 8'd10; imv.y = 8'($urandom_range(0, 20)) - 8'd10;
      isad = (run % 3 == 0) ? 14'd5 : 14'(16000);
      for (int k = 0; k < 48; k++) sums[k] = 0;
      for (int slot = 0; slot < 4; slot++)
        for (int l = 0; l < N; l++) begin
          @(negedge clk);
          for (int t = 0; t < 12; t++) begin
            automatic int k = slot * 12 + (t + rot) % 12;
            tv[t] = 1; tf[t] = (l == 0); ta[t] = 6'(k);
            for (int x = 0; x < N; x++) begin
              cu[t][x] = 8'($urandom);
              rf[t][x] = 8'(int'(cu[t][x]) ^ $urandom_range(0, 15 + 8 * ((k * 7) % 13)));
              sums[k] += ad_ref(cu[t][x], rf[t][x], 5);
            end
          end
          tl = (slot == 3) && (l == N - 1);
          if (tl) last_cyc = cyc;
        end
      @(negedge clk);
      for (int t = 0; t < 12; t++) tv[t] = 0;
      tl = 0;
      bs = isad; bx = 4 * int'(imv.x); by = 4 * int'(imv.y);
      for (int k = 0; k < 48; k++) begin
        automatic int ox, oy;
        if (k < 6)       begin ox = foff(k); oy = 0; end
        else if (k < 12) begin ox = 0; oy = foff(k - 6); end
        else             begin ox = foff((k - 12) / 6); oy = foff((k - 12) % 6); end
        if (sums[k] < bs) begin bs = sums[k]; bx = 4 * int'(imv.x) + ox; by = 4 * int'(imv.y) + oy; end
      end
      while (!rv) @(negedge clk);
      got_cyc = cyc;
      checks++;
      if (32'(rsad) != bs || int'(rq.x) != bx || int'(rq.y) != by || got_cyc - last_cyc != $clog2(N) + 7) begin
        failures++;
        $display("run %0d: got %0d (%0d,%0d) +%0d, want %0d (%0d,%0d) +%0d", run, rsad, rq.x, rq.y,
                 got_cyc - last_cyc, bs, bx, by, $clog2(N) + 7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
