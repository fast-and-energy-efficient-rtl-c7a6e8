// tb_tzs_scu: random groups of 16 candidate blocks (8x8), some back to back
// and some with idle cycles between them, some with several equal SADs. Checks
// the smallest block SAD, its tag (lowest index on ties) and that the result
// arrives log2(N)+5 cycles after the group's last line.
module tb_tzs_scu;
  import tb_ref_pkg::*;
  import me_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lv, lf, ll, rv;
  logic [18:0] tag [16], rtag;
  pix_t cur [N], rf [16][N];
  logic [13:0] rsad;
  int checks = 0, failures = 0, cyc = 0;
  int e_due [$], e_sad [$], e_tag [$];

  tzs_scu #(.N(N), .VW(19)) dut (.clk(clk), .rst_n(rst_n), .line_valid(lv), .line_first(lf),
    .line_last(ll), .line_tag(tag), .cur_line(cur), .ref_line(rf),
    .res_valid(rv), .res_sad(rsad), .res_tag(rtag));

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rv && rst_n) begin
    checks++;
    if (e_due.size() == 0) begin failures++; $display("unexpected result at %0d", cyc); end
    else begin
      automatic int d = e_due.pop_front(), s = e_sad.pop_front(), t = e_tag.pop_front();
      if (d != cyc || 32'(rsad) != s || 32'(rtag) != t) begin
        failures++;
        $display("cyc %0d: got %0d tag %0d, want %0d tag %0d at %0d", cyc, rsad, rtag, s, t, d);
      end
    end
  end

  initial begin
    lv = 0; lf = 0; ll = 0;
    for (int c = 0; c < 16; c++) tag[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      automatic int sums [16];
      automatic int bs = 1 << 30, bi = 0;
      automatic int tie = (g % 4 == 1);
      for (int c = 0; c < 16; c++) sums[c] = 0;
      for (int l = 0; l < N; l++) begin
        @(negedge clk);
        lv = 1; lf = (l == 0); ll = (l == N - 1);
        for (int k = 0; k < N; k++) cur[k] = 8'($urandom);
        for (int c = 0; c < 16; c++) begin
          tag[c] = 19'(1000 * g + c);
          for (int k = 0; k < N; k++) begin
            rf[c][k] = tie ? cur[k] ^ 8'(c % 3) : 8'($urandom);
            sums[c] += ad_ref(cur[k], rf[c][k], 5);
          end
        end
        if (l == N - 1) begin
          for (int c = 0; c < 16; c++) if (sums[c] < bs) begin bs = sums[c]; bi = c; end
          e_due.push_back(cyc + $clog2(N) + 5);
          e_sad.push_back(bs);
          e_tag.push_back(1000 * g + bi);
        end
      end
      if (g % 3 == 2) begin
        @(negedge clk); lv = 0; lf = 0; ll = 0;
        repeat ($urandom_range(0, 12)) @(negedge clk);
      end
    end
    @(negedge clk); lv = 0; lf = 0; ll = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (e_due.size() != 0) failures++;
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
