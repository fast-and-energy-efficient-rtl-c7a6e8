// tb_sad_table: two CTUs. Results for the 80 PUs arrive in random order on the
// six write ports; nothing may come out before release; then the entries must
// come out in index order with the written values, under random out_ready
// back-pressure, after which the table is empty (busy low).
module tb_sad_table;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wv [6];
  logic [6:0] wi [6];
  logic [15:0] ws [6];
  qmv_t wq [6];
  logic rel, busy, ov, ordy;
  logic [6:0] oi;
  logic [15:0] os;
  qmv_t oq;
  int checks = 0, failures = 0;
  int msad [80], mqx [80], mqy [80];

  sad_table #(.NE(80), .NW(6), .SW(16)) dut (.clk(clk), .rst_n(rst_n), .wr_valid(wv), .wr_idx(wi),
    .wr_sad(ws), .wr_qmv(wq), .release_tbl(rel), .busy(busy), .out_valid(ov), .out_ready(ordy),
    .out_idx(oi), .out_sad(os), .out_qmv(oq));

  initial begin
    for (int w = 0; w < 6; w++) begin wv[w] = 0; wi[w] = '0; ws[w] = '0; wq[w] = '0; end
    rel = 0; ordy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ctu = 0; ctu < 2; ctu++) begin
      automatic int order [80];
      automatic int pos = 0, nread = 0;
      for (int i = 0; i < 80; i++) order[i] = i;
      order.shuffle();
      @(negedge clk);
      checks++;
      if (busy || ov) failures++;
      while (pos < 80) begin
        @(negedge clk);
        for (int w = 0; w < 6; w++) begin
          wv[w] = 0;
          if (pos < 80 && $urandom_range(0, 1)) begin
            automatic int e = order[pos++];
            wv[w] = 1; wi[w] = 7'(e); ws[w] = 16'($urandom);
            wq[w].x = 10'($urandom); wq[w].y = 10'($urandom);
            msad[e] = ws[w]; mqx[e] = wq[w].x; mqy[e] = wq[w].y;
          end
        end
      end
      @(negedge clk);
      for (int w = 0; w < 6; w++) wv[w] = 0;
      repeat (3) begin
        @(negedge clk);
        checks++;
        if (ov || !busy) failures++;
      end
      rel = 1;
      @(negedge clk);
      rel = 0;
      while (nread < 80) begin
        ordy = 1'($urandom_range(0, 1));
        #1;
        if (ov && ordy) begin
          checks++;
          if (32'(oi) != nread || 32'(os) != msad[nread] || 32'(oq.x) != mqx[nread] || 32'(oq.y) != mqy[nread])
            failures++;
          nread++;
        end
        @(negedge clk);
      end
      ordy = 0;
      @(negedge clk);
      checks++;
      if (busy || ov) failures++;
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
