// tb_tzs_control: the TZS control alone, with a behavioural SCU that returns,
// log2(N)+5 cycles after the last line of each group, the cheapest of the
// group's 16 candidates under a synthetic cost (distance to a target vector).
// Checks the final vector, cost and cycle count against the reference search,
// that each group keeps its 16 vectors for all N lines with the first/last
// flags in place, that vectors stay inside the search range, and that the
// 240-candidate limit and the short path both occur.
module tb_tzs_control;
  import tb_ref_pkg::*;
  import me_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, lv, lf, ll, sv, rv, rr;
  logic [2:0] li;
  mv_t cmv [16], rmv;
  tzs_tag_t ctag [16], stag;
  logic [13:0] ssad, rsad;
  int checks = 0, failures = 0, n_short = 0, n_long = 0, cyc = 0;
  int q_due [$], q_sad [$];
  tzs_tag_t q_tag [$];
  int prev_line = -1;
  mv_t grp_mv [16];

  tzs_control #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy),
    .line_valid(lv), .line_first(lf), .line_last(ll), .line_idx(li), .cand_mv(cmv), .cand_tag(ctag),
    .scu_valid(sv), .scu_sad(ssad), .scu_tag(stag),
    .res_valid(rv), .res_ready(rr), .res_sad(rsad), .res_mv(rmv));

  always @(posedge clk) cyc <= cyc + 1;

  // behavioural SCU: drives its output in the cycle the result is due
  always_comb begin
    sv = 1'b0; ssad = '0; stag = '0;
    if (q_due.size() > 0 && q_due[0] == cyc) begin
      sv = 1'b1; ssad = 14'(q_sad[0]); stag = q_tag[0];
    end
  end

  always @(posedge clk) begin
    if (sv) begin void'(q_due.pop_front()); void'(q_sad.pop_front()); void'(q_tag.pop_front()); end
    if (lv) begin
      // line sequencing and group vectors
      checks++;
      if (int'(li) != prev_line + 1 || lf != (li == 0) || ll != (li == N - 1)) failures++;
      for (int c = 0; c < 16; c++) begin
        if (li == 0) grp_mv[c] = cmv[c];
        else if (cmv[c] != grp_mv[c]) failures++;
        if (cmv[c].x > 64 || cmv[c].x < -64 || cmv[c].y > 64 || cmv[c].y < -64) failures++;
      end
      prev_line = (li == N - 1) ? -1 : int'(li);
      if (ll) begin
        automatic int bs = 1 << 30, bi = 0;
        for (int c = 0; c < 16; c++) begin
          automatic int s = cost(0, 0, N, int'(cmv[c].x), int'(cmv[c].y));
          if (s < bs) begin bs = s; bi = c; end
        end
        q_due.push_back(cyc + $clog2(N) + 5);
        q_sad.push_back(bs);
        q_tag.push_back(ctag[bi]);
      end
    end
  end

  int targets [10][2] = '{'{1, 0}, '{0, -1}, '{2, 1}, '{4, -3}, '{7, 7}, '{-12, 5}, '{17, -30}, '{-60, 61}, '{33, 0}, '{-5, -9}};

  initial begin
    start = 0; rr = 0;
    cost_mode = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      automatic int esad, ex, ey, ecyc, n = 0, seen = 0;
      tx = targets[t][0]; ty = targets[t][1];
      tzs_ref(0, 0, N, esad, ex, ey, ecyc);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!rv) begin
        if (lv) seen = 1;
        if (seen) n++;
        @(negedge clk);
      end
      checks++;
      if (32'(rsad) != esad || int'(rmv.x) != ex || int'(rmv.y) != ey || n != ecyc) begin
        failures++;
        $display("target (%0d,%0d): got %0d (%0d,%0d) %0d cyc, want %0d (%0d,%0d) %0d",
                 tx, ty, rsad, rmv.x, rmv.y, n, esad, ex, ey, ecyc);
      end
      if (n == 31) n_short++;
      if (n == 148) n_long++;
      // hold the result two cycles before accepting it
      repeat (2) @(negedge clk);
      checks++;
      if (!rv || !busy) failures++;
      rr = 1;
      @(negedge clk); rr = 0;
      checks++;
      if (busy || rv) failures++;
    end
    checks++;
    if (n_short == 0 || n_long == 0) failures++;
    $display("short %0d long %0d", n_short, n_long);
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
