// tb_sad_comparator_tree: 16-input (4-level) and 49-input (6-level) trees fed
// with a new random set every cycle, with many ties; checks the minimum SAD,
// the payload of the lowest-index minimum and the latency.
module tb_sad_comparator_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        v16, v49, o16, o49;
  logic [13:0] s16 [16], s49 [49], b16, b49;
  logic [7:0]  p16 [16], p49 [49], q16, q49;
  int checks = 0, failures = 0;
  int e16s [$], e16v [$], e49s [$], e49v [$];
  int lat16 = 0, lat49 = 0, first_in = -1, cyc = 0;

  sad_comparator_tree #(.N_IN(16), .SW(14), .VW(8)) d16 (.clk(clk), .rst_n(rst_n), .in_valid(v16),
    .sad(s16), .vec(p16), .out_valid(o16), .best_sad(b16), .best_vec(q16));
  sad_comparator_tree #(.N_IN(49), .SW(14), .VW(8)) d49 (.clk(clk), .rst_n(rst_n), .in_valid(v49),
    .sad(s49), .vec(p49), .out_valid(o49), .best_sad(b49), .best_vec(q49));

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    v16 = 0; v49 = 0;
    for (int i = 0; i < 16; i++) begin s16[i] = '0; p16[i] = '0; end
    for (int i = 0; i < 49; i++) begin s49[i] = '0; p49[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int m, mi;
      @(negedge clk);
      v16 = 1; v49 = 1;
      m = 1 << 20; mi = 0;
      for (int i = 0; i < 16; i++) begin
        s16[i] = 14'($urandom_range(0, 40)); p16[i] = 8'(i);
        if (32'(s16[i]) < m) begin m = s16[i]; mi = i; end
      end
      e16s.push_back(m); e16v.push_back(mi);
      m = 1 << 20; mi = 0;
      for (int i = 0; i < 49; i++) begin
        s49[i] = 14'($urandom_range(0, 16383)); p49[i] = 8'(i);
        if (t % 5 == 0) s49[i] = 14'(16383);
        if (32'(s49[i]) < m) begin m = s49[i]; mi = i; end
      end
      e49s.push_back(m); e49v.push_back(mi);
      if (first_in < 0) first_in = cyc;
    end
    @(negedge clk);
    v16 = 0; v49 = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (lat16 != 4 || lat49 != 6) failures++;
    checks++;
    if (e16s.size() != 0 || e49s.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (o16) begin
      if (lat16 == 0) lat16 = cyc - first_in;
      checks++;
      if (32'(b16) != e16s.pop_front() || 32'(q16) != e16v.pop_front()) failures++;
    end
    if (o49) begin
      if (lat49 == 0) lat49 = cyc - first_in;
      checks++;
      if (32'(b49) != e49s.pop_front() || 32'(q49) != e49v.pop_front()) failures++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
