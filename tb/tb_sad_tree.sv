// tb_sad_tree: streams random lines into 8- and 16-sample SAD trees, one per
// cycle, and checks each line SAD against the reference model after exactly
// log2(N) clock edges.
module tb_sad_tree;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  me_pkg::pix_t c8 [8], r8 [8], c16 [16], r16 [16];
  logic [10:0] s8;
  logic [11:0] s16;
  int checks = 0, failures = 0;
  int exp8 [$], exp16 [$];

  sad_tree #(.N(8))  d8  (.clk(clk), .cur(c8),  .ref_pix(r8),  .sad(s8));
  sad_tree #(.N(16)) d16 (.clk(clk), .cur(c16), .ref_pix(r16), .sad(s16));

  initial begin
    for (int cyc = 0; cyc < 300; cyc++) begin
      automatic int e8 = 0, e16 = 0;
      for (int i = 0; i < 16; i++) begin
        c16[i] = 8'($urandom); r16[i] = (cyc % 7 == 0) ? 8'(255 - c16[i]) : 8'($urandom);
        e16 += ad_ref(c16[i], r16[i], 5);
        if (i < 8) begin
          c8[i] = 8'($urandom); r8[i] = 8'($urandom);
          e8 += ad_ref(c8[i], r8[i], 5);
        end
      end
      exp8.push_back(e8);
      exp16.push_back(e16);
      @(posedge clk); #1;
      // after k edges the line applied k cycles ago is at the output
      if (exp8.size() == 3) begin
        checks++;
        begin automatic int e = exp8.pop_front(); if (32'(s8) != e) begin failures++; if (failures < 4) $display("s8 %0d want %0d", s8, e); end end
      end
      if (exp16.size() == 4) begin
        checks++;
        if (32'(s16) != exp16.pop_front()) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
