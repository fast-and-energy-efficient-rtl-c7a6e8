// tb_sad_comparator: random and corner SAD pairs (equal, extremes); checks the
// selected SAD and payload, ties keeping input 0.
module tb_sad_comparator;
  logic [13:0] s0, s1, bs;
  logic [15:0] v0, v1, bv;
  int checks = 0, failures = 0;

  sad_comparator #(.SW(14), .VW(16)) dut (.sad0(s0), .sad1(s1), .vec0(v0), .vec1(v1),
                                          .best_sad(bs), .best_vec(bv));

  task automatic check(int a, int b);
    s0 = 14'(a); s1 = 14'(b); v0 = 16'($urandom); v1 = ~v0;
    #1;
    checks++;
    if (b < a) begin
      if (bs !== s1 || bv !== v1) failures++;
    end else begin
      if (bs !== s0 || bv !== v0) failures++;
    end
  endtask

  initial begin
    check(0, 0); check(16383, 0); check(0, 16383); check(16383, 16383); check(5, 6); check(6, 5);
    for (int i = 0; i < 2000; i++) check($urandom_range(0, 16383), $urandom_range(0, 16383));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
