// tb_loa_absdiff: exhaustive check of the approximate absolute difference with
// 5 imprecise bits against the reference model, and of the exact configuration
// against |a-b|.
module tb_loa_absdiff;
  import tb_ref_pkg::*;
  logic [7:0] a, b, d5, d0;
  int checks = 0, failures = 0, maxerr = 0;

  loa_absdiff #(.W(8), .LOW(5)) dut5 (.a(a), .b(b), .d(d5));
  loa_absdiff #(.W(8), .LOW(0)) dut0 (.a(a), .b(b), .d(d0));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int e;
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (32'(d5) != ad_ref(i, j, 5)) begin
          failures++;
          if (failures < 5) $display("AD5 %0d,%0d: got %0d want %0d", i, j, d5, ad_ref(i, j, 5));
        end
        e = (i > j) ? i - j : j - i;
        checks++;
        if (32'(d0) != e) failures++;
        if ((32'(d5) > e ? 32'(d5) - e : e - 32'(d5)) > maxerr) maxerr = (32'(d5) > e ? 32'(d5) - e : e - 32'(d5));
      end
    // the approximation only touches the five low bits: error stays below 64
    checks++;
    if (maxerr >= 64 || maxerr == 0) failures++;
    $display("max |error| of the approximate difference: %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
