// tb_loa_adder: exhaustive check of the 8-bit lower-part-OR adder (5 low bits
// approximated) and of the exact configuration (no low part) against a bit
// model. 
module tb_loa_adder;
  import tb_ref_pkg::*;
  logic [7:0] a, b, s5, s0;
  logic       c5, c0;
  int checks = 0, failures = 0;

  loa_adder #(.W(8), .LOW(5)) dut5 (.a(a), .b(b), .s(s5), .cout(c5));
  loa_adder #(.W(8), .LOW(0)) dut0 (.a(a), .b(b), .s(s0), .cout(c0));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int es, ec;
        a = 8'(i); b = 8'(j);
        #1;
        es = loa_sum(i, j, 5, ec);
        checks++;
        if (s5 !== 8'(es) || c5 !== 1'(ec)) begin
          failures++;
          if (failures < 5) $display("LOA5 %0d+%0d: got %0d/%0d want %0d/%0d", i, j, s5, c5, es, ec);
        end
        checks++;
        if ({c0, s0} !== 9'(i + j)) failures++;
      end
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
