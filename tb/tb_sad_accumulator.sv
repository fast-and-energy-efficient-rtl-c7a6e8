// tb_sad_accumulator: random blocks of random length, with idle cycles in
// between; checks the running value after every enabled cycle and that idle
// cycles hold it.
module tb_sad_accumulator;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, first;
  logic [10:0] din;
  logic [13:0] dout;
  int checks = 0, failures = 0, model = 0;

  sad_accumulator #(.IW(11), .OW(14)) dut (.clk(clk), .en(en), .first(first), .sad_in(din), .sad_out(dout));

  initial begin
    en = 0; first = 0; din = 0;
    for (int blk = 0; blk < 100; blk++) begin
      automatic int len = 1 + $urandom_range(0, 7);
      for (int l = 0; l < len; l++) begin
        en = 1; first = (l == 0); din = 11'($urandom_range(0, 2040));
        model = first ? din : model + din;
        @(posedge clk); #1;
        checks++;
        if (32'(dout) != model) failures++;
      end
      en = 0; din = 11'($urandom); first = 1'($urandom);
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        checks++;
        if (32'(dout) != model) failures++;
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
