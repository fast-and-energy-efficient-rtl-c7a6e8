// tb_global_control: the global control with behavioural TZS and FME units
// (random integer search time 31..148 cycles, fractional time 63 cycles) and a
// behavioural table. Checks that every chain starts its PUs in order, that
// each FME result is written once at the right table index for the PU its
// TZS computed, that the table is released once, after the last write, and
// that ctu_busy falls when the table is empty. Stalls (integer result waiting
// for a busy FME) must occur.
module tb_global_control;
  localparam int NCH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cs, cb, rel, tbusy;
  logic ts [NCH], tb_ [NCH], trv [NCH], trr [NCH], fs [NCH], fb [NCH], frv [NCH], frr [NCH], st [NCH], tw [NCH];
  logic [4:0] tpu [NCH], fpu [NCH];
  logic [6:0] ti [NCH];
  int checks = 0, failures = 0, stalls = 0, releases = 0, writes = 0, last_write = 0, cyc = 0;
  int t_left [NCH], f_left [NCH], t_next [NCH], t_cur [NCH], f_cur [NCH];
  int written [80];

  global_control #(.NCH(NCH), .N8CH(4)) dut (.clk(clk), .rst_n(rst_n), .ctu_start(cs), .ctu_busy(cb),
    .tzs_start(ts), .tzs_busy(tb_), .tzs_pu(tpu), .tzs_res_valid(trv), .tzs_res_ready(trr),
    .fme_start(fs), .fme_busy(fb), .fme_pu(fpu), .fme_res_valid(frv), .fme_res_ready(frr),
    .tzs_stall(st), .tbl_wr(tw), .tbl_idx(ti), .tbl_release(rel), .tbl_busy(tbusy));

  always @(posedge clk) cyc <= cyc + 1;

  // behavioural units: TZS busy while counting down, then result until ready
  always_comb
    for (int c = 0; c < NCH; c++) begin
      tb_[c] = t_left[c] >= 0;
      trv[c] = t_left[c] == 0;
      fb[c]  = f_left[c] >= 0;
      frv[c] = f_left[c] == 0;
    end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (st[c]) stalls++;
      if (ts[c]) begin
        checks++;
        if (t_next[c] >= ((c < 4) ? 16 : 8)) failures++;
        t_cur[c] = t_next[c];
        t_next[c]++;
        t_left[c] = $urandom_range(31, 148);
      end else if (t_left[c] > 0) t_left[c]--;
      else if (t_left[c] == 0 && trr[c]) t_left[c] = -1;
      if (fs[c]) begin
        f_cur[c] = t_cur[c];
        f_left[c] = 63;
      end else if (f_left[c] > 0) f_left[c]--;
      else if (f_left[c] == 0 && frr[c]) f_left[c] = -1;
      if (tw[c]) begin
        automatic int base = (c < 4) ? c * 16 : 64 + (c - 4) * 8;
        checks++;
        if (32'(ti[c]) != base + f_cur[c] || 32'(fpu[c]) != f_cur[c]) failures++;
        written[ti[c]]++;
        writes++;
        last_write = cyc;
      end
    end
    if (rel) begin
      releases++;
      checks++;
      if (writes != 80 || cyc <= last_write) failures++;
    end
  end

  // behavioural table: busy from the first write until some cycles after release
  int drain = -1;
  always @(posedge clk)
    if (rel) drain = 80;
    else if (drain > 0) drain--;
  assign tbusy = (writes > 0 && drain != 0);

  initial begin
    cs = 0;
    for (int c = 0; c < NCH; c++) begin t_left[c] = -1; f_left[c] = -1; t_next[c] = 0; t_cur[c] = 0; f_cur[c] = 0; end
    for (int i = 0; i < 80; i++) written[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cs = 1;
    @(negedge clk); cs = 0;
    while (cb) @(negedge clk);
    for (int i = 0; i < 80; i++) begin
      checks++;
      if (written[i] != 1) failures++;
    end
    checks++;
    if (releases != 1 || stalls == 0 || drain != 0) failures++;
    $display("writes %0d releases %0d stall cycles %0d", writes, releases, stalls);
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
