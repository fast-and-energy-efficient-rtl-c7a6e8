// tb_fme_interp: feeds a random 16x16 window (8x8 block) through the three
// modes of the interpolation unit (rows, then columns, then the buffered
// horizontal samples column by column for each phase) and checks all six
// outputs of every cycle, three cycles later, against direct HEVC filtering
// of the window.
module tb_fme_interp;
  import tb_ref_pkg::*;
  import me_pkg::*;
  localparam int N = 8, R = N + 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       iv;
  logic [1:0] im, ip;
  logic [4:0] ii;
  pix_t       il [R];
  pix_t       fr [6][N];
  int win [R][R];
  int checks = 0, failures = 0;
  int exp_q [$];      // 6*N expected values per checked cycle, -1 = don't care
  int pend  [$];      // 1 = cycle with a check

  fme_interp #(.N(N)) dut (.clk(clk), .in_valid(iv), .in_mode(im), .in_idx(ii[3:0]),
    .in_phase(ip), .in_line(il), .frac(fr));

  function automatic int hsum(int r, int c0, int ph);   // horizontal, taps at cols c0..c0+7
    int s = 0;
    for (int k = 0; k < 8; k++) s += tap(ph, k) * win[r][c0 + k];
    return s;
  endfunction
  function automatic int vsum(int c, int r0, int ph);
    int s = 0;
    for (int k = 0; k < 8; k++) s += tap(ph, k) * win[r0 + k][c];
    return s;
  endfunction
  function automatic int phase_of(int j);
    return (foff(j) < 0) ? 4 + foff(j) : foff(j);
  endfunction
  function automatic int base_of(int j, int x);
    return (foff(j) < 0) ? x : x + 1;
  endfunction

  task automatic push_expect(int mode, int idx, int ph);
    for (int j = 0; j < 6; j++)
      for (int x = 0; x < N; x++) begin
        int v;
        if (mode == 0)      v = clip255(asr6(hsum(idx, base_of(j, x), phase_of(j)) + 32));
        else if (mode == 1) v = clip255(asr6(vsum(idx, base_of(j, x), phase_of(j)) + 32));
        else begin
          int s = 0;
          for (int k = 0; k < 8; k++) s += tap(phase_of(j), k) * hsum(base_of(j, x) + k, idx, ph);
          v = clip255(asr6(asr6(s) + 32));
        end
        exp_q.push_back(v);
      end
  endtask

  task automatic drive(int mode, int idx, int ph, int chk);
    @(negedge clk);
    iv = 1; im = 2'(mode); ii = 5'(idx); ip = 2'(ph);
    for (int r = 0; r < R; r++) il[r] = (mode == 0) ? 8'(win[idx][r]) : 8'(win[r][idx]);
    pend.push_back(chk);
    if (chk) push_expect(mode, idx, ph);
  endtask

  // compare three cycles after each drive
  always @(posedge clk) begin
    if (pend.size() > 3) begin
      if (pend.pop_front()) begin
        checks++;
        for (int j = 0; j < 6; j++)
          for (int x = 0; x < N; x++)
            if (32'(fr[j][x]) != exp_q.pop_front()) begin
              failures++;
              if (failures < 5) $display("mismatch j=%0d x=%0d got %0d", j, x, fr[j][x]);
            end
      end
    end
  end

  initial begin
    iv = 0; im = 0; ii = 0; ip = 1;
    for (int r = 0; r < R; r++) il[r] = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < R; c++) win[r][c] = (r * 37 + c * 11) % 9 == 0 ? 255 : $urandom_range(0, 255);
    for (int i = 0; i < R; i++) drive(0, i, 1, 1);               // rows (all checked)
    for (int x = 0; x < N; x++) drive(1, x + 4, 1, 1);           // columns
    for (int p = 1; p <= 3; p++)
      for (int ci = 0; ci <= N; ci++) drive(2, ci, p, 1);        // buffered columns
    repeat (4) drive(1, 4, 1, 0);
    @(negedge clk); iv = 0;
    repeat (5) @(negedge clk);
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
