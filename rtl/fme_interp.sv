// fme_interp: interpolation unit of the fractional motion estimation.
//
// One shared bank of 3 x (N+1) eight-tap HEVC luma filters (quarter, half and
// three-quarter phase) works in three modes:
//   H: the input is row i of the (N+8)x(N+8) reference window around the best
//      integer position. The unrounded horizontal results are written to the
//      fractional buffer (row i) and, for the N block rows, rounded and
//      clipped into the rows of the six horizontal candidates (dx = +-1,2,3).
//   V: the input is one window column; the six vertical candidates' columns.
//   D: the input is column ci, phase p of the fractional buffer; the vertical
//      filters turn it into the columns of six diagonal candidates (one per
//      vertical offset) for horizontal phase p.
// Three pipeline stages: input select (the multiplexer between the memory line
// and the buffer), filters (results registered unclipped), clip to 0..255. The
// outputs frac[j][k], j = 0..5 for offsets -3,-2,-1,+1,+2,+3 quarter samples,
// appear three clocks after the inputs. Rounding is HEVC's for 8-bit video:
// single-direction results are (sum + 32) >> 6; diagonal ones take
// (sum >> 6 + 32) >> 6 of the unclipped horizontal values.
// The unit structure (input multiplexer, filters, unclipped buffer, clip) and
// the order H, V, D come from the published architecture; the filter taps are the HEVC
// standard's; the buffer layout and stage split are this design's.
module fme_interp #(
  parameter int N = 8
) (
  input  logic                   clk,
  input  logic                   in_valid,
  input  logic [1:0]             in_mode,   // 0 = H, 1 = V, 2 = D
  input  logic [$clog2(N+8)-1:0] in_idx,    // H: window row; D: buffer column
  input  logic [1:0]             in_phase,  // D: horizontal phase 1..3
  input  me_pkg::pix_t           in_line [N+8],
  output me_pkg::pix_t           frac [6][N]
);
  import me_pkg::*;
  localparam int R  = N + 8;      // window rows / columns
  localparam int B  = N + 1;      // base positions -1 .. N-1
  localparam int HW = 16;         // unclipped horizontal sample
  localparam int FW = 24;         // filter accumulator

  logic signed [HW-1:0] hbuf [R][B][3];   // fractional buffer (no clip)

  // stage A: input multiplexer
  logic signed [HW-1:0] a_line [R];
  logic [1:0]           a_mode;
  logic [$clog2(R)-1:0] a_idx;
  logic                 a_valid;

  always_ff @(posedge clk) begin
    a_valid <= in_valid;
    a_mode  <= in_mode;
    a_idx   <= in_idx;
    for (int r = 0; r < R; r++)
      if (in_mode == 2'd2) a_line[r] <= hbuf[r][32'(in_idx) % B][(32'(in_phase) + 2) % 3];
      else                 a_line[r] <= HW'(signed'({1'b0, in_line[r]}));
  end

  // stage B: filter bank
  logic signed [FW-1:0] fsum [3][B];
  logic signed [FW-1:0] b_filt [3][B];

  always_comb
    for (int q = 0; q < 3; q++)
      for (int b = 0; b < B; b++) begin
        fsum[q][b] = '0;
        for (int k = 0; k < 8; k++)
          fsum[q][b] += FW'(hevc_tap(q + 1, k)) * FW'(a_line[b + k]);
      end

  always_ff @(posedge clk) begin
    for (int q = 0; q < 3; q++)
      for (int b = 0; b < B; b++) begin
        b_filt[q][b] <= (a_mode == 2'd2) ? (fsum[q][b] >>> 6) : fsum[q][b];
        if (a_valid && a_mode == 2'd0) hbuf[a_idx][b][q] <= HW'(fsum[q][b]);
      end
  end

  // stage C: rounding, clipping and selection of the six candidates
  function automatic pix_t clip8(logic signed [FW-1:0] v);
    logic signed [FW-1:0] r;
    r = (v + FW'(32)) >>> 6;
    if (r < 0)   return 8'd0;
    if (r > 255) return 8'd255;
    return r[7:0];
  endfunction

  always_ff @(posedge clk)
    for (int j = 0; j < 6; j++)
      for (int x = 0; x < N; x++)
        if (frac_off(j) < 0) frac[j][x] <= clip8(b_filt[4 + frac_off(j) - 1][x]);
        else                 frac[j][x] <= clip8(b_filt[frac_off(j) - 1][x + 1]);
endmodule
