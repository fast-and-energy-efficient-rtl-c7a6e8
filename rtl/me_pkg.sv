// me_pkg: types, constants and small pure functions shared by the approximate
// motion-estimation datapath.
//
// Vectors: the integer search (TZS) works in whole-sample units with 8-bit
// signed components (the search is clamped to +/-SEARCH_RANGE); the fractional
// stage reports quarter-sample vectors with 10-bit signed components.
// The TZS search pattern and the HEVC luma interpolation taps are kept here so
// that the control, the datapath and the testbenches agree on them.
package me_pkg;

  parameter int PIX_W        = 8;    // luminance sample width
  parameter int MV_W         = 8;    // integer-sample vector component
  parameter int QMV_W        = 10;   // quarter-sample vector component
  parameter int SEARCH_RANGE = 64;   // integer search clamped to +/- this
  parameter int TZS_CANDS    = 16;   // candidates evaluated in parallel
  parameter int TZS_MAX_GRPS = 15;   // 15 groups of 16 = 240 candidates
  parameter int LOA_LOW_BITS = 5;    // imprecise (OR) part of the 8-bit LOA
  parameter int FME_CANDS    = 48;   // fractional candidates per PU
  parameter int FME_TREES    = 12;   // SAD trees of the fractional SCU
  parameter int N_MOD8       = 4;    // 8x8 TZS+FME chains
  parameter int N_MOD16      = 2;    // 16x16 TZS+FME chains

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  typedef struct packed {
    logic signed [QMV_W-1:0] x;
    logic signed [QMV_W-1:0] y;
  } qmv_t;

  // Payload carried with every TZS candidate through the SAD comparator:
  // the candidate vector and the log2 of the expansion step it came from.
  typedef struct packed {
    mv_t        mv;
    logic [2:0] step_log2;
  } tzs_tag_t;

  // SAD of one N-sample line and of one NxN block.
  function automatic int line_sad_w(int n);
    return PIX_W + $clog2(n);
  endfunction

  function automatic int blk_sad_w(int n);
    return PIX_W + 2 * $clog2(n);
  endfunction

  // TZS 16-point expansion of step s around the origin: the 8 points of the
  // square of radius s, then the 8 "knight" points at (s,2s)-type offsets.
  function automatic mv_t tzs_offset(int idx, int s);
    logic signed [MV_W-1:0] dx, dy, sv;
    sv = MV_W'(s);
    case (idx)
      0: begin dx =  sv;   dy =  0;   end
      1: begin dx =  sv;   dy =  sv;   end
      2: begin dx =  0;   dy =  sv;   end
      3: begin dx = -sv;   dy =  sv;   end
      4: begin dx = -sv;   dy =  0;   end
      5: begin dx = -sv;   dy = -sv;   end
      6: begin dx =  0;   dy = -sv;   end
      7: begin dx =  sv;   dy = -sv;   end
      8: begin dx =  2*sv; dy =  sv;   end
      9: begin dx =  sv;   dy =  2*sv; end
      10: begin dx = -sv;   dy =  2*sv; end
      11: begin dx = -2*sv; dy =  sv;   end
      12: begin dx = -2*sv; dy = -sv;   end
      13: begin dx = -sv;   dy = -2*sv; end
      14: begin dx =  sv;   dy = -2*sv; end
      default: begin dx = 2*sv; dy = -sv; end
    endcase
    tzs_offset.x = dx;
    tzs_offset.y = dy;
  endfunction

  function automatic logic signed [MV_W-1:0] clamp_sr(int v);
    if (v > SEARCH_RANGE) return MV_W'(SEARCH_RANGE);
    if (v < -SEARCH_RANGE) return MV_W'(-SEARCH_RANGE);
    return MV_W'(v);
  endfunction

  // HEVC luma interpolation taps, phase 1 (1/4), 2 (1/2), 3 (3/4).
  function automatic int hevc_tap(int phase, int k);
    int t;
    case (phase)
      1: case (k) 0: t = -1; 1: t = 4; 2: t = -10; 3: t = 58; 4: t = 17; 5: t = -5; 6: t = 1; default: t = 0; endcase
      2: case (k) 0: t = -1; 1: t = 4; 2: t = -11; 3: t = 40; 4: t = 40; 5: t = -11; 6: t = 4; default: t = -1; endcase
      default: case (k) 0: t = 0; 1: t = 1; 2: t = -5; 3: t = 17; 4: t = 58; 5: t = -10; 6: t = 4; default: t = -1; endcase
    endcase
    return t;
  endfunction

  // Fractional offsets, in quarter samples, for index j = 0..5.
  function automatic int frac_off(int j);
    return (j < 3) ? j - 3 : j - 2;
  endfunction

  // Position of the k-th PU handled by an 8x8 chain m (one 32x32 quadrant
  // each) and by a 16x16 chain m (one 64x32 half each), relative to the CTU.
  function automatic int pu8_x(int m, int k);
    return (m % 2) * 32 + (k % 4) * 8;
  endfunction
  function automatic int pu8_y(int m, int k);
    return (m / 2) * 32 + (k / 4) * 8;
  endfunction
  function automatic int pu16_x(int k);
    return (k % 4) * 16;
  endfunction
  function automatic int pu16_y(int m, int k);
    return m * 32 + (k / 4) * 16;
  endfunction

endpackage
