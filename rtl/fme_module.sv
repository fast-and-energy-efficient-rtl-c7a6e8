// fme_module: fractional motion estimation for one block size.
//
// Started with the best integer vector and SAD from the TZS unit, it evaluates
// all 48 quarter- and half-sample positions around that vector and returns the
// best of them and the integer one. It reads the (N+8)x(N+8) reference window
// around the integer position from memory, one line per cycle:
//   H: rows 0..N+7 (N+8 cycles); rows 4..N+3 also bring the current block row.
//   V: columns 4..N+3 (N cycles).
//   D: 3 phases x (N+1) buffer columns (3N+3 cycles), no memory traffic.
// fme_interp adds three pipeline stages, fme_scu log2(N)+1 for trees and
// accumulators and 6 for the comparator, so the result is valid
// 5N + 11 + log2(N) + 9 cycles after the first memory request: 63 cycles for
// 8x8 and 104 for 16x16. It is offered on res_valid/res_ready.
// The split into interpolation unit and SCU and the H, V, D order follow the
// document; the schedule and the memory interface are this design's.
module fme_module #(
  parameter int N   = 8,
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [me_pkg::blk_sad_w(N)-1:0] ime_sad,
  input  me_pkg::mv_t            ime_mv,
  output logic                   busy,
  // reference window and current block reads (same-cycle response)
  output logic                   win_req,
  output logic                   win_vert,   // 0: row win_idx, 1: column win_idx
  output logic [$clog2(N+8)-1:0] win_idx,
  output me_pkg::mv_t            win_mv,     // integer vector the window is centred on
  input  me_pkg::pix_t           win_line [N+8],
  input  me_pkg::pix_t           cur_line [N], // current block row win_idx-4 (rows only)
  // result
  output logic                   res_valid,
  input  logic                   res_ready,
  output logic [me_pkg::blk_sad_w(N)-1:0] res_sad,
  output me_pkg::qmv_t           res_qmv
);
  import me_pkg::*;
  localparam int SW = blk_sad_w(N);
  localparam int IW = $clog2(N + 8);
  localparam int NT = FME_TREES;

  typedef enum logic [2:0] {S_IDLE, S_H, S_V, S_D, S_DRAIN, S_DONE} state_t;
  typedef struct packed {
    logic          valid;
    logic [1:0]    mode;
    logic [IW-1:0] idx;
    logic [1:0]    phase;
    logic          last;
  } ctl_t;

  state_t        state;
  logic [IW-1:0] cnt;
  logic [1:0]    phase;
  logic [SW-1:0] ime_sad_q, out_sad;
  mv_t           ime_mv_q;
  qmv_t          out_qmv;
  pix_t          cur_blk [N][N];

  ctl_t issue;
  ctl_t ctl_d [3];

  always_comb begin
    issue       = '0;
    issue.valid = (state == S_H) || (state == S_V) || (state == S_D);
    issue.idx   = cnt;
    issue.phase = phase;
    case (state)
      S_V:     issue.mode = 2'd1;
      S_D:     issue.mode = 2'd2;
      default: issue.mode = 2'd0;
    endcase
    issue.last  = (state == S_D) && (phase == 2'd3) && (cnt == IW'(N));
  end

  assign win_req  = (state == S_H) || (state == S_V);
  assign win_vert = (state == S_V);
  assign win_idx  = (state == S_V) ? cnt + IW'(4) : cnt;
  assign win_mv   = ime_mv_q;

  logic          scu_valid;
  logic [SW-1:0] scu_sad;
  qmv_t          scu_qmv;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      phase     <= 2'd1;
      ime_sad_q <= '0;
      ime_mv_q  <= '0;
      out_sad   <= '0;
      out_qmv   <= '0;
      for (int s = 0; s < 3; s++) ctl_d[s] <= '0;
    end else begin
      ctl_d[0] <= issue;
      ctl_d[1] <= ctl_d[0];
      ctl_d[2] <= ctl_d[1];
      case (state)
        S_IDLE: if (start) begin
          state     <= S_H;
          cnt       <= '0;
          ime_sad_q <= ime_sad;
          ime_mv_q  <= ime_mv;
        end
        S_H: if (cnt == IW'(N + 7)) begin state <= S_V; cnt <= '0; end
             else cnt <= cnt + 1'b1;
        S_V: if (cnt == IW'(N - 1)) begin state <= S_D; cnt <= '0; phase <= 2'd1; end
             else cnt <= cnt + 1'b1;
        S_D: if (cnt == IW'(N)) begin
               cnt <= '0;
               if (phase == 2'd3) state <= S_DRAIN;
               else phase <= phase + 2'd1;
             end else cnt <= cnt + 1'b1;
        S_DRAIN: if (scu_valid) begin
          out_sad <= scu_sad;
          out_qmv <= scu_qmv;
          state   <= res_ready ? S_IDLE : S_DONE;
        end
        S_DONE: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end

  // current block rows arrive with window rows 4..N+3
  always_ff @(posedge clk)
    if (state == S_H && cnt >= IW'(4) && cnt < IW'(N + 4))
      cur_blk[32'(cnt) - 4] <= cur_line;

  pix_t frac [6][N];

  fme_interp #(.N(N)) u_interp (
    .clk(clk), .in_valid(issue.valid), .in_mode(issue.mode), .in_idx(issue.idx),
    .in_phase(issue.phase), .in_line(win_line), .frac(frac));

  // route the interpolated lines and current-block lines to the 12 trees
  ctl_t            c;
  logic            t_valid [NT];
  logic            t_first [NT];
  logic [5:0]      t_acc   [NT];
  pix_t            ref_vec [NT][N];
  pix_t            cur_vec [NT][N];

  always_comb begin
    int i;
    c = ctl_d[2];
    i = 32'(c.idx);
    for (int t = 0; t < NT; t++) begin
      int j;
      j = t % 6;
      t_valid[t] = 1'b0;
      t_first[t] = 1'b0;
      t_acc[t]   = '0;
      for (int x = 0; x < N; x++) begin
        ref_vec[t][x] = frac[j][x];
        cur_vec[t][x] = '0;
      end
      case (c.mode)
        2'd0: if (t < 6) begin                       // horizontal candidates
          t_valid[t] = c.valid && i >= 4 && i < N + 4;
          t_first[t] = (i == 4);
          t_acc[t]   = 6'(j);
          for (int x = 0; x < N; x++) cur_vec[t][x] = cur_blk[(i + N - 4) % N][x];
        end
        2'd1: if (t < 6) begin                       // vertical candidates
          t_valid[t] = c.valid;
          t_first[t] = (i == 0);
          t_acc[t]   = 6'(6 + j);
          for (int y = 0; y < N; y++) cur_vec[t][y] = cur_blk[y][i % N];
        end
        default: if (t < 6) begin                    // diagonal, dx = phase - 4
          t_valid[t] = c.valid && i < N;
          t_first[t] = (i == 0);
          t_acc[t]   = 6'(12 + 6 * (32'(c.phase) - 1) + j);
          for (int y = 0; y < N; y++) cur_vec[t][y] = cur_blk[y][i % N];
        end else begin                               // diagonal, dx = phase
          t_valid[t] = c.valid && i >= 1;
          t_first[t] = (i == 1);
          t_acc[t]   = 6'(12 + 6 * (32'(c.phase) + 2) + j);
          for (int y = 0; y < N; y++) cur_vec[t][y] = cur_blk[y][(i + N - 1) % N];
        end
      endcase
    end
  end

  fme_scu #(.N(N), .LOW(LOW)) u_scu (
    .clk(clk), .rst_n(rst_n),
    .t_valid(t_valid), .t_first(t_first), .t_acc(t_acc), .t_last(c.valid && c.last),
    .ref_vec(ref_vec), .cur_vec(cur_vec), .ime_sad(ime_sad_q), .ime_mv(ime_mv_q),
    .res_valid(scu_valid), .res_sad(scu_sad), .res_qmv(scu_qmv));

  assign busy      = (state != S_IDLE);
  assign res_valid = (state == S_DONE) || (state == S_DRAIN && scu_valid);
  assign res_sad   = (state == S_DONE) ? out_sad : scu_sad;
  assign res_qmv   = (state == S_DONE) ? out_qmv : scu_qmv;
endmodule
