// tzs_control: candidate selection and stop conditions of the modified TZS.
//
// The search starts from the zero vector (the only predictor kept) and issues
// candidates in groups of 16, one block line per clock, so a group occupies
// N cycles. A group is one expansion of step s = 2^k around a centre: the 8
// points of the square of radius s plus the 8 points (+-s,+-2s), (+-2s,+-s).
// The steps used are 1, 2, 4, 8 and 16 (five expansions). Phases:
//   FIRST : steps 1, 2, 4 around (0,0). If the best candidate came from step 1
//           the search stops here (the short path: 48 candidates).
//   FAR   : only if the best came from step 4: steps 8, 16 around (0,0).
//   REFINE: all five steps around the best vector so far; repeated while it
//           finds a smaller SAD, as long as the 15-group (240-candidate) limit
//           allows another five groups.
// Groups of one phase are issued back to back; at the end of a phase the
// control waits for the comparator result of the last group and decides in the
// same cycle, issuing the first line of the next phase right away. With the
// tzs_scu latency this gives 3N + log2(N) + 4 cycles for the shortest search
// and 15N + 4(log2(N) + 4) for the longest (31/148 for 8x8, 56/272 for 16x16,
// counted from the first line to res_valid). The result (best SAD and integer
// vector) is offered with res_valid until res_ready; a new search needs start.
// The published architecture gives the zero predictor, the disabled raster step, 16
// candidates per expansion, five expansions and the 240-candidate limit; the
// exact pattern, the phase rules and the vector clamp are this design's.
module tzs_control #(
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  // candidate line issue (to memory and to the SCU)
  output logic                 line_valid,
  output logic                 line_first,
  output logic                 line_last,
  output logic [$clog2(N)-1:0] line_idx,
  output me_pkg::mv_t          cand_mv  [me_pkg::TZS_CANDS],
  output me_pkg::tzs_tag_t     cand_tag [me_pkg::TZS_CANDS],
  // group results from the SCU
  input  logic                 scu_valid,
  input  logic [me_pkg::blk_sad_w(N)-1:0] scu_sad,
  input  me_pkg::tzs_tag_t     scu_tag,
  // search result
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic [me_pkg::blk_sad_w(N)-1:0] res_sad,
  output me_pkg::mv_t          res_mv
);
  import me_pkg::*;
  localparam int SW = blk_sad_w(N);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_t;
  typedef enum logic [1:0] {PH_FIRST, PH_FAR, PH_REFINE} phase_t;

  state_t          state;
  phase_t          phase;
  logic [2:0]      grp;
  logic [$clog2(N)-1:0] line;
  mv_t             center;
  logic [2:0]      res_cnt;
  logic [3:0]      grps_used;
  logic            run_vld;
  logic [SW-1:0]   run_sad;
  tzs_tag_t        run_tag;
  logic [SW-1:0]   ref_base;

  function automatic logic [2:0] n_grps(phase_t p);
    case (p)
      PH_FIRST: return 3'd3;
      PH_FAR:   return 3'd2;
      default:  return 3'd5;
    endcase
  endfunction

  // ---------------------------------------------------------------- decision
  logic [SW-1:0] cb_sad;     // best so far including the arriving result
  tzs_tag_t      cb_tag;
  logic          phase_end, cont, stop;
  phase_t        nx_phase;
  mv_t           nx_center;

  always_comb begin
    if (run_vld && !(scu_sad < run_sad)) begin
      cb_sad = run_sad;
      cb_tag = run_tag;
    end else begin
      cb_sad = scu_sad;
      cb_tag = scu_tag;
    end
    phase_end = (state == S_WAIT) && scu_valid && (res_cnt == n_grps(phase) - 3'd1);
    nx_phase  = PH_REFINE;
    nx_center = cb_tag.mv;
    cont      = 1'b0;
    case (phase)
      PH_FIRST: begin
        if (cb_tag.step_log2 == 3'd2) begin
          nx_phase  = PH_FAR;
          nx_center = '0;
          cont      = 1'b1;
        end else if (cb_tag.step_log2 != 3'd0) begin
          cont      = 1'b1;
        end
      end
      PH_FAR:  cont = 1'b1;
      default: cont = (cb_sad < ref_base) && (32'(grps_used) + 5 <= TZS_MAX_GRPS);
    endcase
    stop = phase_end && !cont;
    cont = phase_end && cont;
  end

  // ------------------------------------------------------------ line issue
  phase_t          is_phase;
  logic [2:0]      is_grp;
  logic [$clog2(N)-1:0] is_line;
  mv_t             is_center;
  logic [2:0]      is_k;

  always_comb begin
    line_valid = (state == S_ISSUE) || cont;
    if (cont) begin
      is_phase  = nx_phase;
      is_grp    = '0;
      is_line   = '0;
      is_center = nx_center;
    end else begin
      is_phase  = phase;
      is_grp    = grp;
      is_line   = line;
      is_center = center;
    end
    is_k       = (is_phase == PH_FAR) ? is_grp + 3'd3 : is_grp;
    line_idx   = is_line;
    line_first = (is_line == '0);
    line_last  = (is_line == $clog2(N)'(N - 1));
    for (int i = 0; i < TZS_CANDS; i++) begin
      mv_t o;
      o = tzs_offset(i, 1 << is_k);
      cand_mv[i].x = clamp_sr(int'(is_center.x) + int'(o.x));
      cand_mv[i].y = clamp_sr(int'(is_center.y) + int'(o.y));
      cand_tag[i].mv        = cand_mv[i];
      cand_tag[i].step_log2 = is_k;
    end
  end

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= PH_FIRST;
      grp       <= '0;
      line      <= '0;
      center    <= '0;
      res_cnt   <= '0;
      grps_used <= '0;
      run_vld   <= 1'b0;
      run_sad   <= '0;
      run_tag   <= '0;
      ref_base  <= '0;
    end else begin
      if (scu_valid) begin
        run_vld <= 1'b1;
        run_sad <= cb_sad;
        run_tag <= cb_tag;
        res_cnt <= res_cnt + 3'd1;
      end
      // advance the issue position
      if (line_valid) begin
        phase  <= is_phase;
        center <= is_center;
        if (is_line == $clog2(N)'(N - 1)) begin
          line      <= '0;
          grps_used <= grps_used + 4'd1;
          if (is_grp == n_grps(is_phase) - 3'd1) begin
            state <= S_WAIT;
            grp   <= '0;
          end else begin
            state <= S_ISSUE;
            grp   <= is_grp + 3'd1;
          end
        end else begin
          state <= S_ISSUE;
          grp   <= is_grp;
          line  <= is_line + 1'b1;
        end
      end
      if (cont) begin
        res_cnt  <= '0;
        ref_base <= cb_sad;
      end
      case (state)
        S_IDLE: if (start) begin
          state     <= S_ISSUE;
          phase     <= PH_FIRST;
          grp       <= '0;
          line      <= '0;
          center    <= '0;
          res_cnt   <= '0;
          grps_used <= '0;
          run_vld   <= 1'b0;
        end
        S_WAIT: if (stop) state <= res_ready ? S_IDLE : S_DONE;
        S_DONE: if (res_ready) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign res_valid = (state == S_DONE) || stop;
  assign res_sad   = stop ? cb_sad : run_sad;
  assign res_mv    = stop ? cb_tag.mv : run_tag.mv;
endmodule
