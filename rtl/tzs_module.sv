// tzs_module: integer motion estimation for one block size (one TZS unit).
//
// tzs_control chooses 16 candidate vectors per group and walks through the N
// lines of the blocks; the memory returns, in the same cycle, line line_idx of
// the current block and of the 16 candidate blocks; tzs_scu computes the 16
// SADs with approximate LOA trees and returns the best per group. The best
// integer vector and its SAD are offered on res_valid/res_ready. Timing is that
// of tzs_control: 31..148 cycles per 8x8 PU and 56..272 per 16x16 PU from the
// first memory request. Splitting into a control part and an operative part
// follows the published architecture; the same-cycle memory read is this design's interface.
module tzs_module #(
  parameter int N   = 8,
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 mem_req,
  output logic [$clog2(N)-1:0] mem_line,
  output me_pkg::mv_t          mem_cand_mv [me_pkg::TZS_CANDS],
  input  me_pkg::pix_t         cur_line [N],
  input  me_pkg::pix_t         ref_line [me_pkg::TZS_CANDS][N],
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic [me_pkg::blk_sad_w(N)-1:0] res_sad,
  output me_pkg::mv_t          res_mv
);
  import me_pkg::*;
  localparam int SW = blk_sad_w(N);
  localparam int VW = $bits(tzs_tag_t);

  logic          lv, lf, ll;
  tzs_tag_t      tag [TZS_CANDS];
  logic [VW-1:0] tag_bits [TZS_CANDS];
  logic          scu_valid;
  logic [SW-1:0] scu_sad;
  logic [VW-1:0] scu_tag;

  tzs_control #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy),
    .line_valid(lv), .line_first(lf), .line_last(ll), .line_idx(mem_line),
    .cand_mv(mem_cand_mv), .cand_tag(tag),
    .scu_valid(scu_valid), .scu_sad(scu_sad), .scu_tag(tzs_tag_t'(scu_tag)),
    .res_valid(res_valid), .res_ready(res_ready), .res_sad(res_sad), .res_mv(res_mv));

  always_comb for (int i = 0; i < TZS_CANDS; i++) tag_bits[i] = tag[i];

  tzs_scu #(.N(N), .NCAND(TZS_CANDS), .VW(VW), .LOW(LOW)) u_scu (
    .clk(clk), .rst_n(rst_n),
    .line_valid(lv), .line_first(lf), .line_last(ll), .line_tag(tag_bits),
    .cur_line(cur_line), .ref_line(ref_line),
    .res_valid(scu_valid), .res_sad(scu_sad), .res_tag(scu_tag));

  assign mem_req = lv;
endmodule
