// me_top: approximate integer + fractional motion estimation for 64x64 CTUs.
//
// Four 8x8 chains and two 16x16 chains work in parallel on one CTU; each chain
// is a TZS unit (integer search, 16 candidates per line-cycle) followed by an
// FME unit (48 fractional candidates around the TZS result). All SAD trees use
// a lower-part-OR adder in their first stage. Results go to a SAD table that
// is read out (out_*) when the whole CTU is done. Reference and current samples
// come from an external memory through the t8_*/t16_* (integer search) and
// f8_*/f16_* (fractional search) ports, which must answer in the same cycle;
// *_pu tells the memory which PU of the CTU a chain works on (see pu8_x/pu8_y
// and pu16_x/pu16_y in me_pkg). tzs_stall shows chains whose integer result
// waits for a busy FME unit.
// The split into per-block-size TZS+FME chains, the two block sizes, the SAD
// table and its release rule follow the published architecture; the number of
// chains per size, the PU grouping, the memory organisation and the handshakes
// are this design's. Latency per CTU: the slowest chain's PUs back to back
// (TZS 31..148 cycles per 8x8 PU, 56..272 per 16x16 PU, plus about 2 cycles
// of handshake), its last FME (63 / 104 cycles), then an 80-cycle read-out.
module me_top #(
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ctu_start,
  output logic                  ctu_busy,
  // 8x8 chains
  output logic                  t8_req      [me_pkg::N_MOD8],
  output logic [2:0]            t8_line     [me_pkg::N_MOD8],
  output me_pkg::mv_t           t8_cand_mv  [me_pkg::N_MOD8][me_pkg::TZS_CANDS],
  output logic [4:0]            t8_pu       [me_pkg::N_MOD8],
  input  me_pkg::pix_t          t8_cur_line [me_pkg::N_MOD8][8],
  input  me_pkg::pix_t          t8_ref_line [me_pkg::N_MOD8][me_pkg::TZS_CANDS][8],
  output logic                  f8_req      [me_pkg::N_MOD8],
  output logic                  f8_vert     [me_pkg::N_MOD8],
  output logic [3:0]            f8_idx      [me_pkg::N_MOD8],
  output me_pkg::mv_t           f8_mv       [me_pkg::N_MOD8],
  output logic [4:0]            f8_pu       [me_pkg::N_MOD8],
  input  me_pkg::pix_t          f8_win_line [me_pkg::N_MOD8][16],
  input  me_pkg::pix_t          f8_cur_line [me_pkg::N_MOD8][8],
  // 16x16 chains
  output logic                  t16_req      [me_pkg::N_MOD16],
  output logic [3:0]            t16_line     [me_pkg::N_MOD16],
  output me_pkg::mv_t           t16_cand_mv  [me_pkg::N_MOD16][me_pkg::TZS_CANDS],
  output logic [4:0]            t16_pu       [me_pkg::N_MOD16],
  input  me_pkg::pix_t          t16_cur_line [me_pkg::N_MOD16][16],
  input  me_pkg::pix_t          t16_ref_line [me_pkg::N_MOD16][me_pkg::TZS_CANDS][16],
  output logic                  f16_req      [me_pkg::N_MOD16],
  output logic                  f16_vert     [me_pkg::N_MOD16],
  output logic [4:0]            f16_idx      [me_pkg::N_MOD16],
  output me_pkg::mv_t           f16_mv       [me_pkg::N_MOD16],
  output logic [4:0]            f16_pu       [me_pkg::N_MOD16],
  input  me_pkg::pix_t          f16_win_line [me_pkg::N_MOD16][24],
  input  me_pkg::pix_t          f16_cur_line [me_pkg::N_MOD16][16],
  // status
  output logic                  tzs_stall [me_pkg::N_MOD8 + me_pkg::N_MOD16],
  // SAD table read-out
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [6:0]            out_idx,
  output logic [15:0]           out_sad,
  output me_pkg::qmv_t          out_qmv
);
  import me_pkg::*;
  localparam int NCH = N_MOD8 + N_MOD16;

  logic       tzs_start [NCH], tzs_busy [NCH], tzs_rv [NCH], tzs_rr [NCH];
  logic       fme_start [NCH], fme_busy [NCH], fme_rv [NCH], fme_rr [NCH];
  logic [4:0] tzs_pu [NCH], fme_pu [NCH];
  logic       tbl_wr [NCH];
  logic [6:0] tbl_idx [NCH];
  logic [15:0] tbl_sad [NCH];
  qmv_t       tbl_qmv [NCH];
  logic       tbl_release, tbl_busy;

  for (genvar m = 0; m < N_MOD8; m++) begin : g_c8
    logic [13:0] t_sad, f_sad;
    mv_t         t_mv;
    tzs_module #(.N(8), .LOW(LOW)) u_tzs (
      .clk(clk), .rst_n(rst_n), .start(tzs_start[m]), .busy(tzs_busy[m]),
      .mem_req(t8_req[m]), .mem_line(t8_line[m]), .mem_cand_mv(t8_cand_mv[m]),
      .cur_line(t8_cur_line[m]), .ref_line(t8_ref_line[m]),
      .res_valid(tzs_rv[m]), .res_ready(tzs_rr[m]), .res_sad(t_sad), .res_mv(t_mv));
    fme_module #(.N(8), .LOW(LOW)) u_fme (
      .clk(clk), .rst_n(rst_n), .start(fme_start[m]), .ime_sad(t_sad), .ime_mv(t_mv),
      .busy(fme_busy[m]), .win_req(f8_req[m]), .win_vert(f8_vert[m]), .win_idx(f8_idx[m]),
      .win_mv(f8_mv[m]), .win_line(f8_win_line[m]), .cur_line(f8_cur_line[m]),
      .res_valid(fme_rv[m]), .res_ready(fme_rr[m]), .res_sad(f_sad), .res_qmv(tbl_qmv[m]));
    assign tbl_sad[m] = 16'(f_sad);
    assign t8_pu[m]   = tzs_pu[m];
    assign f8_pu[m]   = fme_pu[m];
  end

  for (genvar m = 0; m < N_MOD16; m++) begin : g_c16
    logic [15:0] t_sad;
    mv_t         t_mv;
    tzs_module #(.N(16), .LOW(LOW)) u_tzs (
      .clk(clk), .rst_n(rst_n), .start(tzs_start[N_MOD8+m]), .busy(tzs_busy[N_MOD8+m]),
      .mem_req(t16_req[m]), .mem_line(t16_line[m]), .mem_cand_mv(t16_cand_mv[m]),
      .cur_line(t16_cur_line[m]), .ref_line(t16_ref_line[m]),
      .res_valid(tzs_rv[N_MOD8+m]), .res_ready(tzs_rr[N_MOD8+m]), .res_sad(t_sad), .res_mv(t_mv));
    fme_module #(.N(16), .LOW(LOW)) u_fme (
      .clk(clk), .rst_n(rst_n), .start(fme_start[N_MOD8+m]), .ime_sad(t_sad), .ime_mv(t_mv),
      .busy(fme_busy[N_MOD8+m]), .win_req(f16_req[m]), .win_vert(f16_vert[m]), .win_idx(f16_idx[m]),
      .win_mv(f16_mv[m]), .win_line(f16_win_line[m]), .cur_line(f16_cur_line[m]),
      .res_valid(fme_rv[N_MOD8+m]), .res_ready(fme_rr[N_MOD8+m]), .res_sad(tbl_sad[N_MOD8+m]),
      .res_qmv(tbl_qmv[N_MOD8+m]));
    assign t16_pu[m] = tzs_pu[N_MOD8+m];
    assign f16_pu[m] = fme_pu[N_MOD8+m];
  end

  global_control #(.NCH(NCH), .N8CH(N_MOD8)) u_gctl (
    .clk(clk), .rst_n(rst_n), .ctu_start(ctu_start), .ctu_busy(ctu_busy),
    .tzs_start(tzs_start), .tzs_busy(tzs_busy), .tzs_pu(tzs_pu),
    .tzs_res_valid(tzs_rv), .tzs_res_ready(tzs_rr),
    .fme_start(fme_start), .fme_busy(fme_busy), .fme_pu(fme_pu),
    .fme_res_valid(fme_rv), .fme_res_ready(fme_rr), .tzs_stall(tzs_stall),
    .tbl_wr(tbl_wr), .tbl_idx(tbl_idx), .tbl_release(tbl_release), .tbl_busy(tbl_busy));

  sad_table #(.NE(80), .NW(NCH), .SW(16)) u_tbl (
    .clk(clk), .rst_n(rst_n), .wr_valid(tbl_wr), .wr_idx(tbl_idx), .wr_sad(tbl_sad),
    .wr_qmv(tbl_qmv), .release_tbl(tbl_release), .busy(tbl_busy),
    .out_valid(out_valid), .out_ready(out_ready), .out_idx(out_idx),
    .out_sad(out_sad), .out_qmv(out_qmv));
endmodule
