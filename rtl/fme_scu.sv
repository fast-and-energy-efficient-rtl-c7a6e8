// fme_scu: Search and Comparison Unit of the fractional stage.
//
// Twelve SAD trees (approximate LOA first stage) each take one row or column of
// a fractional candidate and the matching row or column of the current block.
// Their results are routed to 48 sad_accumulators, one per fractional candidate
// (6 horizontal, 6 vertical, 36 diagonal); each tree's control word
// {valid, first, accumulator index} travels beside the tree. When the word
// marked last has been accumulated, the 48 SADs and the SAD of the best integer
// candidate (offset 0,0) enter a 6-level sad_comparator_tree; the smallest SAD
// and its quarter-sample vector (4 x integer vector + offset) come out 6
// clocks later. Ties keep the integer candidate, then the lowest index.
// Accumulator k covers offset (frac_off(k), 0) for k < 6, (0, frac_off(k-6))
// for k < 12, and (frac_off(a), frac_off(j)) for k = 12 + 6a + j.
// Tree count, accumulator count and comparator follow the published architecture; the
// routing by index and the inclusion of the integer SAD as a 49th input (the
// "best IME SAD" input of the unit) are this design's reading.
module fme_scu #(
  parameter int N   = 8,
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          t_valid [me_pkg::FME_TREES],
  input  logic          t_first [me_pkg::FME_TREES],
  input  logic [5:0]    t_acc   [me_pkg::FME_TREES],
  input  logic          t_last,
  input  me_pkg::pix_t  ref_vec [me_pkg::FME_TREES][N],
  input  me_pkg::pix_t  cur_vec [me_pkg::FME_TREES][N],
  input  logic [me_pkg::blk_sad_w(N)-1:0] ime_sad,
  input  me_pkg::mv_t   ime_mv,
  output logic          res_valid,
  output logic [me_pkg::blk_sad_w(N)-1:0] res_sad,
  output me_pkg::qmv_t  res_qmv
);
  import me_pkg::*;
  localparam int LV  = $clog2(N);
  localparam int LSW = line_sad_w(N);
  localparam int BSW = blk_sad_w(N);
  localparam int NT  = FME_TREES;
  localparam int NA  = FME_CANDS;
  localparam int QW  = $bits(qmv_t);

  logic [LSW-1:0] line_sad [NT];
  logic [BSW-1:0] acc_sad  [NA];

  // control words delayed by the tree latency
  logic       d_valid [LV][NT];
  logic       d_first [LV][NT];
  logic [5:0] d_acc   [LV][NT];
  logic [LV-1:0] d_last;
  logic       acc_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int l = 0; l < LV; l++)
        for (int t = 0; t < NT; t++) d_valid[l][t] <= 1'b0;
      d_last   <= '0;
      acc_done <= 1'b0;
    end else begin
      for (int t = 0; t < NT; t++) begin
        d_valid[0][t] <= t_valid[t];
        for (int l = 1; l < LV; l++) d_valid[l][t] <= d_valid[l-1][t];
      end
      d_last   <= {d_last[LV-2:0], t_last};
      acc_done <= d_last[LV-1];
    end

  always_ff @(posedge clk)
    for (int t = 0; t < NT; t++) begin
      d_first[0][t] <= t_first[t];
      d_acc[0][t]   <= t_acc[t];
      for (int l = 1; l < LV; l++) begin
        d_first[l][t] <= d_first[l-1][t];
        d_acc[l][t]   <= d_acc[l-1][t];
      end
    end

  for (genvar t = 0; t < NT; t++) begin : g_tree
    sad_tree #(.N(N), .LOW(LOW)) u_tree (
      .clk(clk), .cur(cur_vec[t]), .ref_pix(ref_vec[t]), .sad(line_sad[t]));
  end

  for (genvar k = 0; k < NA; k++) begin : g_acc
    logic           en, first;
    logic [LSW-1:0] din;
    always_comb begin
      en    = 1'b0;
      first = 1'b0;
      din   = '0;
      for (int t = 0; t < NT; t++)
        if (d_valid[LV-1][t] && d_acc[LV-1][t] == 6'(k)) begin
          en    = 1'b1;
          first = d_first[LV-1][t];
          din   = line_sad[t];
        end
    end
    sad_accumulator #(.IW(LSW), .OW(BSW)) u_acc (
      .clk(clk), .en(en), .first(first), .sad_in(din), .sad_out(acc_sad[k]));
  end

  // comparator inputs: 0 = integer candidate, 1 + k = fractional candidate k
  logic [BSW-1:0] c_sad [NA+1];
  logic [QW-1:0]  c_vec [NA+1];
  logic [QW-1:0]  best_vec;

  always_comb begin
    qmv_t base, v;
    base.x = QMV_W'(ime_mv.x) <<< 2;
    base.y = QMV_W'(ime_mv.y) <<< 2;
    c_sad[0] = ime_sad;
    c_vec[0] = base;
    for (int k = 0; k < NA; k++) begin
      logic signed [QMV_W-1:0] ox, oy;
      if (k < 6)       begin ox = QMV_W'(frac_off(k)); oy = '0; end
      else if (k < 12) begin ox = '0; oy = QMV_W'(frac_off(k - 6)); end
      else             begin ox = QMV_W'(frac_off((k - 12) / 6)); oy = QMV_W'(frac_off((k - 12) % 6)); end
      v.x = base.x + ox;
      v.y = base.y + oy;
      c_sad[k+1] = acc_sad[k];
      c_vec[k+1] = v;
    end
  end

  sad_comparator_tree #(.N_IN(NA + 1), .SW(BSW), .VW(QW)) u_cmp (
    .clk(clk), .rst_n(rst_n), .in_valid(acc_done), .sad(c_sad), .vec(c_vec),
    .out_valid(res_valid), .best_sad(res_sad), .best_vec(best_vec));

  assign res_qmv = qmv_t'(best_vec);
endmodule
