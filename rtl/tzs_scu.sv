// tzs_scu: Search and Comparison Unit of the integer (TZS) stage.
//
// Sixteen candidate blocks are compared with the current block in parallel,
// one line per clock. Each candidate has its own sad_tree (approximate LOA
// first stage, log2(N) pipeline registers) and sad_accumulator; the flags that
// mark the first and last line of a group, and the candidates' tags, travel
// beside the tree in a shift register of the same depth. One clock after the
// last line has been accumulated the sixteen block SADs enter a 4-level
// sad_comparator_tree, whose output (smallest SAD and its tag) is valid 4
// clocks later. Line k of a group applied at cycle t thus reaches the
// accumulator at t + log2(N); the group result is valid at
// (cycle of the last line) + log2(N) + 5. Groups may follow back to back.
// The three steps (SAD trees, accumulators, comparator) follow the published architecture;
// the tag bus and the flag pipeline are this design's.
module tzs_scu #(
  parameter int N     = 8,
  parameter int NCAND = me_pkg::TZS_CANDS,
  parameter int VW    = $bits(me_pkg::tzs_tag_t),
  parameter int LOW   = me_pkg::LOA_LOW_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 line_valid,
  input  logic                 line_first,
  input  logic                 line_last,
  input  logic [VW-1:0]        line_tag  [NCAND],
  input  me_pkg::pix_t         cur_line  [N],
  input  me_pkg::pix_t         ref_line  [NCAND][N],
  output logic                 res_valid,
  output logic [me_pkg::blk_sad_w(N)-1:0] res_sad,
  output logic [VW-1:0]        res_tag
);
  localparam int LV  = $clog2(N);
  localparam int LSW = me_pkg::line_sad_w(N);
  localparam int BSW = me_pkg::blk_sad_w(N);

  logic [LSW-1:0] line_sad [NCAND];
  logic [BSW-1:0] blk_sad  [NCAND];

  // flags and tags delayed to line with the tree outputs
  logic [LV-1:0]   d_valid, d_first, d_last;
  logic [VW-1:0]   d_tag [LV][NCAND];
  logic [VW-1:0]   acc_tag [NCAND];
  logic            acc_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_valid  <= '0;
      d_first  <= '0;
      d_last   <= '0;
      acc_done <= 1'b0;
    end else begin
      d_valid  <= {d_valid[LV-2:0], line_valid};
      d_first  <= {d_first[LV-2:0], line_first};
      d_last   <= {d_last[LV-2:0],  line_last};
      acc_done <= d_valid[LV-1] & d_last[LV-1];
    end

  always_ff @(posedge clk) begin
    for (int c = 0; c < NCAND; c++) begin
      d_tag[0][c] <= line_tag[c];
      for (int l = 1; l < LV; l++) d_tag[l][c] <= d_tag[l-1][c];
      if (d_valid[LV-1] && d_last[LV-1]) acc_tag[c] <= d_tag[LV-1][c];
    end
  end

  for (genvar c = 0; c < NCAND; c++) begin : g_cand
    sad_tree #(.N(N), .LOW(LOW)) u_tree (
      .clk(clk), .cur(cur_line), .ref_pix(ref_line[c]), .sad(line_sad[c]));
    sad_accumulator #(.IW(LSW), .OW(BSW)) u_acc (
      .clk(clk), .en(d_valid[LV-1]), .first(d_first[LV-1]),
      .sad_in(line_sad[c]), .sad_out(blk_sad[c]));
  end

  sad_comparator_tree #(.N_IN(NCAND), .SW(BSW), .VW(VW)) u_cmp (
    .clk(clk), .rst_n(rst_n), .in_valid(acc_done),
    .sad(blk_sad), .vec(acc_tag),
    .out_valid(res_valid), .best_sad(res_sad), .best_vec(res_tag));
endmodule
