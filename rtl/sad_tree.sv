// sad_tree: pipelined SAD of one line of N samples (current vs candidate).
//
// Stage 0 computes the N absolute differences with the approximate LOA
// operator and registers them. The following log2(N) levels add the values two
// by two with exact ripple-carry adders; every level but the last is followed by
// a pipeline register, so the line SAD appears log2(N) clock edges after the
// line is applied. A new line can be applied every cycle. No reset: the data
// registers are qualified by control flags carried alongside by the user.
// Structure and register placement follow the published SAD-tree diagram; the
// widths grow by one bit per level so no sum is truncated.
module sad_tree #(
  parameter int N   = 8,
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic                       clk,
  input  me_pkg::pix_t               cur [N],
  input  me_pkg::pix_t               ref_pix [N],
  output logic [me_pkg::line_sad_w(N)-1:0] sad
);
  localparam int LV = $clog2(N);
  localparam int SW = me_pkg::line_sad_w(N);

  me_pkg::pix_t   ad [N];
  logic [SW-1:0]  lvl [LV][N];   // lvl[l] holds the registered output of level l

  for (genvar i = 0; i < N; i++) begin : g_loa
    loa_absdiff #(.W(me_pkg::PIX_W), .LOW(LOW)) u_ad (.a(cur[i]), .b(ref_pix[i]), .d(ad[i]));
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) lvl[0][i] <= SW'(ad[i]);
    for (int l = 1; l < LV; l++)
      for (int i = 0; i < (N >> l); i++)
        lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
  end

  assign sad = lvl[LV-1][0] + lvl[LV-1][1];
endmodule
