// global_control: runs the six TZS+FME chains over one CTU and fills the table.
//
// Chains 0..3 are the 8x8 ones (16 PUs each, one 32x32 quadrant of the CTU),
// chains 4..5 the 16x16 ones (8 PUs each, one 64x32 half). On ctu_start every
// chain starts its TZS unit on its first PU. Whenever a TZS result is waiting
// and the chain's FME unit is free, the result is handed over (res_ready) and
// the FME started on that PU, and the TZS unit starts the next PU: integer and
// fractional search of consecutive PUs overlap. If the FME is still busy the
// TZS result waits (a stall, reported on tzs_stall). Every FME result is
// written to the SAD table at the PU's index. When all chains have finished,
// the table is released and ctu_busy falls once it has been read out.
// The published architecture names a global control that copies FME results into the table
// and releases it when all modules finish; everything else is this design's.
module global_control #(
  parameter int NCH   = me_pkg::N_MOD8 + me_pkg::N_MOD16,
  parameter int N8CH  = me_pkg::N_MOD8,
  parameter int PU8   = 16,
  parameter int PU16  = 8,
  parameter int NE    = N8CH * PU8 + (NCH - N8CH) * PU16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ctu_start,
  output logic                  ctu_busy,
  // per chain
  output logic                  tzs_start     [NCH],
  input  logic                  tzs_busy      [NCH],
  output logic [4:0]            tzs_pu        [NCH],
  input  logic                  tzs_res_valid [NCH],
  output logic                  tzs_res_ready [NCH],
  output logic                  fme_start     [NCH],
  input  logic                  fme_busy      [NCH],
  output logic [4:0]            fme_pu        [NCH],
  input  logic                  fme_res_valid [NCH],
  output logic                  fme_res_ready [NCH],
  output logic                  tzs_stall     [NCH],
  // table
  output logic                  tbl_wr        [NCH],
  output logic [$clog2(NE)-1:0] tbl_idx       [NCH],
  output logic                  tbl_release,
  input  logic                  tbl_busy
);
  typedef enum logic [1:0] {G_IDLE, G_RUN, G_RELEASE, G_DRAIN} gstate_t;
  gstate_t    gst;
  logic [4:0] started [NCH];
  logic [4:0] done    [NCH];
  logic       all_done;

  function automatic int n_pu(int ch);
    return (ch < N8CH) ? PU8 : PU16;
  endfunction
  function automatic int tbl_base(int ch);
    return (ch < N8CH) ? ch * PU8 : N8CH * PU8 + (ch - N8CH) * PU16;
  endfunction

  always_comb begin
    all_done = 1'b1;
    for (int ch = 0; ch < NCH; ch++) begin
      tzs_start[ch]     = (gst == G_RUN) && !tzs_busy[ch] && (32'(started[ch]) < n_pu(ch));
      fme_start[ch]     = tzs_res_valid[ch] && !fme_busy[ch];
      tzs_res_ready[ch] = fme_start[ch];
      tzs_stall[ch]     = tzs_res_valid[ch] && fme_busy[ch];
      fme_res_ready[ch] = 1'b1;
      tbl_wr[ch]        = fme_res_valid[ch];
      tbl_idx[ch]       = $clog2(NE)'(tbl_base(ch) + 32'(fme_pu[ch]));
      if (32'(done[ch]) != n_pu(ch)) all_done = 1'b0;
    end
  end

  assign tbl_release = (gst == G_RELEASE);
  assign ctu_busy    = (gst != G_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      gst <= G_IDLE;
      for (int ch = 0; ch < NCH; ch++) begin
        started[ch] <= '0;
        done[ch]    <= '0;
        tzs_pu[ch]  <= '0;
        fme_pu[ch]  <= '0;
      end
    end else begin
      case (gst)
        G_IDLE:    if (ctu_start) begin
          gst <= G_RUN;
          for (int ch = 0; ch < NCH; ch++) begin
            started[ch] <= '0;
            done[ch]    <= '0;
          end
        end
        G_RUN:     if (all_done) gst <= G_RELEASE;
        G_RELEASE: gst <= G_DRAIN;
        G_DRAIN:   if (!tbl_busy) gst <= G_IDLE;
        default:   gst <= G_IDLE;
      endcase
      if (gst == G_RUN)
        for (int ch = 0; ch < NCH; ch++) begin
          if (tzs_start[ch]) begin
            started[ch] <= started[ch] + 5'd1;
            tzs_pu[ch]  <= started[ch];
          end
          if (fme_start[ch]) fme_pu[ch] <= tzs_pu[ch];
          if (fme_res_valid[ch]) done[ch] <= done[ch] + 5'd1;
        end
    end
endmodule
