// sad_table: holds the best SAD and quarter-sample vector of every PU of a CTU.
//
// Each of the NW write ports stores one result per cycle at the PU's index
// (64 8x8 PUs at 0..63, then 16 16x16 PUs at 64..79 for a 64x64 CTU).
// Nothing leaves the table until release is pulsed, which the global control
// does once every module has finished the CTU. The entries are then streamed
// out in index order on out_valid/out_ready, one per accepted cycle, and the
// table empties itself for the next CTU; busy is high from the first write
// until the last entry has left. Writing during the read-out is not allowed.
// The published architecture gives the table's purpose and release rule; the streaming
// read-out is this design's. A lint tool reports rst_n as used both
// asynchronously and synchronously: the synchronous use is only the
// disable-iff of the no-write-during-read-out assertion, not a circuit path.
module sad_table #(
  parameter int NE = 80,
  parameter int NW = me_pkg::N_MOD8 + me_pkg::N_MOD16,
  parameter int SW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_valid [NW],
  input  logic [$clog2(NE)-1:0] wr_idx   [NW],
  input  logic [SW-1:0]         wr_sad   [NW],
  input  me_pkg::qmv_t          wr_qmv   [NW],
  input  logic                  release_tbl,
  output logic                  busy,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [$clog2(NE)-1:0] out_idx,
  output logic [SW-1:0]         out_sad,
  output me_pkg::qmv_t          out_qmv
);
  localparam int AW = $clog2(NE);

  logic [SW-1:0]  sad_mem [NE];
  me_pkg::qmv_t   qmv_mem [NE];
  logic [NE-1:0]  filled;
  logic           reading;
  logic [AW-1:0]  rd_ptr;

  always_ff @(posedge clk)
    for (int w = 0; w < NW; w++)
      if (wr_valid[w]) begin
        sad_mem[wr_idx[w]] <= wr_sad[w];
        qmv_mem[wr_idx[w]] <= wr_qmv[w];
      end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      filled  <= '0;
      reading <= 1'b0;
      rd_ptr  <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (wr_valid[w]) filled[wr_idx[w]] <= 1'b1;
      if (release_tbl && !reading) begin
        reading <= 1'b1;
        rd_ptr  <= '0;
      end else if (reading && out_ready) begin
        filled[rd_ptr] <= 1'b0;
        if (rd_ptr == AW'(NE - 1)) reading <= 1'b0;
        else rd_ptr <= rd_ptr + 1'b1;
      end
    end

  assign busy      = reading || (|filled);
  assign out_valid = reading;
  assign out_idx   = rd_ptr;
  assign out_sad   = sad_mem[rd_ptr];
  assign out_qmv   = qmv_mem[rd_ptr];

  // a result may only be written while the table is collecting
  property p_no_write_on_read;
    @(posedge clk) disable iff (!rst_n) reading |-> !wr_valid[0];
  endproperty
  a_no_write_on_read: assert property (p_no_write_on_read);
endmodule
