// sad_comparator: picks the smaller of two SADs and the payload that goes with it.
//
// A subtractor one bit wider than the SADs forms sad1 - sad0; its most
// significant bit is set exactly when sad1 < sad0 and then selects sad1 and
// vec1, otherwise sad0 and vec0 (ties keep input 0). Combinational.
// The subtractor-MSB-drives-two-multiplexers structure follows the published
// comparator diagram; the subtraction order and tie rule are this design's.
module sad_comparator #(
  parameter int SW = 14,
  parameter int VW = 16
) (
  input  logic [SW-1:0] sad0,
  input  logic [SW-1:0] sad1,
  input  logic [VW-1:0] vec0,
  input  logic [VW-1:0] vec1,
  output logic [SW-1:0] best_sad,
  output logic [VW-1:0] best_vec
);
  logic [SW:0] diff;
  always_comb begin
    diff     = {1'b0, sad1} - {1'b0, sad0};
    best_sad = diff[SW] ? sad1 : sad0;
    best_vec = diff[SW] ? vec1 : vec0;
  end
endmodule
