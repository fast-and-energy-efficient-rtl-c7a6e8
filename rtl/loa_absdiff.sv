// loa_absdiff: approximate absolute difference |a - b| built on the LOA adder.
//
// The difference is formed as a + ~b with a lower-part-OR adder. The carry out
// tells the sign: when it is 1, a > b and a - b = sum + 1; when it is 0,
// b - a = ~sum. The approximate sum can be all ones with a carry out, in which
// case the result saturates at the largest value. An exact LOA (LOW = 0) therefore gives the exact |a - b|; with
// LOW = 5 the five low bits are approximated. This is the first-stage operator
// of every SAD tree, the only place the approximate adder is used.
// How the subtraction and the absolute value wrap the LOA is this design's
// choice; the published architecture only says the LOA performs the first-stage subtraction.
module loa_absdiff #(
  parameter int W   = 8,
  parameter int LOW = me_pkg::LOA_LOW_BITS
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d
);
  logic [W-1:0] sum;
  logic         cout;

  loa_adder #(.W(W), .LOW(LOW)) u_loa (.a(a), .b(~b), .s(sum), .cout(cout));

  // the approximate sum can reach all ones with a carry out: saturate there
  always_comb d = cout ? ((&sum) ? sum : sum + W'(1)) : ~sum;
endmodule
