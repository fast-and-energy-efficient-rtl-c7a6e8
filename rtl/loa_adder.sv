// loa_adder: Lower-part-OR approximate adder.
//
// The W-bit sum is split in two. The LOW least significant bits are not added:
// each sum bit is the OR of the two operand bits, so no carry ripples there.
// The upper W-LOW bits go through an exact ripple-carry addition whose carry in
// is the AND of the two operand bits at position LOW-1, which recovers the most
// likely carry out of the imprecise part. The carry out of the exact part is
// returned as cout. Purely combinational.
// The split (3 exact, 5 imprecise bits for 8-bit operands) and the AND-generated
// carry follow the published LOA structure; LOW = 0 gives an exact adder.
module loa_adder #(
  parameter int W   = 8,
  parameter int LOW = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  if (LOW == 0) begin : g_exact
    assign {cout, s} = {1'b0, a} + {1'b0, b};
  end else begin : g_loa
    logic cin;
    assign cin          = a[LOW-1] & b[LOW-1];
    assign s[LOW-1:0]   = a[LOW-1:0] | b[LOW-1:0];
    assign {cout, s[W-1:LOW]} = {1'b0, a[W-1:LOW]} + {1'b0, b[W-1:LOW]} + (W-LOW+1)'(cin);
  end
endmodule
