// sad_comparator_tree: pipelined minimum of N_IN SADs with their payloads.
//
// The inputs are padded to the next power of two with all-ones SADs, then
// compared two by two in log2 levels of sad_comparator cells, with a register
// after every level. With in_valid high for one cycle, out_valid rises
// log2(N_IN) cycles later (4 cycles for 16 candidates, as the published architecture states,
// 6 for the 49 inputs of the fractional stage). Among equal SADs the lowest
// input index wins.
module sad_comparator_tree #(
  parameter int N_IN = 16,
  parameter int SW   = 14,
  parameter int VW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] sad [N_IN],
  input  logic [VW-1:0] vec [N_IN],
  output logic          out_valid,
  output logic [SW-1:0] best_sad,
  output logic [VW-1:0] best_vec
);
  localparam int LV = $clog2(N_IN);
  localparam int P  = 1 << LV;

  // Heap numbering: node 1 is the root, node n has children 2n and 2n+1,
  // nodes P..2P-1 are the (padded) inputs. Every internal node is a register.
  logic [SW-1:0] leaf_s [P];
  logic [VW-1:0] leaf_v [P];
  logic [SW-1:0] cmp_s  [1:P-1];
  logic [VW-1:0] cmp_v  [1:P-1];
  logic [SW-1:0] node_s [1:P-1];
  logic [VW-1:0] node_v [1:P-1];
  logic [LV-1:0] vld;

  always_comb
    for (int i = 0; i < P; i++) begin
      leaf_s[i] = (i < N_IN) ? sad[i] : '1;
      leaf_v[i] = (i < N_IN) ? vec[i] : '0;
    end

  for (genvar n = 1; n < P; n++) begin : g_node
    logic [SW-1:0] s0, s1;
    logic [VW-1:0] v0, v1;
    if (2 * n >= P) begin : g_from_leaf
      assign s0 = leaf_s[2*n-P];
      assign s1 = leaf_s[2*n+1-P];
      assign v0 = leaf_v[2*n-P];
      assign v1 = leaf_v[2*n+1-P];
    end else begin : g_from_node
      assign s0 = node_s[2*n];
      assign s1 = node_s[2*n+1];
      assign v0 = node_v[2*n];
      assign v1 = node_v[2*n+1];
    end
    sad_comparator #(.SW(SW), .VW(VW)) u_cmp (
      .sad0(s0), .sad1(s1), .vec0(v0), .vec1(v1),
      .best_sad(cmp_s[n]), .best_vec(cmp_v[n]));
  end

  always_ff @(posedge clk)
    for (int n = 1; n < P; n++) begin
      node_s[n] <= cmp_s[n];
      node_v[n] <= cmp_v[n];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LV-2:0], in_valid};

  assign out_valid = vld[LV-1];
  assign best_sad  = node_s[1];
  assign best_vec  = node_v[1];
endmodule
