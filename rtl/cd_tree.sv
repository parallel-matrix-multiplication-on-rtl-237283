// cd_tree: one of the trees the Centralized Diamond is built from.
//
// The diamond of N = 7n/4 + 1 PEs is n/4 such trees joined at the central
// PE. One tree has four multiplier leaves (level 3), two adders (level 2),
// each fed by two neighbouring leaves, and one adder (level 1) fed by both
// level 2 adders. It forms the partial dot product
//   sum_out = u0*a0 + u1*a1 + u2*a2 + u3*a3
// of four consecutive elements of a row of A with the matching elements of U.
// The levels form a pipeline: with en_mul, en_l2 and en_l1 asserted in
// consecutive steps for one row, the sum of that row appears three clock
// edges after its elements entered, and a new row can enter every step. The
// tree structure and the pairing of neighbouring leaves are the document's;
// widths and enables are this design's choices.
//
// Interface: load_u writes u_in[0..3] into the leaves; a_in[0..3] are the
// row elements for this tree, read when en_mul is high.
module cd_tree #(
  parameter int DATA_W = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load_u,
  input  logic signed [DATA_W-1:0]     u_in [4],
  input  logic                         en_mul,
  input  logic                         en_l2,
  input  logic                         en_l1,
  input  logic signed [DATA_W-1:0]     a_in [4],
  output logic signed [2*DATA_W+1:0]   sum_out
);

  localparam int PW = 2 * DATA_W;

  logic signed [PW-1:0] prod [4];
  logic signed [PW:0]   l2_sum [2];

  for (genvar i = 0; i < 4; i++) begin : g_leaf
    cd_mul_pe #(.DATA_W(DATA_W)) u_leaf (
      .clk     (clk),
      .rst_n   (rst_n),
      .load_u  (load_u),
      .u_in    (u_in[i]),
      .en      (en_mul),
      .a_in    (a_in[i]),
      .prod_out(prod[i])
    );
  end

  for (genvar j = 0; j < 2; j++) begin : g_l2
    cd_add_pe #(.IN_W(PW)) u_l2 (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en_l2),
      .in0    (prod[2*j]),
      .in1    (prod[2*j+1]),
      .sum_out(l2_sum[j])
    );
  end

  cd_add_pe #(.IN_W(PW+1)) u_l1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en_l1),
    .in0    (l2_sum[0]),
    .in1    (l2_sum[1]),
    .sum_out(sum_out)
  );

endmodule
