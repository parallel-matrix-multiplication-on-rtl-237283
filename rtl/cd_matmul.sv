// cd_matmul: matrix-vector multiplier on a Centralized Diamond array.
//
// Computes R = A x U for an m x n matrix A (m = num_rows, n = N_LEAVES) and a
// vector U of n elements, one element of R per clock cycle. The array has
// N = 7n/4 + 1 processing elements on four levels (29 PEs for n = 16):
//   level 3  n leaves, each holding one u_i and multiplying it by a_i,
//   level 2  n/2 adders, each adding two neighbouring leaves,
//   level 1  n/4 adders, each adding two level 2 adders,
//   level 0  one central PE adding all n/4 level 1 results.
// Levels 3..1 group into n/4 identical trees (cd_tree) joined at the central
// PE (cd_central_pe). The sequencer (cd_ctrl) broadcasts to each level when
// to compute, so the four levels work at once on four consecutive rows: m
// rows take m + 3 steps. All of that is the document's. Widths, the
// register at each PE output, the port protocol and the reset are this
// design's choices.
//
// Protocol: hold u_vec and num_rows while pulsing start in an idle cycle; U
// is stored at that clock edge. From the next cycle a_ready is high for
// num_rows consecutive cycles; in each of them the source must drive row
// a_row_idx of A on a_row (it is read at that clock edge, no back-pressure).
// The result for row r appears on res_data with res_valid high and
// res_row = r four cycles after the row was taken. done is high with the last
// result. n must be a multiple of four.
module cd_matmul #(
  parameter int N_LEAVES = 16,
  parameter int DATA_W   = 16,
  parameter int ROW_W    = 16,
  localparam int RES_W   = cd_pkg::res_w(DATA_W, N_LEAVES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [ROW_W-1:0]         num_rows,
  input  logic signed [DATA_W-1:0] u_vec [N_LEAVES],
  output logic                     a_ready,
  output logic [ROW_W-1:0]         a_row_idx,
  input  logic signed [DATA_W-1:0] a_row [N_LEAVES],
  output logic                     res_valid,
  output logic [ROW_W-1:0]         res_row,
  output logic signed [RES_W-1:0]  res_data,
  output logic                     busy,
  output logic                     done
);

  localparam int N_TREES = N_LEAVES / cd_pkg::LEAVES_PER_TREE;
  localparam int TREE_W  = cd_pkg::tree_w(DATA_W);

  if (N_LEAVES % 4 != 0 || N_LEAVES < 4) begin : g_bad_size
    $error("cd_matmul: N_LEAVES must be a positive multiple of 4");
  end

  logic load_u, en_mul, en_l2, en_l1, en_l0;
  logic signed [TREE_W-1:0] tree_sum [N_TREES];

  cd_ctrl #(.ROW_W(ROW_W)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .num_rows (num_rows),
    .busy     (busy),
    .load_u   (load_u),
    .en_mul   (en_mul),
    .row_idx  (a_row_idx),
    .en_l2    (en_l2),
    .en_l1    (en_l1),
    .en_l0    (en_l0),
    .res_valid(res_valid),
    .res_row  (res_row),
    .done     (done)
  );

  assign a_ready = en_mul;

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    logic signed [DATA_W-1:0] u_t [4];
    logic signed [DATA_W-1:0] a_t [4];
    for (genvar k = 0; k < 4; k++) begin : g_slice
      assign u_t[k] = u_vec[4*t+k];
      assign a_t[k] = a_row[4*t+k];
    end
    cd_tree #(.DATA_W(DATA_W)) u_tree (
      .clk    (clk),
      .rst_n  (rst_n),
      .load_u (load_u),
      .u_in   (u_t),
      .en_mul (en_mul),
      .en_l2  (en_l2),
      .en_l1  (en_l1),
      .a_in   (a_t),
      .sum_out(tree_sum[t])
    );
  end

  cd_central_pe #(.IN_W(TREE_W), .N_IN(N_TREES)) u_central (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en_l0),
    .in_vec (tree_sum),
    .res_out(res_data)
  );

endmodule
