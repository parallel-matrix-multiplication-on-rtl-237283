// tb_cd_matmul_example: the 15-PE worked example (n = 8 leaves: 8
// multipliers, 6 adders in levels 2 and 1, one central PE adding two values).
//   U = [1 3 7 20 15 8 11 3]
//   A = [ 6 7 13  8 10 3 5 2
//         4 6  8  6  3 7 7 5
//        10 1  5  2  7 4 2 3 ]
// A x U must come out as [513 391 256], one row per cycle, the first result
// four cycles after the first row entered and the last with done, 3 + 3 = 6
// steps after the first row.
module tb_cd_matmul_example;
  import cd_pkg::*;
  localparam int N      = 8;
  localparam int DATA_W = 16;
  localparam int ROW_W  = 16;
  localparam int RES_W  = res_w(DATA_W, N);

  logic clk = 1'b0;
  logic rst_n, start;
  logic [ROW_W-1:0] num_rows;
  logic signed [DATA_W-1:0] u_vec [N];
  logic a_ready;
  logic [ROW_W-1:0] a_row_idx;
  logic signed [DATA_W-1:0] a_row [N];
  logic res_valid, busy, done;
  logic [ROW_W-1:0] res_row;
  logic signed [RES_W-1:0] res_data;
  int checks = 0, failures = 0;

  cd_matmul #(.N_LEAVES(N), .DATA_W(DATA_W), .ROW_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  const int U_EX [N] = '{1, 3, 7, 20, 15, 8, 11, 3};
  const int A_EX [3][N] = '{'{ 6, 7, 13, 8, 10, 3, 5, 2},
                            '{ 4, 6,  8, 6,  3, 7, 7, 5},
                            '{10, 1,  5, 2,  7, 4, 2, 3}};
  const int R_EX [3] = '{513, 391, 256};

  always_comb begin
    for (int j = 0; j < N; j++) a_row[j] = DATA_W'(A_EX[int'(a_row_idx) % 3][j]);
  end

  int cyc = 0, first_take = -1, n_res = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && a_ready && first_take < 0) first_take = cyc;
    if (rst_n && res_valid) begin
      $display("row %0d of A x U = %0d", res_row, res_data);
      checks++;
      if (int'(res_row) > 2 || res_data != RES_W'(R_EX[int'(res_row) % 3])) begin
        failures++; $display("FAIL row %0d: got %0d", res_row, res_data);
      end
      checks++;
      if (cyc - first_take != 4 + n_res || int'(res_row) != n_res) begin
        failures++; $display("FAIL row %0d at step %0d", res_row, cyc - first_take);
      end
      n_res++;
    end
    if (rst_n && done) begin
      checks++;
      if (cyc - first_take != 6 || n_res != 3) begin
        failures++; $display("FAIL done at step %0d after %0d results", cyc - first_take, n_res);
      end
    end
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; num_rows = '0;
    for (int j = 0; j < N; j++) u_vec[j] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int j = 0; j < N; j++) u_vec[j] = DATA_W'(U_EX[j]);
    num_rows = 3; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    repeat (3) @(posedge clk);
    checks++;
    if (n_res != 3) begin failures++; $display("FAIL %0d results", n_res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
