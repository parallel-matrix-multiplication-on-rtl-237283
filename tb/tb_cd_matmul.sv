// tb_cd_matmul: end-to-end self-checking testbench of the Centralized Diamond
// matrix-vector multiplier at its default size (n = 16 leaves, 29 PEs).
// Runs a series of operations R = A x U with random and extreme signed data
// and row counts from 0 to 40, some started in the cycle after the previous
// one ended. A source model answers a_ready by driving row a_row_idx of A.
// Every result is compared with a dot product computed here, and the timing
// is checked: each result four cycles after its row was taken, and the m
// rows done m + 3 steps after the first row entered. The testbench counts
// how often each mechanism of the design occurred: U placed in the leaves,
// all four levels computing in one step on four different rows, drain steps
// with no new row, an operation with no rows, and back-to-back operations.
// A mechanism that never occurred counts as a failure. The first operation
// is the 8-element worked example, zero-padded, whose result is [513 391 256].
module tb_cd_matmul;
  import cd_pkg::*;
  localparam int N      = 16;
  localparam int DATA_W = 16;
  localparam int ROW_W  = 16;
  localparam int RES_W  = res_w(DATA_W, N);
  localparam int MAX_M  = 40;

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

  cd_matmul dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Worked example of the 15-PE diamond and its printed result.
  const int U_EX [8] = '{1, 3, 7, 20, 15, 8, 11, 3};
  const int A_EX [3][8] = '{'{ 6, 7, 13, 8, 10, 3, 5, 2},
                            '{ 4, 6,  8, 6,  3, 7, 7, 5},
                            '{10, 1,  5, 2,  7, 4, 2, 3}};
  const int R_EX [3] = '{513, 391, 256};

  // Matrix A of the current operation and the expected results.
  logic signed [DATA_W-1:0] mat_a [MAX_M][N];
  longint exp_r [MAX_M];
  int cur_m;

  // Source of A: drives the requested row whenever it is asked for.
  always_comb begin
    for (int j = 0; j < N; j++) a_row[j] = mat_a[int'(a_row_idx) < MAX_M ? int'(a_row_idx) : 0][j];
  end

  // Mechanism counters.
  int n_load_u = 0, n_all_levels = 0, n_drain = 0, n_empty_op = 0, n_back_to_back = 0;
  int cyc = 0, take_cyc [MAX_M], first_take, n_res;
  logic [2:0] taken_q = '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // Seen from the ports: a row is at level 2, 1 and 0 one, two and
      // three steps after a_ready took it.
      taken_q <= {taken_q[1:0], a_ready};
      if (start && !busy) n_load_u++;
      if (a_ready && (&taken_q)) n_all_levels++;
      if (!a_ready && (|taken_q)) n_drain++;
      if (a_ready) take_cyc[int'(a_row_idx)] = cyc;
      if (res_valid) begin
        n_res++;
        checks++;
        if (int'(res_row) >= cur_m) begin
          failures++; $display("FAIL result for row %0d of %0d", res_row, cur_m);
        end else begin
          if (longint'(res_data) != exp_r[int'(res_row)]) begin
            failures++;
            $display("FAIL row %0d: res_data=%0d expected %0d", res_row, res_data, exp_r[int'(res_row)]);
          end
          checks++;
          if (cyc - take_cyc[int'(res_row)] != 4) begin
            failures++;
            $display("FAIL row %0d: latency %0d cycles, expected 4", res_row, cyc - take_cyc[int'(res_row)]);
          end
        end
      end
    end
  end

  task automatic run_op(input int m, input int mode, input bit back_to_back);
    longint u_ref [N];
    int t_start;
    for (int j = 0; j < N; j++) begin
      if (mode == 3) begin
        // the 8-element worked example, zero-padded to N elements
        u_vec[j] = (j < 8) ? DATA_W'(U_EX[j]) : '0;
        u_ref[j] = longint'(u_vec[j]);
        continue;
      end
      u_vec[j] = (mode == 1) ? -16'sd32768 : (mode == 2) ? 16'sd32767 : DATA_W'($urandom);
      u_ref[j] = longint'(u_vec[j]);
    end
    for (int r = 0; r < m; r++) begin
      exp_r[r] = 0;
      if (mode == 3) begin
        for (int j = 0; j < N; j++) mat_a[r][j] = (j < 8) ? DATA_W'(A_EX[r][j]) : '0;
        exp_r[r] = longint'(R_EX[r]);
        continue;
      end
      for (int j = 0; j < N; j++) begin
        mat_a[r][j] = (mode == 1) ? -16'sd32768 : (mode == 2) ? -16'sd32768 : DATA_W'($urandom);
        exp_r[r] += u_ref[j] * longint'(mat_a[r][j]);
      end
    end
    cur_m = m;
    n_res = 0;
    if (back_to_back) n_back_to_back++;
    if (m == 0) n_empty_op++;
    start = 1'b1; num_rows = ROW_W'(m);
    t_start = cyc;
    @(posedge clk); #1;
    start = 1'b0;
    for (int j = 0; j < N; j++) u_vec[j] = DATA_W'($urandom);  // U must have been stored
    first_take = cyc;
    while (!done) begin @(posedge clk); #1; end
    // done is high with the last result: m + 3 steps after the first row.
    checks++;
    if (m > 0 && cyc - first_take != m + 3) begin
      failures++;
      $display("FAIL m=%0d: done %0d steps after first row, expected %0d", m, cyc - first_take, m + 3);
    end
    @(posedge clk); #1;
    checks++;
    if (n_res != m) begin
      failures++; $display("FAIL m=%0d: %0d results", m, n_res);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; num_rows = '0;
    for (int j = 0; j < N; j++) u_vec[j] = '0;
    for (int r = 0; r < MAX_M; r++) for (int j = 0; j < N; j++) mat_a[r][j] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run_op(3, 3, 1'b0);
    run_op(3, 0, 1'b1);
    run_op(1, 1, 1'b1);
    run_op(5, 2, 1'b1);
    run_op(0, 0, 1'b1);
    for (int k = 0; k < 20; k++) begin
      if (k % 2 == 1) begin repeat (k % 5) @(posedge clk); #1; end
      run_op(int'($urandom_range(1, MAX_M)), 0, k % 2 == 0);
    end
    checks++; if (n_load_u == 0)       begin failures++; $display("FAIL U never loaded"); end
    checks++; if (n_all_levels == 0)   begin failures++; $display("FAIL four levels never busy together"); end
    checks++; if (n_drain == 0)        begin failures++; $display("FAIL no drain step"); end
    checks++; if (n_empty_op == 0)     begin failures++; $display("FAIL no empty operation"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back operation"); end
    $display("mechanisms: U loads=%0d all-four-levels steps=%0d drain steps=%0d empty ops=%0d back-to-back ops=%0d",
             n_load_u, n_all_levels, n_drain, n_empty_op, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
