// tb_cd_ctrl: self-checking testbench of the SIMD sequencer.
// Runs operations of 0, 1, 2, 3 and random numbers of rows, some started the
// cycle after the previous one finished. For every cycle it compares every
// output with a schedule worked out here from the start cycle t and the row
// count m: load_u in cycle t; en_mul in cycles t+1 .. t+m with row_idx 0 ..
// m-1; en_l2, en_l1 and en_l0 one, two and three cycles later; res_valid
// with res_row four cycles later; done in cycle t+m+4 (t+1 when m = 0). So
// the m rows need m + 3 compute steps. A start while busy must be ignored.
module tb_cd_ctrl;
  localparam int ROW_W = 8;

  logic clk = 1'b0;
  logic rst_n, start;
  logic [ROW_W-1:0] num_rows;
  logic busy, load_u, en_mul, en_l2, en_l1, en_l0, res_valid, done;
  logic [ROW_W-1:0] row_idx, res_row;
  int checks = 0, failures = 0;

  cd_ctrl #(.ROW_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what, input int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d: %s=%0b expected %0b", c, what, got, exp);
    end
  endtask

  // One operation of m rows; start is raised in relative cycle 0. When
  // poke_busy is set a second start with another count is raised mid-run.
  task automatic run_op(input int m, input bit poke_busy);
    int last;
    bit in_mul, in_l2, in_l1, in_l0, in_res;
    last = (m == 0) ? 1 : m + 4;
    for (int c = 0; c <= last; c++) begin
      start    = (c == 0) || (poke_busy && c == 2);
      num_rows = (c == 0) ? ROW_W'(m) : ROW_W'(m + 7);
      #1;  // outputs settle after the inputs change
      in_mul = (c >= 1) && (c <= m);
      in_l2  = (c >= 2) && (c <= m + 1);
      in_l1  = (c >= 3) && (c <= m + 2);
      in_l0  = (c >= 4) && (c <= m + 3);
      in_res = (c >= 5) && (c <= m + 4);
      expect_bit(load_u, c == 0, "load_u", c);
      expect_bit(busy, c >= 1, "busy", c);
      expect_bit(en_mul, in_mul, "en_mul", c);
      expect_bit(en_l2, in_l2, "en_l2", c);
      expect_bit(en_l1, in_l1, "en_l1", c);
      expect_bit(en_l0, in_l0, "en_l0", c);
      expect_bit(res_valid, in_res, "res_valid", c);
      expect_bit(done, c == last, "done", c);
      if (in_mul) begin
        checks++;
        if (row_idx != ROW_W'(c - 1)) begin
          failures++; $display("FAIL cycle %0d: row_idx=%0d", c, row_idx);
        end
      end
      if (in_res) begin
        checks++;
        if (res_row != ROW_W'(c - 5)) begin
          failures++; $display("FAIL cycle %0d: res_row=%0d", c, res_row);
        end
      end
      @(posedge clk); #1;
    end
    start = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; num_rows = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (busy || done || en_mul) begin failures++; $display("FAIL not idle after reset"); end
    run_op(3, 1'b0);
    run_op(1, 1'b0);
    @(posedge clk); #1;
    run_op(0, 1'b0);
    run_op(2, 1'b1);
    for (int k = 0; k < 30; k++) begin
      run_op(int'($urandom_range(1, 40)), k[0]);
      repeat (k % 3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
