// tb_cd_central_pe: self-checking testbench of the central (level 0) PE.
// Uses four inputs, as in the 29-PE diamond. Drives random and extreme
// signed partial sums, compares the registered result with their sum
// computed here, and checks that the result holds without the enable.
// Latency: one clock edge.
module tb_cd_central_pe;
  localparam int IN_W = 34;
  localparam int N_IN = 4;

  logic clk = 1'b0;
  logic rst_n, en;
  logic signed [IN_W-1:0]            in_vec [N_IN];
  logic signed [IN_W+$clog2(N_IN)-1:0] res_out;
  int checks = 0, failures = 0;

  cd_central_pe #(.IN_W(IN_W), .N_IN(N_IN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint exp, input string what);
    checks++;
    if (longint'(res_out) != exp) begin
      failures++;
      $display("FAIL %s: res_out=%0d expected %0d", what, res_out, exp);
    end
  endtask

  initial begin
    longint exp, last;
    rst_n = 1'b0; en = 1'b0;
    foreach (in_vec[i]) in_vec[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(0, "after reset");
    for (int k = 0; k < 500; k++) begin
      exp = 0;
      foreach (in_vec[i]) begin
        case (k % 5)
          0: in_vec[i] = {1'b0, {(IN_W-1){1'b1}}};   // largest positive
          1: in_vec[i] = {1'b1, {(IN_W-1){1'b0}}};   // most negative
          default: in_vec[i] = IN_W'({$urandom, $urandom});
        endcase
        exp += longint'(in_vec[i]);
      end
      en = 1'b1;
      @(posedge clk); #1;
      check(exp, "sum");
      last = exp;
      en = 1'b0;
      foreach (in_vec[i]) in_vec[i] = IN_W'($urandom);
      @(posedge clk); #1;
      check(last, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
