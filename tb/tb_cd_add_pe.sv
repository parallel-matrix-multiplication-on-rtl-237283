// tb_cd_add_pe: self-checking testbench of the two-input adder PE.
// Drives random and extreme signed inputs, compares the registered sum with
// in0 + in1 computed here at full width (so a lost carry or sign is caught),
// and checks that the sum holds in steps without the enable. Latency: one
// clock edge.
module tb_cd_add_pe;
  localparam int IN_W = 32;

  logic clk = 1'b0;
  logic rst_n, en;
  logic signed [IN_W-1:0] in0, in1;
  logic signed [IN_W:0]   sum_out;
  int checks = 0, failures = 0;

  cd_add_pe #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint exp, input string what);
    checks++;
    if (longint'(sum_out) != exp) begin
      failures++;
      $display("FAIL %s: sum_out=%0d expected %0d", what, sum_out, exp);
    end
  endtask

  initial begin
    longint exp, last;
    rst_n = 1'b0; en = 1'b0; in0 = '0; in1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(0, "after reset");
    for (int k = 0; k < 500; k++) begin
      case (k % 7)
        0: begin in0 = 32'sh7fffffff; in1 = 32'sh7fffffff; end
        1: begin in0 = -32'sh80000000; in1 = -32'sh80000000; end
        default: begin in0 = $urandom; in1 = $urandom; end
      endcase
      en  = 1'b1;
      exp = longint'(in0) + longint'(in1);
      @(posedge clk); #1;
      check(exp, "sum");
      last = exp;
      en = 1'b0; in0 = $urandom; in1 = $urandom;
      @(posedge clk); #1;
      check(last, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
