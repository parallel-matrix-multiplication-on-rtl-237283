// tb_cd_mul_pe: self-checking testbench of the leaf multiplier PE.
// Loads random values of u, applies random row elements with and without the
// multiply enable, and compares the registered product with u * a computed
// here. Also checks that the product holds when en is low and that u holds
// when load_u is low. Latency checked: the product is visible one clock edge
// after the step in which en was high.
module tb_cd_mul_pe;
  localparam int DATA_W = 16;

  logic clk = 1'b0;
  logic rst_n, load_u, en;
  logic signed [DATA_W-1:0]   u_in, a_in;
  logic signed [2*DATA_W-1:0] prod_out;
  int checks = 0, failures = 0;

  cd_mul_pe #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [2*DATA_W-1:0] exp, input string what);
    checks++;
    if (prod_out !== exp) begin
      failures++;
      $display("FAIL %s: prod_out=%0d expected %0d", what, prod_out, exp);
    end
  endtask

  initial begin
    logic signed [DATA_W-1:0]   u_ref, a_v;
    logic signed [2*DATA_W-1:0] exp, last;
    rst_n = 1'b0; load_u = 1'b0; en = 1'b0; u_in = '0; a_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check('0, "after reset");
    for (int k = 0; k < 200; k++) begin
      // load a new u (corner values now and then)
      u_ref = (k % 17 == 0) ? -16'sd32768 : (k % 13 == 0) ? 16'sd32767 : DATA_W'($urandom);
      u_in = u_ref; load_u = 1'b1; en = 1'b0;
      @(posedge clk); #1;
      load_u = 1'b0; u_in = DATA_W'($urandom);  // must be ignored
      for (int r = 0; r < 4; r++) begin
        a_v  = (r == 3 && k % 5 == 0) ? -16'sd32768 : DATA_W'($urandom);
        a_in = a_v; en = 1'b1;
        exp  = (2*DATA_W)'(signed'(u_ref) * signed'(a_v));
        @(posedge clk); #1;
        check(exp, "product");
        last = exp;
        // step without enable: product must hold
        en = 1'b0; a_in = DATA_W'($urandom);
        @(posedge clk); #1;
        check(last, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
