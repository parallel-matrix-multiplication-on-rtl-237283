// tb_cd_tree: self-checking testbench of one tree of the diamond (four
// multiplier leaves, two level 2 adders, one level 1 adder).
// Loads a random U slice, then streams random rows back to back, raising
// en_mul, en_l2 and en_l1 for each row in three consecutive steps as the
// sequencer does, so three rows are in flight at once. Each row's sum must
// appear exactly three clock edges after the row entered and must equal
// u0*a0 + u1*a1 + u2*a2 + u3*a3 computed here. A pause with no rows checks
// that the sum holds.
module tb_cd_tree;
  localparam int DATA_W = 16;
  localparam int ROWS   = 300;

  logic clk = 1'b0;
  logic rst_n, load_u, en_mul, en_l2, en_l1;
  logic signed [DATA_W-1:0]   u_in [4];
  logic signed [DATA_W-1:0]   a_in [4];
  logic signed [2*DATA_W+1:0] sum_out;
  int checks = 0, failures = 0;

  cd_tree #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];

  initial begin
    longint u_ref [4];
    longint e;
    int issued;
    rst_n = 1'b0; load_u = 1'b0; en_mul = 1'b0; en_l2 = 1'b0; en_l1 = 1'b0;
    foreach (u_in[i]) begin u_in[i] = '0; a_in[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      foreach (u_in[i]) begin
        u_in[i]  = (pass == 2) ? -16'sd32768 : DATA_W'($urandom);
        u_ref[i] = longint'(u_in[i]);
      end
      load_u = 1'b1;
      @(posedge clk); #1;
      load_u = 1'b0;
      issued = 0;
      // ROWS rows, then three drain steps
      for (int step = 0; step < ROWS + 3; step++) begin
        en_l1 = en_l2;
        en_l2 = en_mul;
        en_mul = (step < ROWS);
        if (en_mul) begin
          e = 0;
          foreach (a_in[i]) begin
            a_in[i] = (pass == 2) ? -16'sd32768 : DATA_W'($urandom);
            e += u_ref[i] * longint'(a_in[i]);
          end
          exp_q.push_back(e);
        end
        @(posedge clk); #1;
        if (en_l1) begin
          // the row that entered three steps ago is now at the output
          checks++;
          e = exp_q.pop_front();
          if (longint'(sum_out) != e) begin
            failures++;
            $display("FAIL pass %0d step %0d: sum_out=%0d expected %0d", pass, step, sum_out, e);
          end
        end
      end
      en_mul = 1'b0; en_l2 = 1'b0; en_l1 = 1'b0;
      e = longint'(sum_out);
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (longint'(sum_out) != e || exp_q.size() != 0) begin
        failures++;
        $display("FAIL hold/drain: sum_out=%0d expected %0d, %0d rows left", sum_out, e, exp_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
