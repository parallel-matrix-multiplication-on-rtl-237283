// cd_add_pe: adder processing element of levels 2 and 1 of the Centralized
// Diamond.
//
// In a step marked by en the PE adds the two values it receives from its
// children (two leaves for a level 2 PE, two level 2 PEs for a level 1 PE)
// and registers the sum for its parent to read in the next step. That the
// inner PEs are two-input adders is the document's; the sum being one bit
// wider than its inputs (so it cannot overflow) and the reset are this
// design's choices.
//
// Interface: signed inputs in0, in1 of IN_W bits, signed sum_out of IN_W+1
// bits, written at the clock edge when en is high. Latency one cycle.
module cd_add_pe #(
  parameter int IN_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] in0,
  input  logic signed [IN_W-1:0] in1,
  output logic signed [IN_W:0]   sum_out
);

  always_ff @(posedge clk) begin
    if (!rst_n)  sum_out <= '0;
    else if (en) sum_out <= in0 + in1;  // signed, extended to IN_W+1 bits
  end

endmodule
