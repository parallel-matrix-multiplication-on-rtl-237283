// cd_central_pe: level 0 processing element in the middle of the
// Centralized Diamond.
//
// The central PE is linked to every level 1 PE. In a step marked by en it
// adds the partial sums of the n/4 trees of the diamond and registers the
// total, one element of the product A x U. That level 0 is one PE that adds
// what the level 1 PEs send, in one step, is the document's (in its 15-PE
// example the central PE adds two values; in the 29-PE diamond it is linked
// to four level 1 PEs). The adder being a plain N_IN-input sum, the result
// width (wide enough not to overflow) and the reset are this design's
// choices.
//
// Interface: N_IN signed inputs of IN_W bits, signed res_out of
// IN_W + clog2(N_IN) bits, written at the clock edge when en is high.
// Latency one cycle.
module cd_central_pe #(
  parameter int IN_W = 34,
  parameter int N_IN = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 en,
  input  logic signed [IN_W-1:0]               in_vec [N_IN],
  output logic signed [IN_W+$clog2(N_IN)-1:0]  res_out
);

  localparam int OUT_W = IN_W + $clog2(N_IN);

  logic signed [OUT_W-1:0] total;

  always_comb begin
    total = '0;
    for (int k = 0; k < N_IN; k++) total = total + OUT_W'(in_vec[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  res_out <= '0;
    else if (en) res_out <= total;
  end

endmodule
