// cd_mul_pe: leaf (level 3) processing element of the Centralized Diamond.
//
// Each leaf keeps one element u_i of the vector U in a local register. U is
// placed in the leaves once, before the rows of A arrive (load_u). In every
// step the sequencer marks as a multiply step (en), the leaf multiplies its
// u_i by the element a_j of the current row of A and registers the product,
// which its level 2 parent reads in the next step. Storing U in the leaves and
// multiplying there is the document's scheme; the register at the output,
// the signed arithmetic and the synchronous active-low reset are this
// design's choices.
//
// Interface: load_u writes u_in into the U register at the clock edge; en
// writes u * a_in into prod_out at the clock edge. Latency one cycle.
module cd_mul_pe #(
  parameter int DATA_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load_u,
  input  logic signed [DATA_W-1:0]   u_in,
  input  logic                       en,
  input  logic signed [DATA_W-1:0]   a_in,
  output logic signed [2*DATA_W-1:0] prod_out
);

  logic signed [DATA_W-1:0] u_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_q      <= '0;
      prod_out <= '0;
    end else begin
      if (load_u) u_q <= u_in;
      if (en)     prod_out <= u_q * a_in;
    end
  end

endmodule
