// mm_pe_initial: first processing element (column 0) of the Montgomery multiplier.
//
// Each cycle it computes (C, S) = T[0] + a[i]*b[0]. Because the lowest word of a SIKE prime is
// all ones, the Montgomery quotient is simply m = S, and adding m*p[0] to S yields (m, 0): the
// low result word is always zero and the reduction carry equals m. So the block forwards the
// multiplication carry C along the multiplication path and m down the reduction path, keeping
// the two carries separate. The operand word a[i] is registered and passed on.
// 'start' marks the first iteration of a product: the adder then takes 0 instead of T[0]
// (an operand select that replaces a reset of the result register). All outputs are
// registered: one cycle latency.
module mm_pe_initial #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] t_i,
  input  logic         start,
  output logic [W-1:0] a_o,
  output logic [W-1:0] c_o,
  output logic [W-1:0] m_o
);
  logic [2*W-1:0] sum;

  logic [W-1:0] t_eff;

  assign t_eff = start ? '0 : t_i;

  always_comb sum = {{W{1'b0}}, t_eff} + a_i * b_i;

  always_ff @(posedge clk) begin
    a_o <= a_i;
    c_o <= sum[2*W-1:W];
    m_o <= sum[W-1:0];
  end
endmodule
