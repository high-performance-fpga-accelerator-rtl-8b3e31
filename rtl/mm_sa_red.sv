// mm_sa_red: reduction-path delay element for the columns where p[j] is all ones.
//
// For those columns the reduction term Cr + m*p[j] equals (m, 0): it adds nothing to the
// result word and its carry stays m. The block therefore holds only a register that moves the
// quotient m one column (one cycle) further, so that it reaches the first full reduction
// column (sB-Red0) in step with the multiplication path. Latency: one cycle.
module mm_sa_red #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic [W-1:0] m_i,
  output logic [W-1:0] m_o
);
  always_ff @(posedge clk) m_o <= m_i;
endmodule
