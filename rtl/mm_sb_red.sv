// mm_sb_red: reduction element for a column j > sA.
//
// Computes U[j] = m*p[j] one cycle ahead of the sB-Mult element of the same column and passes
// the quotient m to the next column. Latency: one cycle.
module mm_sb_red #(
  parameter int unsigned W = 17
) (
  input  logic           clk,
  input  logic [W-1:0]   m_i,
  input  logic [W-1:0]   p_i,
  output logic [W-1:0]   m_o,
  output logic [2*W-1:0] u_o
);
  always_ff @(posedge clk) begin
    m_o <= m_i;
    u_o <= m_i * p_i;
  end
endmodule
