// mm_sb_red0: first full reduction element, column sA.
//
// Computes U[sA] = m + m*p[sA]: the reduction product of the first column whose prime word is
// not all ones, plus the reduction carry m inherited from the all-ones columns. From here on
// the reduction carry is merged into the multiplication carry, so later columns need only
// m*p[j]. U is computed one cycle ahead of the sB-Mult element that consumes it, which keeps
// the product off that element's critical path. m is passed on. Latency: one cycle.
module mm_sb_red0 #(
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
    u_o <= m_i * p_i + {{W{1'b0}}, m_i};
  end
endmodule
