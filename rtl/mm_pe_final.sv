// mm_pe_final: last element of the multiplication path.
//
// It receives the carry of the last column and stores it as the top result word T[s-1].
// When p < 2^(K-2) (EXTRA = 0, true for all four SIKE primes with 17-bit words) the carry
// always fits in W bits and is stored as is. Otherwise (EXTRA = 1) the block also keeps the
// one-bit word T[s]: it computes (C, S) = T[s] + C, stores S as T[s-1] and the new C as T[s].
// 'start' marks the first iteration, where T[s] is taken as 0. Latency: one cycle.
// With EXTRA = 0 the top carry bit c_i[W] is always zero and 'start' is not needed; both
// stay in the interface so the two variants have the same ports, and lint reports them as
// unused in that configuration.
module mm_pe_final #(
  parameter int unsigned W     = sike_pkg::WORD_W,
  parameter bit          EXTRA = 1'b0
) (
  input  logic         clk,
  input  logic [W:0]   c_i,
  input  logic         start,
  output logic [W-1:0] s_o
);
  if (EXTRA) begin : g_extra
    logic         t_hi;
    logic [W+1:0] sum;
    always_comb sum = {1'b0, c_i} + {{(W+1){1'b0}}, (start ? 1'b0 : t_hi)};
    always_ff @(posedge clk) begin
      s_o  <= sum[W-1:0];
      t_hi <= |sum[W+1:W];
    end
  end else begin : g_plain
    always_ff @(posedge clk) s_o <= c_i[W-1:0];
  end
endmodule
