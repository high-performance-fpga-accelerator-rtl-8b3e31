// mm_sb_mult: multiplication-path element for a column j with sA <= j < s.
//
// Computes (C, S) = T[j] + U[j] + a[i]*b[j] + C, where U[j] is the reduction term prepared by
// the sB-Red element of the same column one cycle earlier. Since the reduction carry is merged
// into C, the carry grows to W+1 bits: the sum is at most 2^(2W+1) - 1. S becomes T[j-1] of
// the next iteration; C and a[i] move on. 'start' selects 0 instead of T[j] on the first
// iteration. All outputs are registered: one cycle latency.
module mm_sb_mult #(
  parameter int unsigned W = 17
) (
  input  logic           clk,
  input  logic [W-1:0]   a_i,
  input  logic [W-1:0]   b_i,
  input  logic [2*W-1:0] u_i,
  input  logic [W:0]     c_i,
  input  logic [W-1:0]   t_i,
  input  logic           start,
  output logic [W-1:0]   a_o,
  output logic [W:0]     c_o,
  output logic [W-1:0]   s_o
);
  logic [2*W:0] sum;

  logic [W-1:0]   t_eff;
  logic [2*W-1:0] prod;

  assign t_eff = start ? '0 : t_i;
  assign prod  = a_i * b_i;

  always_comb
    sum = {1'b0, prod} + {1'b0, u_i} + {{(W+1){1'b0}}, t_eff}
        + {{W{1'b0}}, c_i};

  always_ff @(posedge clk) begin
    a_o <= a_i;
    c_o <= sum[2*W:W];
    s_o <= sum[W-1:0];
  end
endmodule
