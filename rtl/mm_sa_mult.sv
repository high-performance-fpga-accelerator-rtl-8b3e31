// mm_sa_mult: multiplication-path element for a column j with 1 <= j < sA.
//
// Computes (C, S) = T[j] + a[i]*b[j] + C. In these columns the reduction contributes nothing
// (p[j] is all ones), so no m*p[j] product is needed. S becomes T[j-1] of the next iteration
// and is read back by the previous column; C and a[i] move to the next column. The sum fits
// in 2W bits, so C stays W bits wide. 'start' selects 0 instead of T[j] on the first
// iteration. All outputs are registered: one cycle latency.
module mm_sa_mult #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] t_i,
  input  logic         start,
  output logic [W-1:0] a_o,
  output logic [W-1:0] c_o,
  output logic [W-1:0] s_o
);
  logic [2*W-1:0] sum;

  logic [W-1:0] t_eff;

  assign t_eff = start ? '0 : t_i;

  always_comb
    sum = a_i * b_i + {{W{1'b0}}, t_eff} + {{W{1'b0}}, c_i};

  always_ff @(posedge clk) begin
    a_o <= a_i;
    c_o <= sum[2*W-1:W];
    s_o <= sum[W-1:0];
  end
endmodule
