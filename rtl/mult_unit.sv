// mult_unit: the ALU's multiplication unit, N_DUAL dual Montgomery multipliers.
//
// A product is issued with 'start', the index of the dual multiplier in 'sel', operands and a
// tag (the destination address). Each dual multiplier takes the product into the slot of the
// current cycle parity; 'ready' reports per multiplier whether that slot is free. Results
// come back with a fixed latency (see mont_dual_mult) and are merged onto one result port by a
// multiplexer. Since at most one product is issued per cycle and all multipliers have the same
// latency, at most one result arrives per cycle; an assertion checks this.
// The number of dual multipliers (3 for SIKEp434, i.e. six multipliers) follows the published
// configuration; the issue/select interface is this implementation's choice.
// Lint note: rst_n is reported as both synchronous and asynchronous because the assertions'
// 'disable iff' samples it; the flip-flops use it only as an asynchronous reset.
module mult_unit
  import sike_pkg::*;
#(
  parameter prime_e      PRIME  = P434,
  parameter int unsigned W      = sike_pkg::WORD_W,
  parameter int unsigned N_DUAL = 3,
  parameter int unsigned TAG_W  = 8,
  localparam int unsigned K     = words(PRIME, W) * W,
  localparam int unsigned SW    = (N_DUAL > 1) ? $clog2(N_DUAL) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SW-1:0]     sel,
  input  logic [K-1:0]      a,
  input  logic [K-1:0]      b,
  input  logic [TAG_W-1:0]  tag,
  output logic [N_DUAL-1:0] ready,
  output logic              res_valid,
  output logic [K-1:0]      res,
  output logic [TAG_W-1:0]  res_tag
);
  logic [N_DUAL-1:0] v;
  logic [K-1:0]      r  [N_DUAL];
  logic [TAG_W-1:0]  rt [N_DUAL];

  for (genvar i = 0; i < N_DUAL; i++) begin : g_mult
    mont_dual_mult #(.PRIME(PRIME), .W(W), .TAG_W(TAG_W)) u_mult (
      .clk, .rst_n, .start(start && sel == SW'(i)), .a, .b, .tag,
      .ready(ready[i]), .res_valid(v[i]), .res(r[i]), .res_tag(rt[i])
    );
  end

  always_comb begin
    res_valid = |v;
    res       = '0;
    res_tag   = '0;
    for (int i = 0; i < N_DUAL; i++)
      if (v[i]) begin
        res     = r[i];
        res_tag = rt[i];
      end
  end

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v))
    else $error("mult_unit: two results in one cycle");
  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n) start |-> 32'(sel) < N_DUAL)
    else $error("mult_unit: no such multiplier");
endmodule
