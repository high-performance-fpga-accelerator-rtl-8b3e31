// fp_addsub: modular adder/subtractor of the ALU.
//
// Operations on operands below 2p (the range the Montgomery multiplier works in):
//   OP_ADD: a + b mod 2p      OP_SUB: a - b mod 2p      OP_RED: a mod p (final reduction)
// Two pipeline stages, one operation accepted per cycle: the first cycle forms a + b or a - b
// (or passes a for OP_RED), the second applies the correction (subtract 2p after an add that
// reached 2p, add 2p after a subtraction that went negative, subtract p for a reduction).
// Because the two stages use different adders, back-to-back operations are allowed.
// in_valid/op/a/b/tag are sampled on a rising edge; out_valid/res/out_tag appear two edges
// later. The two-cycle latency and the mod-2p / mod-p split follow the published design; the
// plain adders in place of carry-chain compaction adders are this implementation's choice.
module fp_addsub
  import sike_pkg::*;
#(
  parameter prime_e      PRIME = P434,
  parameter int unsigned W     = sike_pkg::WORD_W,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned K    = words(PRIME, W) * W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  alu_op_e          op,
  input  logic [K-1:0]     a,
  input  logic [K-1:0]     b,
  input  logic [TAG_W-1:0] tag,
  output logic             out_valid,
  output logic [K-1:0]     res,
  output logic [TAG_W-1:0] out_tag
);
  localparam logic [MAXK-1:0] PFULL = prime_value(PRIME);
  localparam logic [K+1:0]    P1    = (K+2)'(PFULL[K-1:0]);
  localparam logic [K+1:0]    P2    = P1 << 1;

  // stage 1: raw sum / difference, K+2 bits two's complement
  logic             v1;
  alu_op_e          op1;
  logic [K+1:0]     r1;
  logic [TAG_W-1:0] tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid && (op == OP_ADD || op == OP_SUB || op == OP_RED);
  end

  always_ff @(posedge clk) begin
    op1  <= op;
    tag1 <= tag;
    case (op)
      OP_ADD:  r1 <= {2'b00, a} + {2'b00, b};
      OP_SUB:  r1 <= {2'b00, a} - {2'b00, b};
      default: r1 <= {2'b00, a};
    endcase
  end

  // stage 2: correction
  logic [K-1:0] corr;   // the corrected value is below 2p < 2^K
  always_comb begin
    case (op1)
      OP_ADD:  corr = K'((r1 >= P2) ? r1 - P2 : r1);
      OP_SUB:  corr = K'(r1[K+1] ? r1 + P2 : r1);
      default: corr = K'((r1 >= P1) ? r1 - P1 : r1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    res     <= corr;
    out_tag <= tag1;
  end
endmodule
