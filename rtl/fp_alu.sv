// fp_alu: field arithmetic unit of the accelerator.
//
// Holds the modular adder/subtractor (fp_addsub) and the multiplication unit (mult_unit with
// N_DUAL dual Montgomery multipliers). An operation arrives with its two operands (read from
// the memory unit), the destination address and, for OP_MUL, the index of the dual
// multiplier to use. OP_ADD/OP_SUB/OP_RED go to the adder (result two cycles later), OP_MUL to
// the selected multiplier (result 3*S + 2 cycles later). Both result streams share the single
// write-back port to the memory unit. The operations are scheduled statically by the program
// ROM, so the schedule must never make both units return in the same cycle; an assertion
// flags it, and the multiplier result wins. Two adder ops or a mult issue into a busy slot are
// likewise schedule errors.
// The split into adder/subtractor and multiplication unit follows the published design; the
// single write-back port is this implementation's choice.
// Lint note: rst_n is reported as both synchronous and asynchronous because the assertions'
// 'disable iff' samples it; the flip-flops use it only as an asynchronous reset.
module fp_alu
  import sike_pkg::*;
#(
  parameter prime_e      PRIME  = P434,
  parameter int unsigned W      = sike_pkg::WORD_W,
  parameter int unsigned N_DUAL = 3,
  localparam int unsigned K     = words(PRIME, W) * W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              op_valid,
  input  alu_op_e           op,
  input  logic [UNIT_W-1:0] unit,
  input  logic [K-1:0]      a,
  input  logic [K-1:0]      b,
  input  logic [MEM_AW-1:0] dst,
  output logic [N_DUAL-1:0] mul_ready,
  output logic              wb_valid,
  output logic [MEM_AW-1:0] wb_addr,
  output logic [K-1:0]      wb_data,
  output logic              add_done,   // an adder result is written back this cycle
  output logic              mul_done    // a product is written back this cycle
);
  localparam int unsigned SW = (N_DUAL > 1) ? $clog2(N_DUAL) : 1;

  logic              av, mv;
  logic [K-1:0]      ar, mr;
  logic [MEM_AW-1:0] at, mt;
  logic              is_add, is_mul;

  assign is_add = op_valid && (op == OP_ADD || op == OP_SUB || op == OP_RED);
  assign is_mul = op_valid && (op == OP_MUL);

  fp_addsub #(.PRIME(PRIME), .W(W), .TAG_W(MEM_AW)) u_add (
    .clk, .rst_n, .in_valid(is_add), .op, .a, .b, .tag(dst),
    .out_valid(av), .res(ar), .out_tag(at)
  );

  mult_unit #(.PRIME(PRIME), .W(W), .N_DUAL(N_DUAL), .TAG_W(MEM_AW)) u_mul (
    .clk, .rst_n, .start(is_mul), .sel(SW'(unit)), .a, .b, .tag(dst),
    .ready(mul_ready), .res_valid(mv), .res(mr), .res_tag(mt)
  );

  always_comb begin
    wb_valid = av || mv;
    wb_addr  = mv ? mt : at;
    wb_data  = mv ? mr : ar;
  end
  assign add_done = av;
  assign mul_done = mv;

  a_wb_conflict: assert property (@(posedge clk) disable iff (!rst_n) !(av && mv))
    else $error("fp_alu: adder and multiplier write back in the same cycle");
  a_mul_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                is_mul |-> mul_ready[SW'(unit)])
    else $error("fp_alu: product issued to a busy multiplier slot");
endmodule
