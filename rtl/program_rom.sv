// program_rom: statically scheduled Fp-level subroutines (block RAM on an FPGA).
//
// Each word is an instr_t: an operation, the dual multiplier to use, two source and one
// destination address of the memory unit, and the number of idle cycles to leave before the
// next word. Timing the program assumes: operand read 2 cycles, add/sub 2 cycles, write 1
// cycle, product 3*S + 2 cycles (MUL_WB = issue-to-readable distance of a product), so a
// result can be read by an instruction issued 4 cycles (add) or 3*S + 4 cycles (product) after
// the producing one. The idle counts are derived from these latencies at elaboration time, so
// the same program is correct for every prime.
//
// Two subroutines are held:
//   entry FP2_MULADD (0): d = a*b + c in GF(p^2), with Karatsuba: three products, two additions
//     and three subtractions for a*b, then two additions for c. Inputs a0,a1,b0,b1,c0,c1 at
//     addresses 0..5, result d0,d1 at 6,7, temporaries t0..t7 at 8..15.
//   entry FP2_SQR (16): e = a^2 in GF(p^2): e0 = (a0+a1)(a0-a1), e1 = 2*a0*a1. Inputs at 0,1,
//     result at 20,21, temporaries at 22..24. Both products go to dual multiplier 0 on
//     consecutive cycles, so they run interleaved in its two slots.
//   entry FP2_RED (24): reduces d0, d1 (addresses 6, 7) from [0, 2p) to [0, p) into 30, 31.
// Products use Montgomery form; every value stays below 2p. Reads are registered: the word
// at 'addr' appears on 'q' one cycle later.
// The subroutine and its operation count come from the published Fp2 formulas and dependency
// graph; the instruction format and this hand schedule are this implementation's own.
module program_rom
  import sike_pkg::*;
#(
  parameter prime_e      PRIME = P434,
  parameter int unsigned W     = sike_pkg::WORD_W,
  parameter int unsigned AW    = 6
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output instr_t        q
);
  localparam int unsigned S      = words(PRIME, W);
  localparam logic [DELAY_W-1:0] ADD_WB = 4;                   // issue to readable, adder
  localparam logic [DELAY_W-1:0] MUL_WB = DELAY_W'(3 * S + 4);  // issue to readable, product

  function automatic instr_t ins(alu_op_e op, logic [UNIT_W-1:0] unit, logic [MEM_AW-1:0] a,
                                 logic [MEM_AW-1:0] b, logic [MEM_AW-1:0] d,
                                 logic [DELAY_W-1:0] delay);
    instr_t i;
    i.op    = op;
    i.unit  = unit;
    i.src_a = a;
    i.src_b = b;
    i.dst   = d;
    i.delay = delay;
    return i;
  endfunction

  // memory map of FP2_MULADD
  localparam logic [MEM_AW-1:0] A0 = 0, A1 = 1, B0 = 2, B1 = 3, C0 = 4, C1 = 5, D0 = 6, D1 = 7;
  localparam logic [MEM_AW-1:0] T0 = 8, T1 = 9, T2 = 10, T3 = 11, T4 = 12, T5 = 13, T6 = 14, T7 = 15;
  // memory map of FP2_SQR
  localparam logic [MEM_AW-1:0] E0 = 20, E1 = 21, Q0 = 22, Q1 = 23, Q2 = 24;
  // memory map of FP2_RED
  localparam logic [MEM_AW-1:0] R0 = 30, R1 = 31;

  instr_t rom [2**AW];

  // Issue cycles (relative to the first word) of FP2_MULADD:
  //   0 t0=a0+a1   1 t1=b0+b1   2 t2=a0*b0   3 t3=a1*b1   5 t4=t0*t1 (t1 ready at 5)
  //   3+MUL_WB t6=t2-t3   5+MUL_WB t5=t4-t2   7+MUL_WB d0=t6+c0   9+MUL_WB t7=t5-t3
  //   13+MUL_WB d1=t7+c1   then END once d1 is written.
  initial begin
    for (int i = 0; i < 2**AW; i++) rom[i] = ins(OP_END, 0, 0, 0, 0, 0);
    rom[0]  = ins(OP_ADD, 0, A0, A1, T0, 0);
    rom[1]  = ins(OP_ADD, 0, B0, B1, T1, 0);
    rom[2]  = ins(OP_MUL, 0, A0, B0, T2, 0);
    rom[3]  = ins(OP_MUL, 1, A1, B1, T3, 1);
    rom[4]  = ins(OP_MUL, 2, T0, T1, T4, MUL_WB - DELAY_W'(3));
    rom[5]  = ins(OP_SUB, 0, T2, T3, T6, 1);
    rom[6]  = ins(OP_SUB, 0, T4, T2, T5, 1);
    rom[7]  = ins(OP_ADD, 0, T6, C0, D0, 1);
    rom[8]  = ins(OP_SUB, 0, T5, T3, T7, ADD_WB - DELAY_W'(1));
    rom[9]  = ins(OP_ADD, 0, T7, C1, D1, ADD_WB);
    rom[10] = ins(OP_END, 0, 0, 0, 0, 0);
    // FP2_SQR: 0 q0=a0+a1  1 q1=a0-a1  2 q2=a0+a0  5 e0=q0*q1  6 e1=q2*a1  END at 6+MUL_WB
    rom[16] = ins(OP_ADD, 0, A0, A1, Q0, 0);
    rom[17] = ins(OP_SUB, 0, A0, A1, Q1, 0);
    rom[18] = ins(OP_ADD, 0, A0, A0, Q2, 2);
    rom[19] = ins(OP_MUL, 0, Q0, Q1, E0, 0);
    rom[20] = ins(OP_MUL, 0, Q2, A1, E1, MUL_WB);
    rom[21] = ins(OP_END, 0, 0, 0, 0, 0);
    // FP2_RED: canonical form of d: d0 mod p -> 30, d1 mod p -> 31
    rom[24] = ins(OP_RED, 0, D0, 0, R0, 0);
    rom[25] = ins(OP_RED, 0, D1, 0, R1, ADD_WB);
    rom[26] = ins(OP_END, 0, 0, 0, 0, 0);
  end

  always_ff @(posedge clk) q <= rom[addr];
endmodule
