// sike_pkg: shared constants, types and constant functions for the SIKE accelerator.
//
// A SIKE prime has the form p = 2^eA * 3^eB - 1, so its eA least significant bits are all
// ones. The Montgomery multiplier splits operands into s words of W bits (K = s*W) and uses
// that property: every word p[j] with j < sA = floor(eA/W) is all ones, which removes the
// reduction multiplications in those columns.
//
// The four NIST round-3 primes are supported (SIKEp434/503/610/751). W = 17 matches the
// 17-bit unsigned operand of a 25x18 DSP multiplier; with it the word counts s = 26/30/36/45
// reproduce the published DSP counts (2s + sB - 1) and interleave latencies (2s). The number of
// words is chosen so that p < 2^(K-2), which keeps a Montgomery product of two inputs below 2p
// inside K bits without a final subtraction.
package sike_pkg;

  typedef enum logic [1:0] {P434 = 2'd0, P503 = 2'd1, P610 = 2'd2, P751 = 2'd3} prime_e;

  localparam int unsigned WORD_W = 17; // word size of the multiplier
  localparam int unsigned MAXK = 768;  // widest K over all primes, rounded up

  function automatic int unsigned prime_ea(prime_e id);
    case (id)
      P434: return 216;
      P503: return 250;
      P610: return 305;
      default: return 372;
    endcase
  endfunction

  function automatic int unsigned prime_eb(prime_e id);
    case (id)
      P434: return 137;
      P503: return 159;
      P610: return 192;
      default: return 239;
    endcase
  endfunction

  function automatic int unsigned prime_bits(prime_e id);
    case (id)
      P434: return 434;
      P503: return 503;
      P610: return 610;
      default: return 751;
    endcase
  endfunction

  // number of W-bit words: smallest s with p < 2^(s*W - 2)
  function automatic int unsigned words(prime_e id, int unsigned w = WORD_W);
    return (prime_bits(id) + 2 + w - 1) / w;
  endfunction

  // number of low words of p that are all ones
  function automatic int unsigned words_a(prime_e id, int unsigned w = WORD_W);
    return prime_ea(id) / w;
  endfunction

  // p = 2^eA * 3^eB - 1, computed at elaboration time
  function automatic logic [MAXK-1:0] prime_value(prime_e id);
    logic [MAXK-1:0] v;
    v = '0;
    v[0] = 1'b1;
    for (int unsigned i = 0; i < prime_eb(id); i++) v = v * 3;
    v = v << prime_ea(id);
    return v - 1;
  endfunction

  // ------------------------------------------------------------------ ALU and program format
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,   // no operation
    OP_ADD = 3'd1,   // a + b mod 2p
    OP_SUB = 3'd2,   // a - b mod 2p
    OP_RED = 3'd3,   // a mod p, for a < 2p
    OP_MUL = 3'd4,   // Montgomery product a * b * 2^-K mod p, below 2p
    OP_END = 3'd7    // end of subroutine
  } alu_op_e;

  localparam int unsigned MEM_AW  = 8;   // operand memory address width
  localparam int unsigned UNIT_W  = 2;   // selects one dual multiplier
  localparam int unsigned DELAY_W = 8;   // idle cycles after an instruction

  // one program ROM word: issue an operation, then wait 'delay' cycles
  typedef struct packed {
    alu_op_e              op;
    logic [UNIT_W-1:0]    unit;
    logic [MEM_AW-1:0]    src_a;
    logic [MEM_AW-1:0]    src_b;
    logic [MEM_AW-1:0]    dst;
    logic [DELAY_W-1:0]   delay;
  } instr_t;

  // sources and destinations of the shared 64-bit data bus
  typedef enum logic [2:0] {
    BUS_HOST = 3'd0,   // host port (input data / read-back output)
    BUS_MEM  = 3'd1,   // one 64-bit chunk of a memory-unit element
    BUS_SK   = 3'd2,   // secret key buffer
    BUS_MSG  = 3'd3,   // message buffer
    BUS_HASH = 3'd4    // hash state lane (written by XOR = absorb, read = squeeze)
  } bus_port_e;

endpackage
