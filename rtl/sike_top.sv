// sike_top: SIKE accelerator datapath around a field-arithmetic ALU.
//
// Holds the operand memory (memory_unit), the ALU (fp_alu: modular adder/subtractor and
// N_DUAL dual Montgomery multipliers), the program controller with its program ROM of
// statically scheduled Fp-level subroutines, the secret key and message buffers, the
// Keccak-1088 hash unit and the 64-bit data bus that connects memory, buffers, hash and host.
//
// The main protocol controller (key generation, encapsulation and decapsulation routines)
// and the isogeny strategy ROM are not part of this RTL; their control signals are ports:
//   * prog_go/prog_entry start a subroutine of the program ROM; prog_done pulses at its end;
//   * bus_* commands move 64-bit words between host, memory, buffers and the hash state
//     (public parameters are preloaded into the memory this way, and results read back);
//   * hash_clear/hash_permute drive the sponge; hash_busy/hash_done report the permutation.
// Timing of each part is described in its own module. Defaults are the SIKEp434
// configuration: 17-bit words, 26 words per element, three dual multipliers.
// Lint notes: the ALU's mul_ready/add_done/mul_done handshakes are left unconnected here,
// because the program ROM is statically scheduled and never waits on them (fp_alu asserts
// that no product is issued to a busy multiplier). rst_n is reported as both synchronous and
// asynchronous because the assertions' 'disable iff' samples it; the flops use it only as
// an asynchronous reset.
module sike_top
  import sike_pkg::*;
#(
  parameter prime_e      PRIME     = P434,
  parameter int unsigned N_DUAL    = 3,
  parameter int unsigned MEM_DEPTH = 256,
  parameter int unsigned SK_WORDS  = 8,
  parameter int unsigned MSG_WORDS = 8,
  localparam int unsigned ROM_AW   = 6,
  localparam int unsigned SK_AW    = $clog2(SK_WORDS),
  localparam int unsigned MSG_AW   = $clog2(MSG_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // program controller
  input  logic                prog_go,
  input  logic [ROM_AW-1:0]   prog_entry,
  output logic                prog_busy,
  output logic                prog_done,
  // data bus commands
  input  logic                bus_valid,
  input  bus_port_e           bus_src,
  input  logic [MEM_AW+3:0]   bus_src_addr,
  input  bus_port_e           bus_dst,
  input  logic [MEM_AW+3:0]   bus_dst_addr,
  input  logic [63:0]         bus_wdata,
  output logic                host_rvalid,
  output logic [63:0]         host_rdata,
  // hash unit control
  input  logic                hash_clear,
  input  logic                hash_permute,
  output logic                hash_busy,
  output logic                hash_done
);
  localparam int unsigned K = words(PRIME, WORD_W) * WORD_W;

  // ------------------------------------------------------------ program controller and ROM
  logic [ROM_AW-1:0]  rom_addr;
  instr_t             rom_q;
  logic               rd_en;
  logic [MEM_AW-1:0]  rd_addr_a, rd_addr_b;
  logic               alu_valid;
  alu_op_e            alu_op;
  logic [UNIT_W-1:0]  alu_unit;
  logic [MEM_AW-1:0]  alu_dst;

  program_rom #(.PRIME(PRIME), .AW(ROM_AW)) u_rom (.clk, .addr(rom_addr), .q(rom_q));

  program_controller #(.AW(ROM_AW)) u_ctrl (
    .clk, .rst_n, .go(prog_go), .entry(prog_entry), .busy(prog_busy), .done(prog_done),
    .rom_addr, .rom_q, .rd_en, .rd_addr_a, .rd_addr_b,
    .alu_valid, .alu_op, .alu_unit, .alu_dst
  );

  // ------------------------------------------------------------ memory unit and ALU
  logic [K-1:0]       opa, opb;
  logic               wb_valid;
  logic [MEM_AW-1:0]  wb_addr;
  logic [K-1:0]       wb_data;
  logic [N_DUAL-1:0]  mul_ready;
  logic               add_done, mul_done;

  logic               mem_rd_en, mem_wr_en;
  logic [MEM_AW-1:0]  mem_rd_addr, mem_wr_addr;
  logic [3:0]         mem_rd_chunk, mem_wr_chunk;
  logic [63:0]        mem_rdata, bus_wd;

  memory_unit #(.PRIME(PRIME), .DEPTH(MEM_DEPTH)) u_mem (
    .clk,
    .rd_en_a(rd_en), .rd_addr_a, .rd_data_a(opa),
    .rd_en_b(rd_en), .rd_addr_b, .rd_data_b(opb),
    .wr_en(wb_valid), .wr_addr(wb_addr), .wr_data(wb_data),
    .bus_rd_en(mem_rd_en), .bus_rd_addr(mem_rd_addr), .bus_rd_chunk(mem_rd_chunk),
    .bus_wr_en(mem_wr_en), .bus_wr_addr(mem_wr_addr), .bus_wr_chunk(mem_wr_chunk),
    .bus_wdata(bus_wd), .bus_rdata(mem_rdata)
  );

  fp_alu #(.PRIME(PRIME), .N_DUAL(N_DUAL)) u_alu (
    .clk, .rst_n, .op_valid(alu_valid), .op(alu_op), .unit(alu_unit), .a(opa), .b(opb),
    .dst(alu_dst), .mul_ready, .wb_valid, .wb_addr, .wb_data, .add_done, .mul_done
  );

  // ------------------------------------------------------------ buffers, hash, data bus
  logic              sk_rd_en, sk_wr_en, msg_rd_en, msg_wr_en, h_rd_en, h_xor_en;
  logic [SK_AW-1:0]  sk_rd_addr, sk_wr_addr;
  logic [MSG_AW-1:0] msg_rd_addr, msg_wr_addr;
  logic [4:0]        h_rd_lane, h_xor_lane;
  logic [63:0]       sk_rdata, msg_rdata, h_rdata;

  data_buffer #(.DEPTH(SK_WORDS)) u_sk (
    .clk, .wr_en(sk_wr_en), .wr_addr(sk_wr_addr), .wr_data(bus_wd),
    .rd_en(sk_rd_en), .rd_addr(sk_rd_addr), .rd_data(sk_rdata)
  );

  data_buffer #(.DEPTH(MSG_WORDS)) u_msg (
    .clk, .wr_en(msg_wr_en), .wr_addr(msg_wr_addr), .wr_data(bus_wd),
    .rd_en(msg_rd_en), .rd_addr(msg_rd_addr), .rd_data(msg_rdata)
  );

  keccak_1088 u_hash (
    .clk, .rst_n, .clear(hash_clear), .xor_en(h_xor_en), .xor_lane(h_xor_lane),
    .xor_data(bus_wd), .permute(hash_permute), .rd_en(h_rd_en), .rd_lane(h_rd_lane),
    .rd_data(h_rdata), .busy(hash_busy), .done(hash_done)
  );

  data_bus #(.SK_AW(SK_AW), .MSG_AW(MSG_AW)) u_bus (
    .clk, .rst_n,
    .cmd_valid(bus_valid), .cmd_src(bus_src), .cmd_src_addr(bus_src_addr),
    .cmd_dst(bus_dst), .cmd_dst_addr(bus_dst_addr), .cmd_wdata(bus_wdata),
    .host_rvalid, .host_rdata,
    .mem_rd_en, .mem_rd_addr, .mem_rd_chunk, .mem_rdata,
    .mem_wr_en, .mem_wr_addr, .mem_wr_chunk,
    .sk_rd_en, .sk_rd_addr, .sk_rdata, .sk_wr_en, .sk_wr_addr,
    .msg_rd_en, .msg_rd_addr, .msg_rdata, .msg_wr_en, .msg_wr_addr,
    .h_rd_en, .h_rd_lane, .h_rdata, .h_xor_en, .h_xor_lane,
    .wdata(bus_wd)
  );
endmodule
