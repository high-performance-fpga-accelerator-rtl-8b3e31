// memory_unit: operand memory of the accelerator (block RAM on an FPGA).
//
// DEPTH entries, each one field element of K bits. Two read ports feed the ALU operands, one
// write port takes ALU results, and a 64-bit side port (separate read and write addresses) lets the
// shared data bus read or write one 64-bit chunk of an entry (chunk c holds bits 64c..64c+63), which is how public parameters
// are preloaded and how data moves to and from the buffers and the hash unit.
// Timing: reads take two cycles (the address is registered, then the data); writes take effect
// at the rising edge that samples them, so a read issued in the same cycle as a write already
// returns the new value. The ALU write port has priority over a side-port write to the same
// entry in the same cycle. The read latency of 2 and write latency of 1 follow the published
// scheduling constraints; port count and depth are this implementation's choice.
module memory_unit
  import sike_pkg::*;
#(
  parameter prime_e      PRIME = P434,
  parameter int unsigned W     = sike_pkg::WORD_W,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned K    = words(PRIME, W) * W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NCH  = (K + 63) / 64,
  localparam int unsigned CW   = 4
) (
  input  logic          clk,
  // ALU read ports
  input  logic          rd_en_a,
  input  logic [AW-1:0] rd_addr_a,
  output logic [K-1:0]  rd_data_a,
  input  logic          rd_en_b,
  input  logic [AW-1:0] rd_addr_b,
  output logic [K-1:0]  rd_data_b,
  // ALU write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [K-1:0]  wr_data,
  // 64-bit side port
  input  logic          bus_rd_en,
  input  logic [AW-1:0] bus_rd_addr,
  input  logic [CW-1:0] bus_rd_chunk,
  input  logic          bus_wr_en,
  input  logic [AW-1:0] bus_wr_addr,
  input  logic [CW-1:0] bus_wr_chunk,
  input  logic [63:0]   bus_wdata,
  output logic [63:0]   bus_rdata
);
  logic [NCH*64-1:0] mem [DEPTH];
  logic [AW-1:0]     ra_q, rb_q, rbus_q;
  logic [CW-1:0]     rch_q;

  always_ff @(posedge clk) begin
    if (bus_wr_en && !(wr_en && wr_addr == bus_wr_addr))
      mem[bus_wr_addr][bus_wr_chunk*64 +: 64] <= bus_wdata;
    if (wr_en)
      mem[wr_addr] <= (NCH*64)'(wr_data);
    if (rd_en_a)   ra_q <= rd_addr_a;
    if (rd_en_b)   rb_q <= rd_addr_b;
    if (bus_rd_en) begin
      rbus_q <= bus_rd_addr;
      rch_q  <= bus_rd_chunk;
    end
    rd_data_a <= mem[ra_q][K-1:0];
    rd_data_b <= mem[rb_q][K-1:0];
    bus_rdata <= mem[rbus_q][rch_q*64 +: 64];
  end
endmodule
