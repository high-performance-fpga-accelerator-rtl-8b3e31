// data_bus: the shared 64-bit data path between the memory unit, the secret key buffer, the
// message buffer, the hash unit and the host.
//
// A transfer command names a source and a destination (bus_port_e) with an address each and
// moves one 64-bit word. Addresses: for the memory unit bits [MEM_AW+3:4] select the entry
// and bits [3:0] the 64-bit chunk; for the buffers and the hash unit the low bits select the
// word or lane. Writing to the hash unit XORs the word into the lane (absorbing); writing to
// the host raises host_rvalid with the word. Reading from the host takes cmd_wdata.
// Every source is read with the same two-cycle latency (the memory needs two, the one-cycle
// sources get an extra register), so the transfer pipeline accepts one command per cycle and
// writes each word to its destination two cycles after the command.
// That these units share data 64 bits at a time follows the published design; the command
// format is this implementation's choice, standing in for the main SIKE controller.
module data_bus
  import sike_pkg::*;
#(
  parameter int unsigned SK_AW  = 3,
  parameter int unsigned MSG_AW = 3,
  localparam int unsigned ADDR_W = MEM_AW + 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // transfer command
  input  logic              cmd_valid,
  input  bus_port_e         cmd_src,
  input  logic [ADDR_W-1:0] cmd_src_addr,
  input  bus_port_e         cmd_dst,
  input  logic [ADDR_W-1:0] cmd_dst_addr,
  input  logic [63:0]       cmd_wdata,
  output logic              host_rvalid,
  output logic [63:0]       host_rdata,
  // memory unit side port
  output logic              mem_rd_en,
  output logic [MEM_AW-1:0] mem_rd_addr,
  output logic [3:0]        mem_rd_chunk,
  input  logic [63:0]       mem_rdata,
  output logic              mem_wr_en,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [3:0]        mem_wr_chunk,
  // secret key buffer
  output logic              sk_rd_en,
  output logic [SK_AW-1:0]  sk_rd_addr,
  input  logic [63:0]       sk_rdata,
  output logic              sk_wr_en,
  output logic [SK_AW-1:0]  sk_wr_addr,
  // message buffer
  output logic              msg_rd_en,
  output logic [MSG_AW-1:0] msg_rd_addr,
  input  logic [63:0]       msg_rdata,
  output logic              msg_wr_en,
  output logic [MSG_AW-1:0] msg_wr_addr,
  // hash unit
  output logic              h_rd_en,
  output logic [4:0]        h_rd_lane,
  input  logic [63:0]       h_rdata,
  output logic              h_xor_en,
  output logic [4:0]        h_xor_lane,
  // data written to the destination
  output logic [63:0]       wdata
);
  // read side, cycle 0
  always_comb begin
    mem_rd_en    = cmd_valid && cmd_src == BUS_MEM;
    mem_rd_addr  = cmd_src_addr[ADDR_W-1:4];
    mem_rd_chunk = cmd_src_addr[3:0];
    sk_rd_en     = cmd_valid && cmd_src == BUS_SK;
    sk_rd_addr   = cmd_src_addr[SK_AW-1:0];
    msg_rd_en    = cmd_valid && cmd_src == BUS_MSG;
    msg_rd_addr  = cmd_src_addr[MSG_AW-1:0];
    h_rd_en      = cmd_valid && cmd_src == BUS_HASH;
    h_rd_lane    = cmd_src_addr[4:0];
  end

  // two-stage pipeline of the command
  logic              v   [2];
  bus_port_e         src [2];
  bus_port_e         dst [2];
  logic [ADDR_W-1:0] da  [2];
  logic [63:0]       hd  [2];
  logic [63:0]       one_cycle_q;   // buffer / hash data, re-registered to two cycles

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      v[1] <= 1'b0;
    end else begin
      v[0] <= cmd_valid;
      v[1] <= v[0];
    end
  end

  always_ff @(posedge clk) begin
    src[0] <= cmd_src;      src[1] <= src[0];
    dst[0] <= cmd_dst;      dst[1] <= dst[0];
    da[0]  <= cmd_dst_addr; da[1]  <= da[0];
    hd[0]  <= cmd_wdata;    hd[1]  <= hd[0];
    case (src[0])
      BUS_SK:   one_cycle_q <= sk_rdata;
      BUS_MSG:  one_cycle_q <= msg_rdata;
      default:  one_cycle_q <= h_rdata;
    endcase
  end

  // write side, cycle 2
  always_comb begin
    case (src[1])
      BUS_HOST: wdata = hd[1];
      BUS_MEM:  wdata = mem_rdata;
      default:  wdata = one_cycle_q;
    endcase
    mem_wr_en    = v[1] && dst[1] == BUS_MEM;
    mem_wr_addr  = da[1][ADDR_W-1:4];
    mem_wr_chunk = da[1][3:0];
    sk_wr_en     = v[1] && dst[1] == BUS_SK;
    sk_wr_addr   = da[1][SK_AW-1:0];
    msg_wr_en    = v[1] && dst[1] == BUS_MSG;
    msg_wr_addr  = da[1][MSG_AW-1:0];
    h_xor_en     = v[1] && dst[1] == BUS_HASH;
    h_xor_lane   = da[1][4:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rvalid <= 1'b0;
    else        host_rvalid <= v[1] && dst[1] == BUS_HOST;
  end
  always_ff @(posedge clk) host_rdata <= wdata;
endmodule
