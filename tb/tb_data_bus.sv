// tb_data_bus: drives random transfer commands between host, memory, secret key buffer,
// message buffer and hash, with the sources modelled in the testbench (memory: data two
// cycles after the read, buffers and hash: one cycle, every word a known function of source
// and address). Two cycles after each command the destination's write enable and address must
// be set, and the bus data must equal the source word; a host destination must raise
// host_rvalid one cycle after that with the word.
module tb_data_bus;
  import sike_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, host_rvalid;
  bus_port_e cmd_src = BUS_HOST, cmd_dst = BUS_HOST;
  logic [11:0] cmd_src_addr = 0, cmd_dst_addr = 0;
  logic [63:0] cmd_wdata = 0, host_rdata, wdata;
  logic mem_rd_en, mem_wr_en, sk_rd_en, sk_wr_en, msg_rd_en, msg_wr_en, h_rd_en, h_xor_en;
  logic [7:0] mem_rd_addr, mem_wr_addr;
  logic [3:0] mem_rd_chunk, mem_wr_chunk;
  logic [2:0] sk_rd_addr, sk_wr_addr, msg_rd_addr, msg_wr_addr;
  logic [4:0] h_rd_lane, h_xor_lane;
  logic [63:0] mem_rdata, sk_rdata, msg_rdata, h_rdata;
  int checks = 0, failures = 0;

  data_bus #(.SK_AW(3), .MSG_AW(3)) dut (.*);

  function automatic logic [63:0] word_of(bus_port_e p, logic [11:0] ad);
    return {32'(p) * 32'h9e3779b9, 20'h0, ad} ^ 64'h0123_4567_89ab_cdef;
  endfunction

  // source models
  logic [63:0] m1;
  always @(posedge clk) begin
    m1        <= word_of(BUS_MEM, {mem_rd_addr, mem_rd_chunk});
    mem_rdata <= m1;
    sk_rdata  <= word_of(BUS_SK, 12'(sk_rd_addr));
    msg_rdata <= word_of(BUS_MSG, 12'(msg_rd_addr));
    h_rdata   <= word_of(BUS_HASH, 12'(h_rd_lane));
  end

  typedef struct { bus_port_e d; logic [11:0] da; logic [63:0] w; } exp_t;
  exp_t q [$];
  exp_t hq [$];
  int cyc = 0;
  int n_src [5], n_dst [5];
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected writes, two cycles after the command
  exp_t due [int];
  always @(posedge clk) if (rst_n) begin
    if (due.exists(cyc)) begin
      exp_t e;
      e = due[cyc];
      chk(wdata == e.w, $sformatf("bus data at %0d", cyc));
      case (e.d)
        BUS_MEM:  chk(mem_wr_en && {mem_wr_addr, mem_wr_chunk} == e.da, "memory write");
        BUS_SK:   chk(sk_wr_en && sk_wr_addr == e.da[2:0], "secret key write");
        BUS_MSG:  chk(msg_wr_en && msg_wr_addr == e.da[2:0], "message write");
        BUS_HASH: chk(h_xor_en && h_xor_lane == e.da[4:0], "hash absorb");
        default:  hq.push_back(e);
      endcase
      due.delete(cyc);
    end else begin
      chk(!mem_wr_en && !sk_wr_en && !msg_wr_en && !h_xor_en, "no write without command");
    end
    if (host_rvalid) begin
      exp_t e;
      e = hq.pop_front();
      chk(host_rdata == e.w, "host read-back");
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      exp_t e;
      @(negedge clk);
      cmd_valid = ($urandom % 5 != 0);
      cmd_src = bus_port_e'($urandom % 5); cmd_dst = bus_port_e'($urandom % 5);
      cmd_src_addr = 12'($urandom); cmd_dst_addr = 12'($urandom);
      if (cmd_src != BUS_MEM) cmd_src_addr[11:5] = '0;
      if (cmd_dst != BUS_MEM) cmd_dst_addr[11:5] = '0;
      cmd_wdata = {$urandom, $urandom};
      if (cmd_valid) begin
        e.d = cmd_dst; e.da = cmd_dst_addr;
        case (cmd_src)
          BUS_HOST: e.w = cmd_wdata;
          BUS_SK:   e.w = word_of(BUS_SK, {9'b0, cmd_src_addr[2:0]});
          BUS_MSG:  e.w = word_of(BUS_MSG, {9'b0, cmd_src_addr[2:0]});
          BUS_HASH: e.w = word_of(BUS_HASH, {7'b0, cmd_src_addr[4:0]});
          default:  e.w = word_of(BUS_MEM, cmd_src_addr);
        endcase
        due[cyc + 2] = e;
        n_src[cmd_src]++; n_dst[cmd_dst]++;
      end
    end
    @(negedge clk); cmd_valid = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 5; i++) chk(n_src[i] > 0 && n_dst[i] > 0, "every port used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
