// tb_memory_unit: checks the operand memory for SIKEp434 (K = 442 bits, 7 chunks of 64).
// Random full-width writes, random reads on both ALU ports (data exactly two cycles after the
// address), 64-bit chunk writes and reads on the side port, write-then-read in the same
// cycle, and the priority of the ALU write over a side-port write to the same entry.
module tb_memory_unit;
  import sike_pkg::*;
  localparam int unsigned K = words(P434, WORD_W) * WORD_W;
  localparam int unsigned NCH = (K + 63) / 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rd_en_a = 0, rd_en_b = 0, wr_en = 0, bus_rd_en = 0, bus_wr_en = 0;
  logic [7:0] rd_addr_a = 0, rd_addr_b = 0, wr_addr = 0, bus_rd_addr = 0, bus_wr_addr = 0;
  logic [3:0] bus_rd_chunk = 0, bus_wr_chunk = 0;
  logic [K-1:0] rd_data_a, rd_data_b, wr_data = '0;
  logic [63:0] bus_wdata = 0, bus_rdata;
  logic [NCH*64-1:0] model [256];
  int checks = 0, failures = 0;

  memory_unit #(.PRIME(P434), .DEPTH(256)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | K'($urandom);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = rnd();
      model[i] = (NCH*64)'(wr_data);
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      logic [K-1:0] ea, eb;
      logic [63:0] ec;
      int ch;
      @(negedge clk);
      // same-cycle write and read of the same entry: read sees the new value
      rd_en_a = 1; rd_en_b = 1; bus_rd_en = 1;
      rd_addr_a = 8'($urandom); rd_addr_b = 8'($urandom); bus_rd_addr = 8'($urandom);
      ch = $urandom % NCH; bus_rd_chunk = 4'(ch);
      wr_en = 1; wr_addr = rd_addr_a; wr_data = rnd();
      model[wr_addr] = (NCH*64)'(wr_data);
      // side-port write, sometimes colliding with the ALU write (ALU must win)
      bus_wr_en = 1; bus_wr_addr = ($urandom % 4 == 0) ? wr_addr : 8'($urandom);
      bus_wr_chunk = 4'($urandom % NCH); bus_wdata = {$urandom, $urandom};
      if (bus_wr_addr != wr_addr) model[bus_wr_addr][bus_wr_chunk*64 +: 64] = bus_wdata;
      ea = model[rd_addr_a][K-1:0]; eb = model[rd_addr_b][K-1:0];
      ec = model[bus_rd_addr][ch*64 +: 64];
      @(negedge clk);
      rd_en_a = 0; rd_en_b = 0; bus_rd_en = 0; wr_en = 0; bus_wr_en = 0;
      @(negedge clk);
      chk(rd_data_a == ea, "port A read, two cycles, sees same-cycle write");
      chk(rd_data_b == eb, "port B read");
      chk(bus_rdata == ec, "side-port chunk read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
