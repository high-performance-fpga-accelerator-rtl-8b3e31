// tb_data_buffer: fills the 8-word buffer with random words, reads them back in random order
// (data one cycle after the read), and checks that a read of the word being written in the
// same cycle returns the old contents and that rd_data holds while rd_en is low.
module tb_data_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_addr = 0, rd_addr = 0;
  logic [63:0] wr_data = 0, rd_data;
  logic [63:0] model [8];
  int checks = 0, failures = 0;

  data_buffer #(.DEPTH(8)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 3'(i); wr_data = {$urandom, $urandom};
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      logic [63:0] old;
      @(negedge clk);
      rd_en = 1; rd_addr = 3'($urandom);
      wr_en = ($urandom % 2 == 0); wr_addr = rd_addr; wr_data = {$urandom, $urandom};
      old = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      chk(rd_data == old, "read returns the contents before a same-cycle write");
      @(negedge clk);
      chk(rd_data == old, "rd_data holds without rd_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
