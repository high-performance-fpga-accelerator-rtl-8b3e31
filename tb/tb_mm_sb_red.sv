// tb_mm_sb_red: checks U = m*p and the m pass-through.
// Random inputs are applied before each rising edge; after the edge the registered outputs are
// compared with the expected values computed here with wider integer arithmetic.
module tb_mm_sb_red;
  localparam int unsigned W = 17;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  logic [W-1:0] m_i, p_i, m_o;
  logic [2*W-1:0] u_o;
  mm_sb_red #(.W(W)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint e;
      @(negedge clk);
      m_i = W'($urandom); p_i = W'($urandom);
      if (n < 2) begin m_i = '1; p_i = '1; end
      e = longint'(m_i) * longint'(p_i) ;
      @(posedge clk); #1;
      chk(u_o == (2*W)'(e) && m_o == m_i, "sb_red product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
