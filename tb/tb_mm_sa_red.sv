// tb_mm_sa_red: checks that the quotient is delayed by exactly one cycle.
// Random inputs are applied before each rising edge; after the edge the registered outputs are
// compared with the expected values computed here with wider integer arithmetic.
module tb_mm_sa_red;
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
  logic [W-1:0] m_i, m_o, prev;
  mm_sa_red #(.W(W)) dut (.*);
  initial begin
    @(negedge clk); m_i = W'($urandom); prev = m_i;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      chk(m_o == prev, "sa_red delay");
      @(negedge clk); m_i = W'($urandom);
      chk(m_o == prev, "sa_red holds until the next edge");
      prev = m_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
