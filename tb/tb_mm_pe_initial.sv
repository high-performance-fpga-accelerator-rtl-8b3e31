// tb_mm_pe_initial: checks (C, m) = T + a*b with T forced to 0 on start, and the a pass-through.
// Random inputs are applied before each rising edge; after the edge the registered outputs are
// compared with the expected values computed here with wider integer arithmetic.
module tb_mm_pe_initial;
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
  logic [W-1:0] a_i, b_i, t_i, a_o, c_o, m_o;
  logic start;
  mm_pe_initial #(.W(W)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint e;
      @(negedge clk);
      a_i = W'($urandom); b_i = W'($urandom); t_i = W'($urandom); start = ($urandom % 4 == 0);
      if (n < 4) begin a_i = '1; b_i = '1; t_i = '1; start = 1'(n % 2); end
      e = longint'(a_i) * longint'(b_i) + (start ? 0 : longint'(t_i));
      @(posedge clk); #1;
      chk(c_o == W'(e >> W) && m_o == W'(e) && a_o == a_i, "pe_initial sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
