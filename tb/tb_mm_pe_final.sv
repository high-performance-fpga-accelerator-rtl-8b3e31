// tb_mm_pe_final: checks both variants: EXTRA=0 stores the carry, EXTRA=1 adds the kept top bit T[s] first.
// Random inputs are applied before each rising edge; after the edge the registered outputs are
// compared with the expected values computed here with wider integer arithmetic.
module tb_mm_pe_final;
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
  logic [W:0] c_i;
  logic start;
  logic [W-1:0] s0, s1;
  mm_pe_final #(.W(W), .EXTRA(1'b0)) dut0 (.clk, .c_i, .start, .s_o(s0));
  mm_pe_final #(.W(W), .EXTRA(1'b1)) dut1 (.clk, .c_i, .start, .s_o(s1));
  initial begin
    logic thi;
    thi = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      longint e;
      @(negedge clk);
      c_i = (W+1)'($urandom); start = (n == 0) || ($urandom % 4 == 0);
      if (!start && thi) c_i[W] = 1'b0;   // keep T[s] + C inside W+1 bits
      e = longint'(c_i) + ((!start && thi) ? 1 : 0);
      @(posedge clk); #1;
      chk(s0 == c_i[W-1:0], "pe_final plain");
      chk(s1 == W'(e), "pe_final extra word");
      thi = e[W];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
