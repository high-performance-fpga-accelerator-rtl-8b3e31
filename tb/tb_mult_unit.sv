// tb_mult_unit: checks the multiplication unit (three dual multipliers, SIKEp434).
// Each cycle a product is issued, when possible, to a randomly chosen multiplier whose slot
// for this cycle parity is free; every result must arrive on the merged port exactly
// 3*S + 2 cycles after its issue, with its tag, and satisfy res < 2p and
// res * 2^K == a * b (mod p). With three multipliers and two slots each, up to six products
// are in their interleave stage, and more are still being written out; the test checks that
// more than six products are in flight at some point.
module tb_mult_unit;
  import sike_pkg::*;
  localparam int unsigned S = words(P434, WORD_W);
  localparam int unsigned K = S * WORD_W;
  localparam logic [MAXK-1:0] PF = prime_value(P434);
  localparam logic [2*K+1:0] P2 = (2*K+2)'(PF[K-1:0]);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 0, res_valid;
  logic [1:0] sel = 0;
  logic [K-1:0] a = '0, b = '0, res;
  logic [7:0] tag = 0, res_tag;
  logic [2:0] ready;
  int checks = 0, failures = 0;

  mult_unit #(.PRIME(P434), .N_DUAL(3)) dut (.*);

  logic [K-1:0] ea [256], eb [256];
  int issue_cyc [256];
  int cyc = 0, issued = 0, got = 0, inflight = 0, max_inflight = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [K-1:0] rnd();
    logic [2*K+1:0] v = '0;
    for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | (2*K+2)'($urandom);
    return K'(v % (P2 << 1));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (issued < 150) begin
      int u;
      @(negedge clk);
      start = 0;
      u = $urandom % 3;
      for (int k = 0; k < 3; k++)
        if (!start && ready[(u + k) % 3] && $urandom % 8 != 0) begin
          start = 1; sel = 2'((u + k) % 3);
          a = rnd(); b = rnd(); tag = 8'(issued);
          ea[tag] = a; eb[tag] = b; issue_cyc[tag] = cyc;
          issued++;
        end
    end
    @(negedge clk); start = 0;
    wait (got == 150);
    checks++;
    if (max_inflight <= 6) begin
      failures++; $display("FAIL only %0d products in flight", max_inflight);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    inflight = inflight + (start ? 1 : 0) - (res_valid ? 1 : 0);
    if (inflight > max_inflight) max_inflight = inflight;
    if (rst_n && res_valid) begin
      logic [2*K+1:0] l, r;
      l = ((2*K+2)'(res) << K) % P2;
      r = ((2*K+2)'(ea[res_tag]) * (2*K+2)'(eb[res_tag])) % P2;
      checks++;
      if (l != r || (2*K+2)'(res) >= (P2 << 1) || cyc - issue_cyc[res_tag] != 3*S + 2) begin
        failures++;
        $display("FAIL tag %0d value %0d latency %0d cyc %0d v=%b", res_tag, l == r, cyc - issue_cyc[res_tag], cyc, dut.v);
      end
      got++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
