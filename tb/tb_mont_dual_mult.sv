// tb_mont_dual_mult: self-checking test of the dual Montgomery multiplier for all four SIKE
// primes (SIKEp434 at the default parameters, plus SIKEp503, SIKEp610 and SIKEp751). Each
// harness issues products back to back in both slots and checks value, range, the fixed
// latency of 3*S + 2 cycles and the interleave rate of two products per 2*S cycles.
module tb_mont_dual_mult;
  import sike_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;
  int   checks, failures;

  mdm_harness #(.PRIME(P434), .NPROD(40)) h0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  mdm_harness #(.PRIME(P503), .NPROD(20)) h1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  mdm_harness #(.PRIME(P610), .NPROD(20)) h2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  mdm_harness #(.PRIME(P751), .NPROD(20)) h3 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
