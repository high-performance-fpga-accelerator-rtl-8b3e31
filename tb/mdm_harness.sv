// mdm_harness: drives one mont_dual_mult instance with random operands below 2p and checks
// every result against an independent big-integer reference: res < 2p and
// res * 2^K == a * b (mod p). It issues a product whenever the multiplier is ready and a coin
// flip says so (always, when FULL_RATE is set), records the start cycle per tag and checks
// that each result arrives exactly 3*S + 2 cycles after its start, and that back-to-back
// issue reaches one product per S cycles (two slots, 2*S cycles each).
module mdm_harness
  import sike_pkg::*;
#(
  parameter prime_e PRIME = P434,
  parameter int     NPROD = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned S = words(PRIME, WORD_W);
  localparam int unsigned K = S * WORD_W;
  localparam logic [MAXK-1:0] PF = prime_value(PRIME);
  localparam logic [2*K+1:0] P2 = (2*K+2)'(PF[K-1:0]);

  logic         start, ready, res_valid;
  logic [K-1:0] a, b, res;
  logic [7:0]   tag, res_tag;

  mont_dual_mult #(.PRIME(PRIME)) dut (
    .clk, .rst_n, .start, .a, .b, .tag, .ready, .res_valid, .res, .res_tag
  );

  logic [K-1:0] ea [256];
  logic [K-1:0] eb [256];
  longint       t_issue [256];
  longint       cyc;
  int           issued, got;
  longint       first_issue, last_res;

  function automatic logic [K-1:0] rnd_below_2p();
    logic [2*K+1:0] v;
    v = '0;
    for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | (2*K+2)'($urandom);
    v = v % (P2 << 1);
    return v[K-1:0];
  endfunction

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // issue side
  always @(negedge clk) begin
    start <= 1'b0;
    if (rst_n && issued < NPROD && ready) begin
      start <= 1'b1;
      a   <= (issued % 7 == 3) ? K'(PF[K-1:0]) : rnd_below_2p();  // include p itself
      b   <= (issued % 11 == 5) ? K'(2 * PF[K-1:0] - 1) : rnd_below_2p();
      tag <= 8'(issued);
    end
  end

  always @(posedge clk) begin
    if (rst_n && start) begin
      ea[tag] = a; eb[tag] = b; t_issue[tag] = cyc;
      if (issued == 0) first_issue = cyc;
      issued++;
    end
    if (rst_n && res_valid) begin
      logic [2*K+1:0] lhs, rhs;
      lhs = ((2*K+2)'(res) << K) % P2;
      rhs = ((2*K+2)'(ea[res_tag]) * (2*K+2)'(eb[res_tag])) % P2;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL %s tag %0d: wrong Montgomery product", PRIME.name(), res_tag);
      end
      checks++;
      if ((2*K+2)'(res) >= (P2 << 1)) begin
        failures++;
        $display("FAIL %s tag %0d: result not below 2p", PRIME.name(), res_tag);
      end
      checks++;
      if (cyc - t_issue[res_tag] != longint'(3*S + 2)) begin
        failures++;
        $display("FAIL %s tag %0d: latency %0d, expected %0d", PRIME.name(), res_tag,
                 cyc - t_issue[res_tag], 3*S + 2);
      end
      got++;
      last_res = cyc;
    end
  end

  int spacing;
  initial begin
    checks = 0; failures = 0; issued = 0; got = 0; done = 1'b0; start = 1'b0;
    wait (got == NPROD);
    // all issued back to back: NPROD products need (NPROD/2 - 1) * 2S + 1 cycles of issue
    checks++;
    spacing = (NPROD / 2 - 1) * 2 * int'(S) + 1;
    if (t_issue[NPROD-1] - first_issue != longint'(spacing)) begin
      failures++;
      $display("FAIL %s: issue spacing %0d cycles for %0d products", PRIME.name(),
               t_issue[NPROD-1] - first_issue, NPROD);
    end
    done = 1'b1;
  end
endmodule
