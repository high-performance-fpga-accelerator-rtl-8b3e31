// tb_fp_addsub: checks the modular adder/subtractor for SIKEp434.
// One random operation (add, sub or reduce, operands below 2p, with edge values 0, p-1, p,
// 2p-1 mixed in) is issued every cycle; each result must appear exactly two cycles later
// with its tag and equal the reference computed here: (a+b) mod 2p, (a-b) mod 2p, a mod p.
module tb_fp_addsub;
  import sike_pkg::*;
  localparam int unsigned K = words(P434, WORD_W) * WORD_W;
  localparam logic [MAXK-1:0] PF = prime_value(P434);
  localparam logic [K+1:0] P1 = (K+2)'(PF[K-1:0]);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, out_valid;
  alu_op_e op = OP_ADD;
  logic [K-1:0] a = '0, b = '0, res;
  logic [7:0] tag = '0, out_tag;
  int checks = 0, failures = 0;

  fp_addsub #(.PRIME(P434)) dut (.*);

  logic [K-1:0] exp_q [256];
  int           issue_cyc [256];
  int           cyc = 0, n_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [K-1:0] pick();
    logic [K+1:0] v;
    case ($urandom % 8)
      0: v = 0;
      1: v = P1 - 1;
      2: v = P1;
      3: v = 2 * P1 - 1;
      default: begin
        v = '0;
        for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | (K+2)'($urandom);
        v = v % (2 * P1);
      end
    endcase
    return v[K-1:0];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      logic [K+1:0] ea, eb, e;
      @(negedge clk);
      in_valid = 1'b1;
      a = pick(); b = pick();
      op = alu_op_e'(1 + $urandom % 3);
      ea = (K+2)'(a); eb = (K+2)'(b);
      case (op)
        OP_ADD:  e = (ea + eb) % (2 * P1);
        OP_SUB:  e = (ea + 2 * P1 - eb) % (2 * P1);
        default: e = ea % P1;
      endcase
      tag = 8'(n);
      exp_q[tag] = e[K-1:0];
      issue_cyc[tag] = cyc;
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != 600) begin failures++; $display("FAIL got %0d results", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    n_out++;
    checks++;
    if (res != exp_q[out_tag] || cyc - issue_cyc[out_tag] != 2) begin
      failures++;
      $display("FAIL tag %0d: res ok=%0d latency=%0d", out_tag, res == exp_q[out_tag],
               cyc - issue_cyc[out_tag]);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
