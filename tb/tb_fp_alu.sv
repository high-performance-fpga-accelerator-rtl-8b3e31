// tb_fp_alu: checks the ALU (adder/subtractor plus three dual multipliers, SIKEp434).
// A random stream of add, sub, reduce and multiply operations is issued, products only into
// free multiplier slots and adder operations only in cycles whose write-back cannot meet a
// product's. Each write-back must carry the destination given at issue, appear after the
// unit's latency (2 for the adder, 3*S + 2 for products) and hold the correct value.
module tb_fp_alu;
  import sike_pkg::*;
  localparam int unsigned S = words(P434, WORD_W);
  localparam int unsigned K = S * WORD_W;
  localparam logic [MAXK-1:0] PF = prime_value(P434);
  localparam logic [2*K+1:0] P2 = (2*K+2)'(PF[K-1:0]);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic op_valid = 0, wb_valid, add_done, mul_done;
  alu_op_e op = OP_NOP;
  logic [1:0] unit = 0;
  logic [K-1:0] a = '0, b = '0, wb_data;
  logic [7:0] dst = 0, wb_addr;
  logic [2:0] mul_ready;
  int checks = 0, failures = 0;

  fp_alu #(.PRIME(P434), .N_DUAL(3)) dut (.*);

  alu_op_e eop [256];
  logic [K-1:0] ea [256], eb [256];
  int issue_cyc [256];
  bit wb_busy [int];
  int cyc = 0, issued = 0, got = 0, n_add = 0, n_mul = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [K-1:0] rnd();
    logic [2*K+1:0] v = '0;
    for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | (2*K+2)'($urandom);
    return K'(v % (P2 << 1));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (issued < 200) begin
      int u, lat;
      @(negedge clk);
      op_valid = 0;
      u = $urandom % 3;
      if ($urandom % 3 == 0 && mul_ready[u]) begin op = OP_MUL; unit = 2'(u); lat = 3*S + 2; end
      else begin op = alu_op_e'(1 + $urandom % 3); lat = 2; end
      if (!wb_busy.exists(cyc + lat) && (op != OP_MUL || mul_ready[u])) begin
        wb_busy[cyc + lat] = 1;
        op_valid = 1; a = rnd(); b = rnd(); dst = 8'(issued);
        eop[dst] = op; ea[dst] = a; eb[dst] = b; issue_cyc[dst] = cyc;
        issued++;
      end
    end
    @(negedge clk); op_valid = 0;
    wait (got == 200);
    checks++;
    if (n_add == 0 || n_mul == 0) begin failures++; $display("FAIL unit unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && wb_valid) begin
    logic [2*K+1:0] x, y, e, r;
    bit ok;
    int lat;
    x = (2*K+2)'(ea[wb_addr]); y = (2*K+2)'(eb[wb_addr]); r = (2*K+2)'(wb_data);
    case (eop[wb_addr])
      OP_ADD: begin e = (x + y) % (2*P2); ok = (r == e); lat = 2; end
      OP_SUB: begin e = (x + 2*P2 - y) % (2*P2); ok = (r == e); lat = 2; end
      OP_RED: begin e = x % P2; ok = (r == e); lat = 2; end
      default: begin ok = ((r << K) % P2 == (x * y) % P2) && r < 2*P2; lat = 3*S + 2; end
    endcase
    if (eop[wb_addr] == OP_MUL) n_mul++; else n_add++;
    checks++;
    if (!ok || cyc - issue_cyc[wb_addr] != lat || (mul_done != (eop[wb_addr] == OP_MUL))) begin
      failures++;
      $display("FAIL dst %0d op %s ok %0d latency %0d", wb_addr, eop[wb_addr].name(), ok,
               cyc - issue_cyc[wb_addr]);
    end
    got++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
