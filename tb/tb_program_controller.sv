// tb_program_controller: runs the sequencer on a small program held in the testbench
// (registered read, like the program ROM) and checks, for each word, the cycle it is issued
// (two cycles after 'go' for the first word, then 1 + delay cycles apart), the read addresses
// at issue, and the operation, unit and destination on the ALU side exactly two cycles later.
// It also checks that END raises 'done' for one cycle and drops 'busy', that 'go' is ignored
// while busy, and runs a second entry point.
module tb_program_controller;
  import sike_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go = 0, busy, done, rd_en, alu_valid;
  logic [5:0] entry = 0, rom_addr;
  instr_t rom_q;
  logic [7:0] rd_addr_a, rd_addr_b, alu_dst;
  alu_op_e alu_op;
  logic [1:0] alu_unit;
  int checks = 0, failures = 0;

  program_controller #(.AW(6)) dut (.*);

  instr_t prog [64];
  always @(posedge clk) rom_q <= prog[rom_addr];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_issue [$];     // expected issue cycles
  int exp_word  [$];     // ROM index issued
  int alu_seen = 0, iss_seen = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor: issue side and ALU side
  int pend_cyc [$];
  instr_t pend_ins [$];
  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      int c, w;
      c = exp_issue.pop_front(); w = exp_word.pop_front();
      chk(cyc == c, $sformatf("word %0d issued at %0d, expected %0d", w, cyc, c));
      chk(rd_addr_a == prog[w].src_a && rd_addr_b == prog[w].src_b, "read addresses");
      pend_cyc.push_back(cyc + 2); pend_ins.push_back(prog[w]);
      iss_seen++;
    end
    if (alu_valid) begin
      int c;
      instr_t i;
      c = pend_cyc.pop_front(); i = pend_ins.pop_front();
      chk(cyc == c && alu_op == i.op && alu_unit == i.unit && alu_dst == i.dst,
          "ALU side aligned two cycles after issue");
      alu_seen++;
    end
  end

  task automatic run(input int e);
    int t, k, c0;
    @(negedge clk);
    go = 1; entry = 6'(e);
    c0 = cyc;
    t = c0 + 2;
    k = e;
    while (prog[k].op != OP_END) begin
      exp_issue.push_back(t); exp_word.push_back(k);
      t = t + 1 + int'(prog[k].delay);
      k++;
    end
    @(negedge clk);
    go = 1; entry = 6'(e + 1);   // ignored while busy
    @(negedge clk);
    go = 0;
    while (!done) @(negedge clk);
    chk(cyc == t + 1, $sformatf("done at %0d, expected %0d", cyc, t + 1));
    @(negedge clk);
    chk(!done && !busy, "done is one cycle and busy drops");
  endtask

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = '{op: OP_END, default: '0};
    for (int i = 0; i < 8; i++)
      prog[i] = '{op: alu_op_e'(1 + i % 4), unit: 2'(i % 3), src_a: 8'(10 + i),
                  src_b: 8'(20 + i), dst: 8'(30 + i), delay: 8'((i * 5) % 7)};
    for (int i = 40; i < 43; i++)
      prog[i] = '{op: OP_MUL, unit: 2'(i % 3), src_a: 8'(i), src_b: 8'(i + 1), dst: 8'(i + 2),
                  delay: 8'(0)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(40);
    repeat (4) @(negedge clk);
    chk(iss_seen == 11 && alu_seen == 11, $sformatf("issued %0d, ALU saw %0d", iss_seen, alu_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
