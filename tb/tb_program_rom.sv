// tb_program_rom: reads every subroutine out of the program ROM (one cycle read latency) and
// checks it two ways.
// 1. Meaning: the words are interpreted over GF(p) with a plain modular product, using random
//    inputs, and the outputs must equal the GF(p^2) formulas: d = a*b + c, e = a^2, and the
//    reduced copies of d.
// 2. Schedule: issue cycles follow from the idle counts; every operand must be readable when
//    it is read (adder result 4 cycles, product 3*S + 4 cycles after issue), no two results
//    may be written back in the same cycle, a product may only enter a multiplier slot (unit,
//    cycle parity) that has been free for 2*S cycles, and END must come after the last write.
module tb_program_rom;
  import sike_pkg::*;
  localparam int unsigned S = words(P434, WORD_W);
  localparam logic [MAXK-1:0] PF = prime_value(P434);
  localparam logic [1023:0] PP = 1024'(PF);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] addr = '0;
  instr_t q;
  int checks = 0, failures = 0;

  program_rom #(.PRIME(P434)) dut (.clk, .addr, .q);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [1023:0] val [256];
  int            ready_at [256];   // cycle from which a written address is readable

  function automatic logic [1023:0] rnd();
    logic [1023:0] v = '0;
    for (int i = 0; i < 16; i++) v = (v << 32) | 1024'($urandom);
    return v % PP;
  endfunction

  task automatic run(input int entry, output int n_mul, output int n_add, output int n_sub,
                     output int n_red);
    int t, wb_cyc [int];
    int slot_free [4][2];
    instr_t w;
    int a_idx;
    n_mul = 0; n_add = 0; n_sub = 0; n_red = 0;
    for (int i = 0; i < 256; i++) ready_at[i] = 0;
    for (int u = 0; u < 4; u++) begin slot_free[u][0] = -1000; slot_free[u][1] = -1000; end
    t = 0;
    a_idx = entry;
    forever begin
      int wb;
      @(negedge clk); addr = 6'(a_idx);
      @(negedge clk); w = q;
      if (w.op == OP_END) begin
        int last = 0;
        foreach (wb_cyc[c]) if (c + 1 > last) last = c + 1;
        chk(t >= last, $sformatf("END at %0d before the last write-back at %0d", t, last - 1));
        break;
      end
      chk(ready_at[w.src_a] <= t, $sformatf("entry %0d word %0d reads a before it is written",
                                            entry, a_idx));
      if (w.op != OP_RED)
        chk(ready_at[w.src_b] <= t, $sformatf("entry %0d word %0d reads b early", entry, a_idx));
      case (w.op)
        OP_ADD: begin val[w.dst] = (val[w.src_a] + val[w.src_b]) % PP; n_add++; wb = t + 4; end
        OP_SUB: begin val[w.dst] = (val[w.src_a] + PP - val[w.src_b]) % PP; n_sub++; wb = t + 4; end
        OP_RED: begin val[w.dst] = val[w.src_a] % PP; n_red++; wb = t + 4; end
        default: begin
          val[w.dst] = (val[w.src_a] * val[w.src_b]) % PP; n_mul++; wb = t + 3 * S + 4;
          chk(slot_free[w.unit][(t + 2) % 2] <= t + 2,
              $sformatf("product at %0d into a busy slot of multiplier %0d", t, w.unit));
          slot_free[w.unit][(t + 2) % 2] = t + 2 + 2 * S;
        end
      endcase
      chk(!wb_cyc.exists(wb - 1), $sformatf("two write-backs in cycle %0d", wb - 1));
      wb_cyc[wb - 1] = 1;
      ready_at[w.dst] = wb;
      t = t + 1 + int'(w.delay);
      a_idx++;
    end
  endtask

  initial begin
    int m, ad, sb, rd;
    logic [1023:0] a0, a1, b0, b1, c0, c1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 6; i++) val[i] = rnd();
      a0 = val[0]; a1 = val[1]; b0 = val[2]; b1 = val[3]; c0 = val[4]; c1 = val[5];
      run(0, m, ad, sb, rd);
      chk(m == 3 && ad == 4 && sb == 3, $sformatf("FP2_MULADD op count %0d/%0d/%0d", m, ad, sb));
      chk(val[6] == (a0 * b0 % PP + PP - a1 * b1 % PP + c0) % PP, "d0 = a0*b0 - a1*b1 + c0");
      chk(val[7] == (a0 * b1 % PP + a1 * b0 % PP + c1) % PP, "d1 = a0*b1 + a1*b0 + c1");
      run(16, m, ad, sb, rd);
      chk(m == 2 && ad == 2 && sb == 1, $sformatf("FP2_SQR op count %0d/%0d/%0d", m, ad, sb));
      chk(val[20] == (a0 * a0 % PP + PP - a1 * a1 % PP) % PP, "e0 = a0^2 - a1^2");
      chk(val[21] == 2 * a0 * a1 % PP, "e1 = 2*a0*a1");
      run(24, m, ad, sb, rd);
      chk(rd == 2 && val[30] == val[6] && val[31] == val[7], "FP2_RED");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
