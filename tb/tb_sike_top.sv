// tb_sike_top: end-to-end test of the accelerator at its default parameters (SIKEp434,
// three dual multipliers).
//  1. Preloads six random field elements a0, a1, b0, b1, c0, c1 (below 2p) into the memory
//     unit over the 64-bit bus, seven 64-bit chunks each.
//  2. Runs the GF(p^2) multiply-add subroutine d = a*b + c, checks its cycle count, reads
//     d0, d1 back through the bus and checks (d0 - c0)*R == a0*b0 - a1*b1 and
//     (d1 - c1)*R == a0*b1 + a1*b0 (mod p), R = 2^K (Montgomery products).
//  3. Runs the reduction subroutine and checks that the copies are d mod p.
//  4. Runs the GF(p^2) squaring subroutine (its two products share one dual multiplier,
//     interleaved) and checks e0*R == a0^2 - a1^2 and e1*R == 2*a0*a1.
//  5. Hashes the empty message with SHAKE256: the padded block is written to the message
//     buffer, moved into the hash state, permuted, squeezed into the secret key buffer and read
//     out to the host, where it must match the published digest.
//  6. Moves a word memory -> message buffer -> memory -> secret key buffer -> host.
// Every mechanism is counted (adder add/sub/reduce, products, two products interleaved in one
// dual multiplier, each bus source and destination, the permutation); one that never happened
// is a failure. The design is instantiated with no parameter override.
module tb_sike_top;
  import sike_pkg::*;
  localparam int unsigned S = words(P434, WORD_W);
  localparam int unsigned K = S * WORD_W;
  localparam int unsigned NCH = (K + 63) / 64;
  localparam logic [MAXK-1:0] PF = prime_value(P434);
  localparam logic [2*K+1:0] PP = (2*K+2)'(PF[K-1:0]);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic prog_go = 0, prog_busy, prog_done;
  logic [5:0] prog_entry = 0;
  logic bus_valid = 0, host_rvalid;
  bus_port_e bus_src = BUS_HOST, bus_dst = BUS_HOST;
  logic [11:0] bus_src_addr = 0, bus_dst_addr = 0;
  logic [63:0] bus_wdata = 0, host_rdata;
  logic hash_clear = 0, hash_permute = 0, hash_busy, hash_done;

  sike_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_add, n_sub, n_red, n_mul, n_interleave, n_perm;
  int n_src [5], n_dst [5];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_alu.is_add && dut.alu_op == OP_ADD) n_add++;
    if (dut.u_alu.is_add && dut.alu_op == OP_SUB) n_sub++;
    if (dut.u_alu.is_add && dut.alu_op == OP_RED) n_red++;
    if (dut.u_alu.is_mul) n_mul++;
    if (dut.u_alu.u_mul.g_mult[0].u_mult.act[0] && dut.u_alu.u_mul.g_mult[0].u_mult.act[1])
        n_interleave++;
    if (hash_done) n_perm++;
    if (bus_valid) begin n_src[bus_src]++; n_dst[bus_dst]++; end
  end

  // ---------------------------------------------------------------- bus helpers
  logic [63:0] rq [$];
  always @(posedge clk) if (rst_n && host_rvalid) rq.push_back(host_rdata);

  task automatic xfer(input bus_port_e s, input int sa, input bus_port_e d, input int da,
                      input logic [63:0] w);
    @(negedge clk);
    bus_valid = 1; bus_src = s; bus_src_addr = 12'(sa); bus_dst = d; bus_dst_addr = 12'(da);
    bus_wdata = w;
    @(negedge clk);
    bus_valid = 0;
  endtask

  task automatic put_elem(input int addr, input logic [K-1:0] v);
    logic [NCH*64-1:0] x;
    x = (NCH*64)'(v);
    for (int c = 0; c < NCH; c++) xfer(BUS_HOST, 0, BUS_MEM, addr * 16 + c, x[c*64 +: 64]);
  endtask

  task automatic get_elem(input int addr, output logic [K-1:0] v);
    logic [NCH*64-1:0] x;
    rq.delete();
    for (int c = 0; c < NCH; c++) xfer(BUS_MEM, addr * 16 + c, BUS_HOST, 0, 64'h0);
    repeat (4) @(negedge clk);
    for (int c = 0; c < NCH; c++) x[c*64 +: 64] = rq.pop_front();
    v = x[K-1:0];
  endtask

  task automatic run_prog(input int entry, output int cycles);
    int c0;
    @(negedge clk);
    prog_go = 1; prog_entry = 6'(entry); c0 = cyc;
    @(negedge clk);
    prog_go = 0;
    while (!prog_done) @(negedge clk);
    cycles = cyc - c0;
    @(negedge clk);
  endtask

  function automatic logic [K-1:0] rnd();
    logic [2*K+1:0] v = '0;
    for (int i = 0; i < (K + 31) / 32; i++) v = (v << 32) | (2*K+2)'($urandom);
    return K'(v % (2 * PP));
  endfunction

  function automatic logic [2*K+1:0] md(input logic [2*K+1:0] x);   // x mod p
    return x % PP;
  endfunction

  logic [K-1:0] e [8];
  logic [63:0] d_chunk1;
  logic [63:0] shake [4] = '{64'h138da80b2bddb946, 64'h24eb3e74eb3f3b23,
                             64'h821bb862ea52cd3f, 64'h2f76d56e64270cb5};

  initial begin
    logic [K-1:0] d0, d1, r0, r1, e0, e1, w;
    logic [2*K+1:0] a0, a1, b0, b1, c0, c1, R;
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    R = md((2*K+2)'(1) << K);
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < 6; i++) begin e[i] = rnd(); put_elem(i, e[i]); end
      a0 = (2*K+2)'(e[0]); a1 = (2*K+2)'(e[1]); b0 = (2*K+2)'(e[2]); b1 = (2*K+2)'(e[3]);
      c0 = (2*K+2)'(e[4]); c1 = (2*K+2)'(e[5]);

      run_prog(0, cycles);
      chk(cycles == 3 * S + 25, $sformatf("FP2_MULADD took %0d cycles, expected %0d", cycles,
                                          3 * S + 25));
      get_elem(6, d0); get_elem(7, d1);
      chk(md(md((2*K+2)'(d0) + 2*PP - c0) * R) == md(md(a0 * b0) + PP - md(a1 * b1)),
          "d0 = a0*b0 - a1*b1 + c0");
      chk(md(md((2*K+2)'(d1) + 2*PP - c1) * R) == md(a0 * b1 + a1 * b0), "d1 = a0*b1 + a1*b0 + c1");
      chk((2*K+2)'(d0) < 2*PP && (2*K+2)'(d1) < 2*PP, "d below 2p");

      run_prog(24, cycles);
      get_elem(30, r0); get_elem(31, r1);
      chk((2*K+2)'(r0) == md((2*K+2)'(d0)) && (2*K+2)'(r1) == md((2*K+2)'(d1)), "d mod p");

      run_prog(16, cycles);
      get_elem(20, e0); get_elem(21, e1);
      chk(md((2*K+2)'(e0) * R) == md(md(a0 * a0) + PP - md(a1 * a1)), "e0 = a0^2 - a1^2");
      chk(md((2*K+2)'(e1) * R) == md(2 * a0 * a1), "e1 = 2*a0*a1");
    end

    // SHAKE256 of the empty message through message buffer, hash and secret key buffer
    xfer(BUS_HOST, 0, BUS_MSG, 0, 64'h1f);
    xfer(BUS_HOST, 0, BUS_MSG, 1, 64'h8000000000000000);
    @(negedge clk); hash_clear = 1; @(negedge clk); hash_clear = 0;
    xfer(BUS_MSG, 0, BUS_HASH, 0, 0);
    xfer(BUS_MSG, 1, BUS_HASH, 16, 0);
    repeat (3) @(negedge clk);
    hash_permute = 1; @(negedge clk); hash_permute = 0;
    while (!hash_done) @(negedge clk);
    for (int i = 0; i < 4; i++) xfer(BUS_HASH, i, BUS_SK, i, 0);
    repeat (3) @(negedge clk);
    rq.delete();
    for (int i = 0; i < 4; i++) xfer(BUS_SK, i, BUS_HOST, 0, 0);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      logic [63:0] v;
      v = rq.pop_front();
      chk(v == shake[i], $sformatf("SHAKE256 lane %0d = %h", i, v));
    end

    // memory -> message buffer -> memory -> secret key buffer -> host
    get_elem(6, w);
    d_chunk1 = w[127:64];
    xfer(BUS_MEM, 6 * 16 + 1, BUS_MSG, 5, 0);
    repeat (3) @(negedge clk);
    xfer(BUS_MSG, 5, BUS_MEM, 100 * 16 + 3, 0);
    repeat (3) @(negedge clk);
    xfer(BUS_MEM, 100 * 16 + 3, BUS_SK, 6, 0);
    repeat (3) @(negedge clk);
    rq.delete();
    xfer(BUS_SK, 6, BUS_HOST, 0, 0);
    repeat (4) @(negedge clk);
    get_elem(6, w);
    chk(rq.size() == 0, "no stray host reads");
    rq.delete();
    xfer(BUS_SK, 6, BUS_HOST, 0, 0);
    repeat (4) @(negedge clk);
    chk(rq.size() == 1 && rq[0] == d_chunk1, "word copied memory -> msg -> memory -> sk -> host");

    // mechanisms
    chk(n_add > 0, "adder additions happened");
    chk(n_sub > 0, "adder subtractions happened");
    chk(n_red > 0, "reductions happened");
    chk(n_mul > 0, "products happened");
    chk(n_interleave > 0, "two products interleaved in one dual multiplier");
    chk(n_perm > 0, "hash permutation happened");
    for (int i = 0; i < 5; i++) chk(n_src[i] > 0 && n_dst[i] > 0, $sformatf("bus port %0d used", i));
    $display("mechanisms: add=%0d sub=%0d red=%0d mul=%0d interleaved-cycles=%0d perm=%0d",
             n_add, n_sub, n_red, n_mul, n_interleave, n_perm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
