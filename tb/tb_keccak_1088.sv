// tb_keccak_1088: known-answer test of the Keccak-f[1600] sponge with a 1088-bit rate.
// Hashes the empty message with SHAKE256 (padding byte 0x1F) and with SHA3-256 (0x06), both
// with the final 0x80 in byte 135 (top byte of lane 16), and compares the first four output
// lanes with the published digests:
//   SHAKE256("") = 46b9dd2b0ba88d13 233b3feb743eeb24 3fcd52ea62b81b82 b50c27646ed5762f ...
//   SHA3-256("") = a7ffc6f8bf1ed766 51c14756a061d662 f580ff4de43b49fa 82d80a4b80f8434a
// (lanes are little-endian, so each 8-byte group appears byte-reversed below). It also checks
// that a permutation keeps 'busy' for exactly 24 cycles, that writes are ignored while busy,
// and that a second absorb-permute round on a non-empty state changes the output.
module tb_keccak_1088;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 0, xor_en = 0, permute = 0, rd_en = 0, busy, done;
  logic [4:0] xor_lane = 0, rd_lane = 0;
  logic [63:0] xor_data = 0, rd_data;
  int checks = 0, failures = 0;

  keccak_1088 dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int lane, input logic [63:0] v);
    @(negedge clk); xor_en = 1; xor_lane = 5'(lane); xor_data = v;
    @(negedge clk); xor_en = 0;
  endtask

  task automatic perm();
    int n;
    @(negedge clk); permute = 1;
    @(negedge clk); permute = 0;
    n = 1;
    // try a write while busy: must be ignored
    xor_en = 1; xor_lane = 0; xor_data = '1;
    @(negedge clk); xor_en = 0; n++;
    while (busy) begin @(negedge clk); n++; end
    chk(n == 25, $sformatf("permutation takes 24 cycles of busy (counted %0d)", n - 1));
  endtask

  task automatic get(input int lane, output logic [63:0] v);
    @(negedge clk); rd_en = 1; rd_lane = 5'(lane);
    @(negedge clk); rd_en = 0; v = rd_data;
  endtask

  logic [63:0] shake [4] = '{64'h138da80b2bddb946, 64'h24eb3e74eb3f3b23,
                             64'h821bb862ea52cd3f, 64'h2f76d56e64270cb5};
  logic [63:0] sha3  [4] = '{64'h66d71ebff8c6ffa7, 64'h62d661a05647c151,
                             64'hfa493be44dff80f5, 64'h4a43f8804b0ad882};

  initial begin
    logic [63:0] v, first;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // SHAKE256("")
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    put(0, 64'h1f); put(16, 64'h8000000000000000);
    perm();
    for (int i = 0; i < 4; i++) begin
      get(i, v);
      chk(v == shake[i], $sformatf("SHAKE256 lane %0d = %h", i, v));
    end
    first = shake[0];
    // squeeze again without new input: output must differ
    perm(); get(0, v); chk(v != first, "second squeeze block differs");
    // SHA3-256("")
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    put(0, 64'h06); put(16, 64'h8000000000000000);
    perm();
    for (int i = 0; i < 4; i++) begin
      get(i, v);
      chk(v == sha3[i], $sformatf("SHA3-256 lane %0d = %h", i, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
