// keccak_1088: hash unit, a Keccak-f[1600] sponge with a 1088-bit rate (17 lanes of 64 bits),
// the rate used by SHAKE256 and SHA3-256.
//
// The 1600-bit state is 25 lanes; lane (x, y) has index x + 5*y and holds bytes in
// little-endian order. The unit works one 64-bit lane at a time on the shared data bus:
//   clear          zero the state (one cycle);
//   xor_en         XOR xor_data into lane xor_lane (absorbing a message word, or padding);
//   permute        run the 24 rounds of Keccak-f[1600], one round per cycle; 'busy' is high
//                  for the 24 cycles and 'done' pulses in the cycle after the last round;
//   rd_en          read lane rd_lane (squeezing); rd_data is valid one cycle later.
// Writes and permute are ignored while busy. Padding (0x1F ... 0x80 for SHAKE256) and the
// sequencing of absorb/permute/squeeze are left to the controller driving the unit.
// The round constants and rotation offsets are generated at elaboration time from their
// defining LFSR and index recurrences.
// Only the name Keccak-1088 and its use as SHAKE256 come from the published design; the
// round-per-cycle structure and the lane interface are this implementation's choices.
module keccak_1088 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        xor_en,
  input  logic [4:0]  xor_lane,
  input  logic [63:0] xor_data,
  input  logic        permute,
  input  logic        rd_en,
  input  logic [4:0]  rd_lane,
  output logic [63:0] rd_data,
  output logic        busy,
  output logic        done
);
  localparam int unsigned ROUNDS = 24;

  // rc(t) of the Keccak specification: LFSR x^8 + x^6 + x^5 + x^4 + 1
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 9'h001;
    for (int unsigned i = 1; i <= t % 255; i++) begin
      r = r << 1;
      r[0] ^= r[8];
      r[4] ^= r[8];
      r[5] ^= r[8];
      r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic logic [ROUNDS*64-1:0] round_consts();
    logic [ROUNDS*64-1:0] v;
    v = '0;
    for (int unsigned ir = 0; ir < ROUNDS; ir++)
      for (int unsigned j = 0; j < 7; j++)
        v[ir*64 + (1 << j) - 1] = rc_bit(j + 7 * ir);
    return v;
  endfunction

  // rotation offset of lane x + 5y, packed 6 bits per lane
  function automatic logic [25*6-1:0] rot_offsets();
    logic [25*6-1:0] v;
    int unsigned x, y, nx;
    v = '0;
    x = 1;
    y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      v[(x + 5*y)*6 +: 6] = 6'(((t + 1) * (t + 2) / 2) % 64);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return v;
  endfunction

  localparam logic [ROUNDS*64-1:0] RC  = round_consts();
  localparam logic [25*6-1:0]      ROT = rot_offsets();

  function automatic logic [63:0] rotl(input logic [63:0] v, input int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  logic [63:0] st [25];
  logic [63:0] nx_st [25];
  logic [4:0]  rnd;

  // one round: theta, rho, pi, chi, iota
  always_comb begin
    logic [63:0] c [5];
    logic [63:0] d [5];
    logic [63:0] bb [25];
    for (int x = 0; x < 5; x++)
      c[x] = st[x] ^ st[x+5] ^ st[x+10] ^ st[x+15] ^ st[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        bb[y + 5*((2*x + 3*y) % 5)] = rotl(st[x + 5*y] ^ d[x], int'(ROT[(x + 5*y)*6 +: 6]));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        nx_st[x + 5*y] = bb[x + 5*y] ^ (~bb[(x+1)%5 + 5*y] & bb[(x+2)%5 + 5*y]);
    nx_st[0] = nx_st[0] ^ RC[rnd*64 +: 64];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (rnd == 5'(ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          rnd  <= '0;
        end else begin
          rnd <= rnd + 1'b1;
        end
      end else if (permute) begin
        busy <= 1'b1;
        rnd  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      st <= nx_st;
    end else if (clear) begin
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else if (xor_en && xor_lane < 5'd25) begin
      st[xor_lane] <= st[xor_lane] ^ xor_data;
    end
    if (rd_en) rd_data <= (rd_lane < 5'd25) ? st[rd_lane] : '0;
  end
endmodule
