// mont_dual_mult: interleaved dual Montgomery multiplier for SIKE primes.
//
// Computes res = a * b * 2^-K mod p (result below 2p) for inputs a, b < 2p, K = S*W, with the
// word-serial FIOS algorithm specialised to p = 2^eA * 3^eB - 1:
//   * column 0 (mm_pe_initial) forms T[0] + a[i]*b[0]; its low word is the quotient m;
//   * columns 1..SA-1 (mm_sa_mult) need no reduction product because p[j] is all ones; the
//     quotient only travels down a delay line (mm_sa_red);
//   * column SA (mm_sb_red0) adds the carried quotient to m*p[SA]; columns above SA
//     (mm_sb_red) form m*p[j]; both one cycle before their mm_sb_mult column uses them;
//   * mm_pe_final stores the last carry as the top word.
// The columns form a systolic array: a[i] and the carry move one column per cycle towards the
// top, while each result word S moves back one column, where it is T[j-1] of the next
// iteration. Iterations of one product enter column 0 every second cycle, so two independent
// products share the array: the product started on an even cycle uses the even cycles of
// column 0 (and the odd cycles of column 1, and so on), the one started on an odd cycle the
// others. Each column keeps one b word per slot and selects it with the cycle parity.
//
// Interface: 'start' with operands a, b and a caller tag issues a product into the slot of the
// current cycle parity; 'ready' says whether that slot can take one. A slot is busy for 2*S
// cycles after its start (the interleave stage); a new product may be issued in the cycle the
// previous one of the same slot is in its last iteration. The b words are loaded one column
// per cycle just before iteration 0 reaches each column. The result words are collected from
// the result registers as the last iteration passes, and 'res_valid' is raised for one cycle,
// 3*S + 2 cycles after the start cycle, with 'res' and 'res_tag'.
//
// Follows the published algorithm and architecture; the operand/result bundling into K-bit
// ports, the tag and the exact start-to-result offset are choices of this implementation.
// Lint note: rst_n is reported as both synchronous and asynchronous because the assertions'
// 'disable iff' samples it; the flip-flops use it only as an asynchronous reset.
module mont_dual_mult
  import sike_pkg::*;
#(
  parameter prime_e      PRIME = P434,
  parameter int unsigned W     = sike_pkg::WORD_W,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned S    = words(PRIME, W),
  localparam int unsigned SA   = words_a(PRIME, W),
  localparam int unsigned K    = S * W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [K-1:0]     a,
  input  logic [K-1:0]     b,
  input  logic [TAG_W-1:0] tag,
  output logic             ready,
  output logic             res_valid,
  output logic [K-1:0]     res,
  output logic [TAG_W-1:0] res_tag
);
  localparam logic [MAXK-1:0] PFULL = prime_value(PRIME);
  localparam logic [K-1:0]    P     = PFULL[K-1:0];
  localparam bit EXTRA = (prime_bits(PRIME) + 2 > K);
  localparam int unsigned CW = $clog2(S + 1);

  initial begin
    assert (SA >= 2 && SA < S) else $fatal(1, "mont_dual_mult: need 2 <= SA < S");
  end

  // ---------------------------------------------------------------- operand slots
  logic                 ph;          // cycle parity = slot served by column 0
  logic                 act  [2];
  logic [CW-1:0]        cnt  [2];
  logic [K-1:0]         a_sh [2];
  logic [K-1:0]         b_hold [2];
  logic [S-1:0]         bl   [2];    // b load token, bit j = load column j now
  logic [W-1:0]         b_reg [2][S];
  logic [TAG_W-1:0]     tag_r [2];
  logic [TAG_W-1:0]     tag_done [2];

  assign ready = !act[ph] || (cnt[ph] == CW'(S - 1));

  logic          st0, lst0;
  logic [W-1:0]  a0;
  always_comb begin
    a0   = a_sh[ph][W-1:0];
    st0  = act[ph] && (cnt[ph] == '0);
    lst0 = act[ph] && (cnt[ph] == CW'(S - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        act[k] <= 1'b0;
        cnt[k] <= '0;
        bl[k]  <= '0;
      end
    end else begin
      ph <= ~ph;
      for (int k = 0; k < 2; k++) begin
        bl[k] <= bl[k] << 1;
        if (start && ph == k[0]) begin
          act[k] <= 1'b1;
          cnt[k] <= '0;
          bl[k]  <= {{(S-1){1'b0}}, 1'b1};
        end else if (ph == k[0] && act[k]) begin
          cnt[k] <= cnt[k] + 1'b1;
          if (cnt[k] == CW'(S - 1)) act[k] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (start && ph == k[0]) begin
        a_sh[k]   <= a;
        b_hold[k] <= b;
        tag_r[k]  <= tag;
      end else if (ph == k[0] && act[k]) begin
        a_sh[k] <= a_sh[k] >> W;
      end
      if (ph == k[0] && lst0) tag_done[k] <= tag_r[k];
      for (int j = 0; j < S; j++)
        if (bl[k][j]) b_reg[k][j] <= b_hold[k][j*W +: W];
    end
  end

  // ---------------------------------------------------------------- control flags per column
  logic [S-1:0] st_r, lst_r, sl_r;   // first iteration, last iteration, slot
  logic         lst_f, sl_f;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_r  <= '0;
      lst_r <= '0;
      sl_r  <= '0;
      lst_f <= 1'b0;
      sl_f  <= 1'b0;
    end else begin
      st_r  <= {st_r[S-2:0], st0};
      lst_r <= {lst_r[S-2:0], lst0};
      sl_r  <= {sl_r[S-2:0], ph};
      lst_f <= lst_r[S-1];
      sl_f  <= sl_r[S-1];
    end
  end

  // ---------------------------------------------------------------- systolic array
  logic [W-1:0]   a_w  [S];
  logic [W:0]     c_x  [S];
  logic [W-1:0]   s_r  [S+1];   // s_r[j]: result register of column j; s_r[S]: PE final
  logic [W-1:0]   m_w  [S];     // quotient leaving column 0 / the sA-Red delay line
  logic [W-1:0]   m_b  [S];     // quotient leaving sB-Red column j
  logic [2*W-1:0] u_w  [S];

  // column j serves slot ph ^ j[0] in the current cycle
  function automatic logic [W-1:0] bsel(input logic [W-1:0] b0, input logic [W-1:0] b1,
                                        input logic sel);
    return sel ? b1 : b0;
  endfunction

  logic [W-1:0] c0;
  mm_pe_initial #(.W(W)) u_init (
    .clk, .a_i(a0), .b_i(bsel(b_reg[0][0], b_reg[1][0], ph)), .t_i(s_r[1]), .start(st0),
    .a_o(a_w[0]), .c_o(c0), .m_o(m_w[0])
  );
  assign c_x[0] = {1'b0, c0};
  assign s_r[0] = '0;

  for (genvar j = 1; j <= SA - 2; j++) begin : g_sa_red
    mm_sa_red #(.W(W)) u_red (.clk, .m_i(m_w[j-1]), .m_o(m_w[j]));
  end

  for (genvar j = 1; j < SA; j++) begin : g_sa_mult
    logic [W-1:0] cj;
    mm_sa_mult #(.W(W)) u_mult (
      .clk, .a_i(a_w[j-1]), .b_i(bsel(b_reg[0][j], b_reg[1][j], ph ^ 1'(j % 2))),
      .c_i(c_x[j-1][W-1:0]), .t_i(s_r[j+1]), .start(st_r[j-1]),
      .a_o(a_w[j]), .c_o(cj), .s_o(s_r[j])
    );
    assign c_x[j] = {1'b0, cj};
  end

  mm_sb_red0 #(.W(W)) u_red0 (
    .clk, .m_i(m_w[SA-2]), .p_i(P[SA*W +: W]), .m_o(m_b[SA]), .u_o(u_w[SA])
  );

  for (genvar j = SA + 1; j < S; j++) begin : g_sb_red
    mm_sb_red #(.W(W)) u_red (
      .clk, .m_i(m_b[j-1]), .p_i(P[j*W +: W]), .m_o(m_b[j]), .u_o(u_w[j])
    );
  end

  for (genvar j = SA; j < S; j++) begin : g_sb_mult
    mm_sb_mult #(.W(W)) u_mult (
      .clk, .a_i(a_w[j-1]), .b_i(bsel(b_reg[0][j], b_reg[1][j], ph ^ 1'(j % 2))),
      .u_i(u_w[j]), .c_i(c_x[j-1]), .t_i(s_r[j+1]), .start(st_r[j-1]),
      .a_o(a_w[j]), .c_o(c_x[j]), .s_o(s_r[j])
    );
  end

  mm_pe_final #(.W(W), .EXTRA(EXTRA)) u_final (
    .clk, .c_i(c_x[S-1]), .start(st_r[S-1]), .s_o(s_r[S])
  );

  // ---------------------------------------------------------------- result collection
  logic [K-1:0] res_w [2];
  logic         res_slot;
  always_ff @(posedge clk) begin
    for (int j = 0; j < S - 1; j++)
      if (lst_r[j+1]) res_w[sl_r[j+1]][j*W +: W] <= s_r[j+1];
    if (lst_f) res_w[sl_f][(S-1)*W +: W] <= s_r[S];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_slot  <= 1'b0;
    end else begin
      res_valid <= lst_f;
      res_slot  <= sl_f;
    end
  end

  assign res     = res_w[res_slot];
  assign res_tag = tag_done[res_slot];

  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("mont_dual_mult: start while the slot is busy");
endmodule
