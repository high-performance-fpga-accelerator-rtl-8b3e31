// data_buffer: small 64-bit wide buffer used for the secret keys and for the messages.
//
// The accelerator keeps Alice's and Bob's secret keys in one instance and Alice's message,
// the ciphertext part c and Bob's recovered message in another. Both are plain synchronous
// RAMs on the shared 64-bit data bus: one write port and one read port. A write takes effect
// at the sampling edge; a read returns the word one cycle later and a read of the entry written
// in the same cycle returns the old contents. The word width follows the published 64-bit
// sharing between memory, buffers and hash; the depth is this implementation's choice (eight
// words hold two 4-word secret keys for SIKEp434, or three 2-word messages).
module data_buffer #(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   rd_data
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
