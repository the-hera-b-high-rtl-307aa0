// link_channel: one link channel of the Link Board.
//
// Once per 96 ns bunch crossing (bx high) the pads of two half rows, m and
// m+1, and the 8-bit Bunch Number are stored in registers. The channel then
// presents row m (Cycle Bit 0) and, 48 ns later, row m+1 (Cycle Bit 1) to two
// Autobahn transmitters: the first word holds CB, one Bunch Number bit and 30
// pads, the second CB, the full Bunch Number and the remaining pads.
// The split 30/rest, CB and the BN copies follow the document; 18 remaining
// pads (48 per half row), BN[0] as the single bit and the bit order in the
// words are this design's choices.
// Timing: clk has a 48 ns period; bx is high in the first of the two cycles
// of a bunch crossing. The words for row m appear in the cycle after bx.
module link_channel
  import hpt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bx,
  input  logic [HALF_PADS-1:0] row_m,
  input  logic [HALF_PADS-1:0] row_m1,
  input  logic [BN_W-1:0]      bn,
  output ab_word_t             tx1_word,
  output ab_word_t             tx2_word
);
  logic [HALF_PADS-1:0] reg_m, reg_m1;
  logic [BN_W-1:0]      bn_q;
  logic                 cb;
  logic [HALF_PADS-1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_m  <= '0;
      reg_m1 <= '0;
      bn_q   <= '0;
      cb     <= 1'b1;
    end else begin
      if (bx) begin
        reg_m  <= row_m;
        reg_m1 <= row_m1;
        bn_q   <= bn;
        cb     <= 1'b0;
      end else begin
        cb     <= 1'b1;
      end
    end
  end

  always_comb begin
    sel      = cb ? reg_m1 : reg_m;
    tx1_word = tx1_pack(cb, bn_q[0], sel[TX1_PADS-1:0]);
    tx2_word = tx2_pack(cb, bn_q, sel[HALF_PADS-1:TX1_PADS]);
  end
endmodule
