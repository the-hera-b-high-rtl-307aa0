// link_board: the Link Board, three link channels sharing the bunch clock.
//
// Each channel takes two half rows of one detector layer and feeds a pair of
// Autobahn transmitters (see link_channel). The board runs synchronously with
// the bunch clock; here clk is the 48 ns clock and bx marks the first half of
// each 96 ns bunch crossing. Three channels per board follow the document.
module link_board
  import hpt_pkg::*;
#(
  parameter int unsigned N_CH = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bx,
  input  logic [BN_W-1:0]      bn,
  input  logic [HALF_PADS-1:0] row_m  [N_CH],
  input  logic [HALF_PADS-1:0] row_m1 [N_CH],
  output ab_word_t             tx_word [N_CH][2]
);
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    link_channel u_ch (
      .clk, .rst_n, .bx,
      .row_m   (row_m[c]),
      .row_m1  (row_m1[c]),
      .bn,
      .tx1_word(tx_word[c][0]),
      .tx2_word(tx_word[c][1])
    );
  end
endmodule
