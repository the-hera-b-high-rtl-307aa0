// hpt_pkg: types and constants shared by the high-pT level-0 trigger logic.
//
// A detector row has up to 96 pads per layer (PT1, PT2, PT3). A link channel
// carries one half row (48 pads) of one layer, split over two 32-bit Autobahn
// words: 30 pads on the first, 18 on the second. Six link channels (12 transfer
// channels) deliver the 3 x 96 pads of one row to a Pretrigger Board every
// 48 ns; the Cycle Bit tells the two rows of a bunch crossing apart.
// The field order inside the words and records below is this design's choice;
// the widths follow the document.
package hpt_pkg;

  localparam int unsigned N_PADS    = 96;   // pads per row and layer
  localparam int unsigned N_LAYERS  = 3;
  localparam int unsigned HALF_PADS = 48;
  localparam int unsigned TX1_PADS  = 30;   // pads on the first transmitter
  localparam int unsigned TX2_PADS  = 18;   // pads on the second transmitter
  localparam int unsigned N_LINK    = 6;    // link channels per PTB
  localparam int unsigned N_XFER    = 12;   // transfer channels per PTB
  localparam int unsigned BN_W      = 8;
  localparam int unsigned CODE_W    = 7;    // RSF code
  localparam int unsigned PT2_WIN   = 5;
  localparam int unsigned PT3_WIN   = 6;
  localparam int          WIN_OFS   = -2;   // road window starts at pad i-2
  localparam int unsigned N_COMB    = 18;   // PT2/PT3 combinations per data set
  localparam int unsigned LUT_AW    = 18;
  localparam int unsigned LUT_DW    = 64;
  localparam int unsigned LUT_USED  = 57;
  localparam int unsigned CONST_W   = 15;
  localparam int unsigned MSG_W     = 80;
  localparam int unsigned TFU_W     = 20;

  typedef logic [31:0] ab_word_t;            // one Autobahn parallel word

  // Event FIFO word, 297 bits
  typedef struct packed {
    logic [N_PADS-1:0] rsf;
    logic [N_PADS-1:0] pt2;
    logic [N_PADS-1:0] pt3;
    logic [BN_W-1:0]   bn;
    logic              cb;
  } event_t;

  // Data set sent from a PTB to the Message Generator, 27 bits
  typedef struct packed {
    logic [CODE_W-1:0]  code;
    logic [PT2_WIN-1:0] pt2;
    logic [PT3_WIN-1:0] pt3;
    logic [BN_W-1:0]    bn;
    logic               cb;
  } dataset_t;

  // Data Input Register of the Message Generator, 30 bits
  typedef struct packed {
    logic [2:0] ptb;
    dataset_t   ds;
  } mg_in_t;

  // Data Buffer contents (19 bits: RSF code, PTB code, BN, CB)
  typedef struct packed {
    logic [CODE_W-1:0] code;
    logic [2:0]        ptb;
    logic [BN_W-1:0]   bn;
    logic              cb;
  } mg_buf_t;

  // Look-up table address, 18 bits
  typedef struct packed {
    logic [1:0]        mmsg;
    logic              cb;
    logic [2:0]        ptb;
    logic [CODE_W-1:0] code;
    logic [4:0]        road;
  } lut_addr_t;

  // Message, 80 bits
  typedef struct packed {
    logic [CONST_W-1:0]  konst;
    logic [BN_W-1:0]     bn;
    logic [LUT_USED-1:0] lut;
  } message_t;

  // LUT bit that requests one more message for the same road
  localparam int unsigned LUT_MORE_BIT = 57;

  // Road encoder combination c: PT2 pad comb_p2(c) with PT3 pad comb_p3(c).
  // PT2 pad j (0..4) pairs with PT3 pads j-1..j+2 that lie in 0..5.
  function automatic int unsigned comb_p2(int unsigned c);
    if (c < 3) return 0;
    else if (c < 7) return 1;
    else if (c < 11) return 2;
    else if (c < 15) return 3;
    else return 4;
  endfunction

  function automatic int unsigned comb_p3(int unsigned c);
    if (c < 3) return c;
    else if (c < 7) return c - 3;
    else if (c < 11) return c - 6;
    else if (c < 15) return c - 9;
    else return c - 12;
  endfunction

  // Transfer channel numbering: c = 2*link + tx, link = 2*layer + half.
  function automatic ab_word_t tx1_pack(logic cb, logic bn0, logic [TX1_PADS-1:0] pads);
    return {cb, bn0, pads};
  endfunction
  function automatic ab_word_t tx2_pack(logic cb, logic [BN_W-1:0] bn, logic [TX2_PADS-1:0] pads);
    return {cb, 5'd0, bn, pads};
  endfunction

endpackage
