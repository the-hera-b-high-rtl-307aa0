// mg_msg_stage: look-up and message composition, last stage of the Message
// Generator pipeline.
//
// The 18-bit look-up table address is formed from the road code, RSF code,
// PTB code and Cycle Bit of the road encoder stage and from the two-bit
// multiple-message counter (M. Msg). The table word read back gives 57 message
// bits; together with the Bunch Number and 15 constant bits they form the
// 80-bit message written to the Message FIFO at the end of the cycle.
// If table bit 57 is set, the same road is looked up again with M. Msg
// incremented, so one road can produce up to four messages; the road encoder
// waits meanwhile. The pipeline stalls while the Message FIFO is full.
// Address and message field widths follow the document; their order, and
// the use of table bit 57, are this design's choices. Most address and
// message bits are wired straight through from the inputs on purpose: the
// stage only composes fields, and the Message FIFO is the register that
// holds the message.
module mg_msg_stage
  import hpt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [4:0]         in_code,
  input  mg_buf_t            in_buf,
  output logic               in_ready,
  output lut_addr_t          lut_addr,
  input  logic [LUT_DW-1:0]  lut_data,
  input  logic [CONST_W-1:0] konst,
  output logic               mf_we,
  output message_t           mf_wdata,
  input  logic               mf_full
);
  logic [1:0] mmsg;
  logic       fire, more;

  assign lut_addr = '{mmsg: mmsg, cb: in_buf.cb, ptb: in_buf.ptb, code: in_buf.code, road: in_code};
  assign more     = lut_data[LUT_MORE_BIT] && (mmsg != 2'd3);
  assign fire     = in_valid && !mf_full;
  assign in_ready = fire && !more;
  assign mf_we    = fire;
  assign mf_wdata = '{konst: konst, bn: in_buf.bn, lut: lut_data[LUT_USED-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mmsg <= '0;
    else if (fire)  mmsg <= more ? mmsg + 2'd1 : 2'd0;
  end
endmodule
