// tfu_mux: 4:1 output multiplexer of the Message Generator.
//
// The bus to the Track Finding Units is 20 bits wide, so each 80-bit message
// leaves as four packages at 100 MHz, one message per 40 ns at full rate.
// A new message is started only while tfu_en is high (the TFUs can disable
// the stream for short times; the Message FIFO buffers meanwhile); a started
// message is always sent complete. Outputs are registered: tfu_valid marks a
// package, tfu_first the first of a message, which carries bits 19:0.
// The splitting follows the document; the package order and the valid/first
// framing are this design's choices.
module tfu_mux
  import hpt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             msg_empty,
  input  logic [MSG_W-1:0] msg_data,
  output logic             msg_re,
  input  logic             tfu_en,
  output logic [TFU_W-1:0] tfu_data,
  output logic             tfu_valid,
  output logic             tfu_first
);
  logic [MSG_W-1:0] hold;
  logic [1:0]       part;       // next package to send
  logic             busy;       // packages 1..3 still to send
  logic             start;

  assign start  = (!busy || part == 2'd0) && !msg_empty && tfu_en;
  assign msg_re = start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0; part <= '0; busy <= 1'b0;
      tfu_data <= '0; tfu_valid <= 1'b0; tfu_first <= 1'b0;
    end else if (busy && part != 2'd0) begin
      tfu_data  <= hold[TFU_W*part +: TFU_W];
      tfu_valid <= 1'b1;
      tfu_first <= 1'b0;
      part      <= part + 2'd1;
      busy      <= (part != 2'd3);
    end else if (start) begin
      hold      <= msg_data;
      tfu_data  <= msg_data[TFU_W-1:0];
      tfu_valid <= 1'b1;
      tfu_first <= 1'b1;
      part      <= 2'd1;
      busy      <= 1'b1;
    end else begin
      tfu_valid <= 1'b0;
      tfu_first <= 1'b0;
      busy      <= 1'b0;
      part      <= 2'd0;
    end
  end
endmodule
