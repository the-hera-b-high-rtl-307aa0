// road_encoder: Road Encoder and Data Buffer, second stage of the Message
// Generator pipeline.
//
// A data set carries 5 PT2 pads and 6 PT3 pads of one road. The encoder
// lists the PT2/PT3 pad pairs that are both hit and hands out one 5-bit
// combination code per 40 ns cycle, lowest code first. The 18 possible
// combinations pair PT2 pad j (0..4) with PT3 pads j-1..j+2 that exist
// (3+4+4+4+3 = 18, see hpt_pkg::comb_p2/comb_p3). Next to it the Data Buffer
// keeps RSF code, PTB code, Bunch Number and Cycle Bit of the data set for
// the whole sequence. A new data set is accepted in the cycle the last code
// is taken, so codes leave back to back. A data set with no hit pair yields
// no code. The count of 18 and the 5-bit code follow the document; which
// pairs are counted and their numbering are this design's reading.
module road_encoder
  import hpt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  mg_in_t      in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [4:0]  out_code,
  output mg_buf_t     out_buf,
  input  logic        out_ready
);
  logic [N_COMB-1:0] pend, hits, pend_next;
  mg_buf_t           buf_q;

  always_comb begin
    for (int c = 0; c < int'(N_COMB); c++)
      hits[c] = in_data.ds.pt2[comb_p2(c)] & in_data.ds.pt3[comb_p3(c)];
    out_code = '0;
    for (int c = int'(N_COMB) - 1; c >= 0; c--)
      if (pend[c]) out_code = 5'(c);
    pend_next = pend & (pend - 1'b1);          // lowest bit cleared
  end

  assign out_valid = (pend != '0);
  assign out_buf   = buf_q;
  assign in_ready  = !out_valid || (out_ready && pend_next == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend  <= '0;
      buf_q <= '0;
    end else if (in_valid && in_ready) begin
      pend  <= hits;
      buf_q <= '{code: in_data.ds.code, ptb: in_data.ptb, bn: in_data.ds.bn, cb: in_data.ds.cb};
    end else if (out_valid && out_ready) begin
      pend  <= pend_next;
    end
  end
endmodule
