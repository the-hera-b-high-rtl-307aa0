// ptb_output_ctrl: output data generation of the Pretrigger Board.
//
// Runs on the 25 MHz output clock. An event (RSF pattern, PT2 and PT3
// patterns, Bunch Number, Cycle Bit) is taken from the Event FIFO into a
// working register; events whose bunch number is vetoed are dropped. Then,
// once per set RSF bit, a three-step pipeline produces a 27-bit data set:
//  1. the 7-bit priority encoder gives the code i of the most significant
//     remaining RSF bit, which is then cleared;
//  2. two multiplexers select PT2 pads i-2..i+2 and PT3 pads i-2..i+3;
//  3. code, pads, BN and CB are written to the Output Register.
// An event stops after its last RSF bit or after max_sets data sets
// (0 = no limit); the next event can enter in the same cycle.
// Output handshake: dav is high while the Output Register holds a data set;
// the Message Generator raises dac for one cycle and takes data at that edge.
// Every data set is also copied to the Test FIFO as {0, card, data set}, and
// counted by a 29-bit counter. Pipeline, encoder, multiplexers, counter width
// and the per-event limit follow the document; the handshake timing, the
// limit encoding and the Test FIFO word layout are this design's choices.
module ptb_output_ctrl
  import hpt_pkg::*;
#(
  parameter int unsigned CNT_W = 29
) (
  input  logic             clk,
  input  logic             rst_n,
  // Event FIFO read side
  input  event_t           fifo_rdata,
  input  logic             fifo_empty,
  output logic             fifo_re,
  // veto lookup
  input  logic             veto_hit,
  output logic [BN_W-1:0]  veto_q_bn,
  output logic             veto_q_cb,
  output logic             veto_q_done,
  // settings
  input  logic [6:0]       max_sets,
  input  logic [3:0]       card,
  input  logic             count_clr,
  // handshake to the Message Generator
  output logic             dav,
  input  logic             dac,
  output dataset_t         data,
  // monitoring
  output logic             tf_we,
  output logic [31:0]      tf_wdata,
  output logic [CNT_W-1:0] count,
  output logic             vetoed          // pulse: an event was inhibited
);
  // working register
  logic              cur_valid;
  logic [N_PADS-1:0] cur_rsf, cur_pt2, cur_pt3;
  logic [BN_W-1:0]   cur_bn;
  logic              cur_cb;
  logic [6:0]        cur_n;
  // pipeline step 1
  logic              s1_valid;
  logic [CODE_W-1:0] s1_code;
  logic [N_PADS-1:0] s1_pt2, s1_pt3;
  logic [BN_W-1:0]   s1_bn;
  logic              s1_cb;
  // pipeline step 2
  logic              s2_valid;
  dataset_t          s2;
  // step 3 = output register
  logic              out_valid;
  dataset_t          out_q;

  logic [CODE_W-1:0]  enc_code;
  logic               enc_valid;
  logic [PT2_WIN-1:0] mux2;
  logic [PT3_WIN-1:0] mux3;
  logic out_free, s2_adv, s2_free, s1_adv, s1_free, issue, last, load;
  logic [N_PADS-1:0] rsf_next;

  rsf_priority_encoder #(.N(N_PADS), .W(CODE_W)) u_enc (
    .rsf(cur_rsf), .code(enc_code), .valid(enc_valid));

  road_pad_mux #(.N(N_PADS), .WIN(PT2_WIN), .OFS(WIN_OFS), .W(CODE_W)) u_mux2 (
    .pads(s1_pt2), .code(s1_code), .sel(mux2));
  road_pad_mux #(.N(N_PADS), .WIN(PT3_WIN), .OFS(WIN_OFS), .W(CODE_W)) u_mux3 (
    .pads(s1_pt3), .code(s1_code), .sel(mux3));

  always_comb begin
    out_free = !out_valid || dac;
    s2_adv   = s2_valid && out_free;
    s2_free  = !s2_valid || s2_adv;
    s1_adv   = s1_valid && s2_free;
    s1_free  = !s1_valid || s1_adv;
    issue    = cur_valid && enc_valid && s1_free;
    rsf_next = cur_rsf & ~(N_PADS'(1) << enc_code);
    last     = (rsf_next == '0) ||
               (max_sets != '0 && (cur_n + 7'd1) >= max_sets);
    load     = !fifo_empty && (!cur_valid || (issue && last));
  end

  assign fifo_re     = load;
  assign veto_q_bn   = fifo_rdata.bn;
  assign veto_q_cb   = fifo_rdata.cb;
  assign veto_q_done = load;
  assign vetoed      = load && veto_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid <= 1'b0;
      cur_rsf   <= '0; cur_pt2 <= '0; cur_pt3 <= '0;
      cur_bn    <= '0; cur_cb  <= 1'b0; cur_n <= '0;
      s1_valid  <= 1'b0; s1_code <= '0; s1_pt2 <= '0; s1_pt3 <= '0;
      s1_bn     <= '0; s1_cb <= 1'b0;
      s2_valid  <= 1'b0; s2 <= '0;
      out_valid <= 1'b0; out_q <= '0;
      count     <= '0;
    end else begin
      // working register
      if (load) begin
        cur_valid <= !veto_hit && (fifo_rdata.rsf != '0);
        cur_rsf   <= fifo_rdata.rsf;
        cur_pt2   <= fifo_rdata.pt2;
        cur_pt3   <= fifo_rdata.pt3;
        cur_bn    <= fifo_rdata.bn;
        cur_cb    <= fifo_rdata.cb;
        cur_n     <= '0;
      end else if (issue) begin
        cur_valid <= !last;
        cur_rsf   <= rsf_next;
        cur_n     <= cur_n + 7'd1;
      end
      // step 1: encoder
      if (issue) begin
        s1_valid <= 1'b1;
        s1_code  <= enc_code;
        s1_pt2   <= cur_pt2;
        s1_pt3   <= cur_pt3;
        s1_bn    <= cur_bn;
        s1_cb    <= cur_cb;
      end else if (s1_adv) begin
        s1_valid <= 1'b0;
      end
      // step 2: multiplexers
      if (s1_adv) begin
        s2_valid <= 1'b1;
        s2       <= '{code: s1_code, pt2: mux2, pt3: mux3, bn: s1_bn, cb: s1_cb};
      end else if (s2_adv) begin
        s2_valid <= 1'b0;
      end
      // step 3: output register
      if (s2_adv) begin
        out_valid <= 1'b1;
        out_q     <= s2;
      end else if (dac) begin
        out_valid <= 1'b0;
      end
      // data set counter
      if (count_clr)   count <= '0;
      else if (s2_adv) count <= count + 1'b1;
    end
  end

  assign dav      = out_valid;
  assign data     = out_q;
  assign tf_we    = s2_adv;
  assign tf_wdata = {1'b0, card, s2};

  // DAC may only answer a pending DAV
  a_dac_needs_dav: assert property (@(posedge clk) disable iff (!rst_n) dac |-> out_valid);
endmodule
