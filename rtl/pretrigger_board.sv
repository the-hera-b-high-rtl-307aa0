// pretrigger_board: the Pretrigger Board (PTB).
//
// Receives the pads of two detector rows per 96 ns bunch crossing, one row
// every 48 ns, on 12 transfer channels (six link channels, two Autobahn words
// each), searches them for trigger roads and sends one 27-bit data set per
// road to the Message Generator.
//   48 ns domain (clk48): unpacking of the 12 words into 3 x 96 pads,
//     Bunch Number comparison, coincidence logic, Event FIFO write.
//   25 MHz domain (clk25): Event FIFO read, veto, output pipeline, DAV/DAC
//     handshake, 29-bit data set counter, Test FIFO, input clock watch dog,
//     register access.
// Transfer channel c = 2*link + tx, link = 2*layer + half; half 0 holds
// pads 0..47. The register bus stands in for VME (word addresses):
//   0x00 CTRL  rw [0] test mode, [1] BN interrupt enable,
//                 [2] clear BN error (level), [14:8] max data sets per event
//   0x01 STAT  r  [0] BN error, [1] watch dog error, [2] Event FIFO overflow,
//                 [3] Test FIFO empty;  w: [1] clears the watch dog error
//   0x02 COUNT r  29-bit data set counter;  w: clear
//   0x03 TFIFO r  oldest Test FIFO word (popped by the read)
//   0x04 TFCNT r  Test FIFO fill level
//   0x05 TSTRT w  [7:0] test BN, [8] test CB; feeds the test pattern once
//   0x06 VCLR  w  clear all veto flags
//   0x10-0x18 mask, 0x20-0x28 test pattern: bit 32*w+k of word w is input
//                 bit layer*96+pad.
// Mask, test pattern and control bits are static settings used in the 48 ns
// domain; the clear level and the start strobe cross by flip-flop chains.
// rdata is valid one cycle after re. The map is this design's own.
module pretrigger_board
  import hpt_pkg::*;
(
  input  logic            clk48,
  input  logic            rst48_n,
  input  logic            clk25,
  input  logic            rst25_n,
  input  ab_word_t        rx_word [N_XFER],
  input  logic [3:0]      card,
  // handshake bus to the Message Generator
  output logic            dav,
  input  logic            dac,
  output dataset_t        bus_data,     // driven only while dac is high
  // calorimeter veto (25 MHz domain)
  input  logic            veto_we,
  input  logic [BN_W-1:0] veto_bn,
  // register bus
  input  logic [7:0]      vme_addr,
  input  logic [31:0]     vme_wdata,
  input  logic            vme_we,
  input  logic            vme_re,
  output logic [31:0]     vme_rdata,
  output logic            irq
);
  localparam int unsigned NB = N_LAYERS * N_PADS;   // 288
  localparam int unsigned NW = NB / 32;             // 9

  // ---------------- registers (clk25) ----------------
  logic [31:0] mask_w [NW];
  logic [31:0] test_w [NW];
  logic        test_mode, irq_en, bnerr_clr;
  logic [6:0]  max_sets;
  logic [BN_W-1:0] test_bn;
  logic        test_cb, test_tgl, count_clr, veto_clr, wd_clr;
  logic        tf_re;

  // ---------------- unpacking (clk48) ----------------
  logic [N_PADS-1:0] pads [N_LAYERS];
  logic [N_LINK-1:0] cb_a, bn_a, cb_b;
  logic [BN_W-1:0]   bn_b [N_LINK];
  logic [N_PADS-1:0] mask_l [N_LAYERS];
  logic [N_PADS-1:0] test_l [N_LAYERS];
  logic [NB-1:0]     mask_v, test_v;

  always_comb begin
    for (int w = 0; w < int'(NW); w++) begin
      mask_v[32*w +: 32] = mask_w[w];
      test_v[32*w +: 32] = test_w[w];
    end
    for (int L = 0; L < int'(N_LAYERS); L++) begin
      mask_l[L] = mask_v[L*N_PADS +: N_PADS];
      test_l[L] = test_v[L*N_PADS +: N_PADS];
      for (int h = 0; h < 2; h++) begin
        int l;
        l = 2*L + h;
        pads[L][h*HALF_PADS +: TX1_PADS]            = rx_word[2*l][TX1_PADS-1:0];
        pads[L][h*HALF_PADS+TX1_PADS +: TX2_PADS]   = rx_word[2*l+1][TX2_PADS-1:0];
      end
    end
    for (int l = 0; l < int'(N_LINK); l++) begin
      cb_a[l] = rx_word[2*l][31];
      bn_a[l] = rx_word[2*l][30];
      cb_b[l] = rx_word[2*l+1][31];
      bn_b[l] = rx_word[2*l+1][TX2_PADS +: BN_W];
    end
  end

  // settings into the 48 ns domain
  logic [1:0] clr_s48, tm_s48;
  logic [2:0] tst_s48;
  logic       test_strobe48;
  always_ff @(posedge clk48 or negedge rst48_n) begin
    if (!rst48_n) begin
      clr_s48 <= '0; tm_s48 <= '0; tst_s48 <= '0;
    end else begin
      clr_s48 <= {clr_s48[0], bnerr_clr};
      tm_s48  <= {tm_s48[0], test_mode};
      tst_s48 <= {tst_s48[1:0], test_tgl};
    end
  end
  assign test_strobe48 = tst_s48[2] ^ tst_s48[1];

  logic [BN_W-1:0] bn_s1;
  logic            cb_s1, bn_mis, bn_err, bn_irq;

  bn_compare u_bnc (
    .clk(clk48), .rst_n(rst48_n), .enable(!tm_s48[1]),
    .cb_a, .bn_a, .cb_b, .bn_b,
    .err_clr(clr_s48[1]), .irq_en,
    .bn_out(bn_s1), .cb_out(cb_s1), .mismatch(bn_mis), .err(bn_err), .irq(bn_irq));

  logic              ev_we;
  event_t            ev_w;

  coincidence_logic u_coinc (
    .clk(clk48), .rst_n(rst48_n),
    .pt1(pads[0]), .pt2(pads[1]), .pt3(pads[2]),
    .bn_in(bn_s1), .cb_in(cb_s1),
    .mask(mask_l), .test_mode(tm_s48[1]), .test_strobe(test_strobe48),
    .test_pads(test_l), .test_bn, .test_cb,
    .fifo_we(ev_we), .rsf_out(ev_w.rsf), .pt2_out(ev_w.pt2), .pt3_out(ev_w.pt3),
    .bn_out(ev_w.bn), .cb_out(ev_w.cb));

  // ---------------- Event FIFO ----------------
  logic   ev_full, ev_ovf, ev_empty, ev_re;
  event_t ev_r;
  logic [$bits(event_t)-1:0] ev_rbits;

  async_fifo #(.WIDTH($bits(event_t)), .DEPTH(512)) u_evfifo (
    .wclk(clk48), .wrst_n(rst48_n), .we(ev_we), .wdata(ev_w), .wfull(ev_full), .overflow(ev_ovf),
    .rclk(clk25), .rrst_n(rst25_n), .re(ev_re), .rdata(ev_rbits), .rempty(ev_empty));
  assign ev_r = event_t'(ev_rbits);

  // ---------------- output side (clk25) ----------------
  logic            vhit, vdone, vq_cb, vetoed;
  logic [BN_W-1:0] vq_bn;
  logic            tf_we, tf_full, tf_empty;
  logic [31:0]     tf_wdata, tf_rdata;
  logic [9:0]      tf_count;
  logic [28:0]     count;
  dataset_t        out_data;

  veto_logic u_veto (
    .clk(clk25), .rst_n(rst25_n), .veto_we, .veto_bn,
    .q_bn(vq_bn), .q_cb(vq_cb), .q_done(vdone), .clr_all(veto_clr), .hit(vhit));

  ptb_output_ctrl u_out (
    .clk(clk25), .rst_n(rst25_n),
    .fifo_rdata(ev_r), .fifo_empty(ev_empty), .fifo_re(ev_re),
    .veto_hit(vhit), .veto_q_bn(vq_bn), .veto_q_cb(vq_cb), .veto_q_done(vdone),
    .max_sets, .card, .count_clr,
    .dav, .dac, .data(out_data),
    .tf_we, .tf_wdata, .count, .vetoed);

  assign bus_data = dac ? out_data : '0;

  sync_fifo #(.WIDTH(32), .DEPTH(512)) u_tfifo (
    .clk(clk25), .rst_n(rst25_n), .we(tf_we), .wdata(tf_wdata), .full(tf_full),
    .re(tf_re), .rdata(tf_rdata), .empty(tf_empty), .count(tf_count));

  logic wd_err;
  clock_watchdog #(.TIMEOUT(16)) u_wd (
    .clk(clk25), .rst_n(rst25_n), .mon_clk(clk48), .mon_rst_n(rst48_n),
    .clr(wd_clr), .err(wd_err));

  // status bits from the 48 ns domain
  logic [1:0] err_s25, ovf_s25, irq_s25;
  always_ff @(posedge clk25 or negedge rst25_n) begin
    if (!rst25_n) begin
      err_s25 <= '0; ovf_s25 <= '0; irq_s25 <= '0;
    end else begin
      err_s25 <= {err_s25[0], bn_err};
      ovf_s25 <= {ovf_s25[0], ev_ovf};
      irq_s25 <= {irq_s25[0], bn_irq};
    end
  end
  assign irq = irq_s25[1];

  // ---------------- register bus ----------------
  assign tf_re     = vme_re && (vme_addr == 8'h03);
  assign count_clr = vme_we && (vme_addr == 8'h02);
  assign veto_clr  = vme_we && (vme_addr == 8'h06);
  assign wd_clr    = vme_we && (vme_addr == 8'h01) && vme_wdata[1];

  always_ff @(posedge clk25 or negedge rst25_n) begin
    if (!rst25_n) begin
      for (int w = 0; w < int'(NW); w++) begin
        mask_w[w] <= '0;
        test_w[w] <= '0;
      end
      test_mode <= 1'b0; irq_en <= 1'b0; bnerr_clr <= 1'b0; max_sets <= '0;
      test_bn <= '0; test_cb <= 1'b0; test_tgl <= 1'b0;
      vme_rdata <= '0;
    end else begin
      if (vme_we) begin
        unique case (vme_addr) inside
          8'h00: begin
            test_mode <= vme_wdata[0];
            irq_en    <= vme_wdata[1];
            bnerr_clr <= vme_wdata[2];
            max_sets  <= vme_wdata[14:8];
          end
          8'h05: begin
            test_bn  <= vme_wdata[7:0];
            test_cb  <= vme_wdata[8];
            test_tgl <= ~test_tgl;
          end
          [8'h10:8'h18]: mask_w[vme_addr[3:0]] <= vme_wdata;
          [8'h20:8'h28]: test_w[vme_addr[3:0]] <= vme_wdata;
          default: ;
        endcase
      end
      if (vme_re) begin
        unique case (vme_addr)
          8'h00:   vme_rdata <= {17'd0, max_sets, 5'd0, bnerr_clr, irq_en, test_mode};
          8'h01:   vme_rdata <= {28'd0, tf_empty, ovf_s25[1], wd_err, err_s25[1]};
          8'h02:   vme_rdata <= {3'd0, count};
          8'h03:   vme_rdata <= tf_rdata;
          8'h04:   vme_rdata <= {22'd0, tf_count};
          default: vme_rdata <= '0;
        endcase
      end
    end
  end
endmodule
