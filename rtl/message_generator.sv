// message_generator: the Message Generator (Master Card) of one section.
//
// Collects the 27-bit data sets of up to eight Pretrigger Boards and turns
// every hit PT2/PT3 pad pair of a road into an 80-bit message for the Track
// Finding Units. Pipeline at 25 MHz:
//   1. Handshake Logic picks a PTB (DAV/DAC) and fills the 30-bit Data Input
//      Register (PTB code + data set);
//   2. Road Encoder with Data Buffer: one combination code per cycle;
//   3. Look-up Table read and write of {15 constant bits, BN, 57 table bits}
//      into the 256 x 80 Message FIFO.
// At 100 MHz the 4:1 multiplexer sends each message as four 20-bit packages
// (to the TTL-to-PECL converters outside); a Test FIFO of 512 x 20 watches
// the package stream. The register bus stands in for VME (word addresses):
//   0x00 CTRL  rw [0] test mode
//   0x01 TDATA w  [29:0] test data set {PTB code, data set}
//   0x02 TSTRT w  feed the test data set once into the Data Input Register
//   0x03 LUTA  w  [17:0] table address
//   0x04 LUTLO rw w: low half to hold, r: table[LUTA][31:0]
//   0x05 LUTHI rw w: writes {wdata, held low half} to table[LUTA],
//                 r: table[LUTA][63:32]
//   0x06 TFIFO r  oldest Test FIFO package (popped by the read)
//   0x07 STAT  r  [0] Test FIFO empty, [1] Test FIFO overflow, [2] test pending
//   0x08 CONST rw [14:0] constant message bits
// rdata is valid one cycle after re. The map is this design's own.
module message_generator
  import hpt_pkg::*;
#(
  parameter int unsigned N_PTB = 8
) (
  input  logic             clk25,
  input  logic             rst25_n,
  input  logic             clk100,
  input  logic             rst100_n,
  input  logic [N_PTB-1:0] dav,
  output logic [N_PTB-1:0] dac,
  input  dataset_t         bus_data,
  input  logic             tfu_en,
  output logic [TFU_W-1:0] tfu_data,
  output logic             tfu_valid,
  output logic             tfu_first,
  input  logic [7:0]       vme_addr,
  input  logic [31:0]      vme_wdata,
  input  logic             vme_we,
  input  logic             vme_re,
  output logic [31:0]      vme_rdata
);
  // registers
  logic               test_mode, test_pend, test_taken;
  mg_in_t             test_data;
  logic [LUT_AW-1:0]  luta;
  logic [31:0]        lut_lo;
  logic [CONST_W-1:0] konst;
  logic               lut_we;
  logic [LUT_DW-1:0]  lut_rd_b;

  // stage 1
  logic   dir_valid, dir_ready;
  mg_in_t dir_data;

  mg_handshake #(.N_PTB(N_PTB)) u_hs (
    .clk(clk25), .rst_n(rst25_n), .dav, .dac, .bus_data,
    .test_mode, .test_load(test_pend), .test_data, .test_taken,
    .dir_valid, .dir_data, .dir_ready);

  // stage 2
  logic       re_valid, re_ready;
  logic [4:0] re_code;
  mg_buf_t    re_buf;

  road_encoder u_re (
    .clk(clk25), .rst_n(rst25_n),
    .in_valid(dir_valid), .in_data(dir_data), .in_ready(dir_ready),
    .out_valid(re_valid), .out_code(re_code), .out_buf(re_buf), .out_ready(re_ready));

  // stage 3
  lut_addr_t         lut_addr;
  logic [LUT_DW-1:0] lut_data;
  logic              mf_we, mf_full, mf_ovf, mf_empty, mf_re;
  message_t          mf_wdata;
  logic [MSG_W-1:0]  mf_rdata;

  mg_msg_stage u_ms (
    .clk(clk25), .rst_n(rst25_n),
    .in_valid(re_valid), .in_code(re_code), .in_buf(re_buf), .in_ready(re_ready),
    .lut_addr, .lut_data, .konst, .mf_we, .mf_wdata, .mf_full);

  lut_sram #(.AW(LUT_AW), .DW(LUT_DW)) u_lut (
    .clk(clk25), .we(lut_we), .waddr(luta), .wdata({vme_wdata, lut_lo}),
    .raddr_a(lut_addr), .rdata_a(lut_data), .raddr_b(luta), .rdata_b(lut_rd_b));

  async_fifo #(.WIDTH(MSG_W), .DEPTH(256)) u_mfifo (
    .wclk(clk25), .wrst_n(rst25_n), .we(mf_we), .wdata(mf_wdata), .wfull(mf_full), .overflow(mf_ovf),
    .rclk(clk100), .rrst_n(rst100_n), .re(mf_re), .rdata(mf_rdata), .rempty(mf_empty));

  tfu_mux u_mux (
    .clk(clk100), .rst_n(rst100_n), .msg_empty(mf_empty), .msg_data(mf_rdata), .msg_re(mf_re),
    .tfu_en, .tfu_data, .tfu_valid, .tfu_first);

  // Test FIFO watching the output packages
  logic             tf_full, tf_ovf, tf_empty, tf_re;
  logic [TFU_W-1:0] tf_rdata;

  async_fifo #(.WIDTH(TFU_W), .DEPTH(512)) u_tfifo (
    .wclk(clk100), .wrst_n(rst100_n), .we(tfu_valid), .wdata(tfu_data), .wfull(tf_full), .overflow(tf_ovf),
    .rclk(clk25), .rrst_n(rst25_n), .re(tf_re), .rdata(tf_rdata), .rempty(tf_empty));

  logic [1:0] ovf_s;
  always_ff @(posedge clk25 or negedge rst25_n) begin
    if (!rst25_n) ovf_s <= '0;
    else          ovf_s <= {ovf_s[0], tf_ovf};
  end

  // register bus
  assign tf_re  = vme_re && (vme_addr == 8'h06);
  assign lut_we = vme_we && (vme_addr == 8'h05);

  always_ff @(posedge clk25 or negedge rst25_n) begin
    if (!rst25_n) begin
      test_mode <= 1'b0; test_pend <= 1'b0; test_data <= '0;
      luta <= '0; lut_lo <= '0; konst <= '0; vme_rdata <= '0;
    end else begin
      if (test_taken) test_pend <= 1'b0;
      if (vme_we) begin
        unique case (vme_addr)
          8'h00: test_mode <= vme_wdata[0];
          8'h01: test_data <= mg_in_t'(vme_wdata[$bits(mg_in_t)-1:0]);
          8'h02: test_pend <= 1'b1;
          8'h03: luta      <= vme_wdata[LUT_AW-1:0];
          8'h04: lut_lo    <= vme_wdata;
          8'h08: konst     <= vme_wdata[CONST_W-1:0];
          default: ;
        endcase
      end
      if (vme_re) begin
        unique case (vme_addr)
          8'h00:   vme_rdata <= {31'd0, test_mode};
          8'h04:   vme_rdata <= lut_rd_b[31:0];
          8'h05:   vme_rdata <= lut_rd_b[63:32];
          8'h06:   vme_rdata <= {12'd0, tf_rdata};
          8'h07:   vme_rdata <= {29'd0, test_pend, ovf_s[1], tf_empty};
          8'h08:   vme_rdata <= {17'd0, konst};
          default: vme_rdata <= '0;
        endcase
      end
    end
  end
endmodule
