// hpt_section: one section of the high-pT level-0 trigger logic.
//
// A section is N_LB Link Boards, N_PTB Pretrigger Boards and one Message
// Generator. The Link Boards sit at the detector and send the pads of two
// rows per bunch crossing as 32-bit words to Autobahn serializers; optical
// links carry them to the Pretrigger Boards. Those serial links are not
// logic and lie outside this module: lb_tx is what the transmitters take,
// ptb_rx what the receivers deliver (link l of PTB p is fed by global link
// channel g = l*N_PTB + p, i.e. channel g%3 of Link Board g/3, so each PTB
// sees six different Link Boards). Each PTB turns its row data into 27-bit
// road data sets; the Message Generator collects them over a bus with one
// DAV/DAC pair per PTB and sends 80-bit messages as 20-bit packages to the
// Track Finding Units. The whole trigger uses eight such sections.
// The PTB data bus is three-state on the boards; here each PTB drives zero
// unless its DAC is high and the bus is the OR of all drivers.
// Register bus: vme_slot 0..N_PTB-1 selects a PTB, N_PTB the Message
// Generator; vme_rdata follows one cycle after vme_re.
// Clocks: clk48 48 ns (Link Boards, PTB input side), clk25 25 MHz (PTB
// output side, Message Generator), clk100 100 MHz (TFU packages).
module hpt_section
  import hpt_pkg::*;
#(
  parameter int unsigned N_PTB = 8,
  parameter int unsigned N_LB  = (N_PTB * N_LINK + 2) / 3
) (
  input  logic                 clk48,
  input  logic                 rst48_n,
  input  logic                 clk25,
  input  logic                 rst25_n,
  input  logic                 clk100,
  input  logic                 rst100_n,
  // Link Board inputs
  input  logic                 bx,
  input  logic [BN_W-1:0]      bn,
  input  logic [HALF_PADS-1:0] lb_row_m  [N_LB][3],
  input  logic [HALF_PADS-1:0] lb_row_m1 [N_LB][3],
  // to the Autobahn transmitters / from the Autobahn receivers
  output ab_word_t             lb_tx  [N_LB][3][2],
  input  ab_word_t             ptb_rx [N_PTB][N_XFER],
  // calorimeter veto
  input  logic                 veto_we,
  input  logic [BN_W-1:0]      veto_bn,
  // to the Track Finding Units (TTL side of the PECL converters)
  input  logic                 tfu_en,
  output logic [TFU_W-1:0]     tfu_data,
  output logic                 tfu_valid,
  output logic                 tfu_first,
  // register bus
  input  logic [3:0]           vme_slot,
  input  logic [7:0]           vme_addr,
  input  logic [31:0]          vme_wdata,
  input  logic                 vme_we,
  input  logic                 vme_re,
  output logic [31:0]          vme_rdata,
  output logic                 irq
);
  for (genvar b = 0; b < int'(N_LB); b++) begin : g_lb
    link_board #(.N_CH(3)) u_lb (
      .clk(clk48), .rst_n(rst48_n), .bx, .bn,
      .row_m(lb_row_m[b]), .row_m1(lb_row_m1[b]), .tx_word(lb_tx[b]));
  end

  logic [N_PTB-1:0] dav, dac, p_irq;
  dataset_t         p_bus [N_PTB];
  dataset_t         bus;
  logic [31:0]      p_rdata [N_PTB];
  logic [31:0]      mg_rdata;
  logic [3:0]       slot_q;

  for (genvar p = 0; p < int'(N_PTB); p++) begin : g_ptb
    pretrigger_board u_ptb (
      .clk48, .rst48_n, .clk25, .rst25_n,
      .rx_word(ptb_rx[p]), .card(4'(p)),
      .dav(dav[p]), .dac(dac[p]), .bus_data(p_bus[p]),
      .veto_we, .veto_bn,
      .vme_addr, .vme_wdata,
      .vme_we(vme_we && vme_slot == 4'(p)), .vme_re(vme_re && vme_slot == 4'(p)),
      .vme_rdata(p_rdata[p]), .irq(p_irq[p]));
  end

  always_comb begin
    bus = '0;
    for (int p = 0; p < int'(N_PTB); p++) bus = bus | p_bus[p];
  end

  message_generator #(.N_PTB(N_PTB)) u_mg (
    .clk25, .rst25_n, .clk100, .rst100_n,
    .dav, .dac, .bus_data(bus),
    .tfu_en, .tfu_data, .tfu_valid, .tfu_first,
    .vme_addr, .vme_wdata,
    .vme_we(vme_we && vme_slot == 4'(N_PTB)), .vme_re(vme_re && vme_slot == 4'(N_PTB)),
    .vme_rdata(mg_rdata));

  always_ff @(posedge clk25 or negedge rst25_n) begin
    if (!rst25_n)    slot_q <= '0;
    else if (vme_re) slot_q <= vme_slot;
  end

  always_comb begin
    vme_rdata = mg_rdata;
    for (int p = 0; p < int'(N_PTB); p++)
      if (slot_q == 4'(p)) vme_rdata = p_rdata[p];
  end

  assign irq = |p_irq;
endmodule
