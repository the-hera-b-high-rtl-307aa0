// lut_sram: the Look-up Table of the Message Generator, 256K x 64 bits.
//
// On the board a 15 ns static RAM module. For each road it holds the
// parameters that make up the message (57 bits used). The pipeline reads it
// asynchronously through port a within one 40 ns cycle; the register bus
// writes a whole word at a clock edge and reads it back through port b.
module lut_sram #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [DW-1:0] rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [DW-1:0] rdata_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
