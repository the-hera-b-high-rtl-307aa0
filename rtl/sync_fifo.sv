// sync_fifo: single-clock FIFO, the Test FIFO of the Pretrigger Board.
//
// 512 x 32 as on the board. Every output data set is copied into it, so it
// can be read through the register bus to compare a test pattern's result
// with the expected values, or to watch the data stream during running.
// Words written while it is full are dropped (it only monitors).
// rdata shows the oldest word while empty is low; re pops it.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_w, do_r;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_w  = we && !full;
  assign do_r  = re && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_w) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_w) wp <= wp + 1'b1;
      if (do_r) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end
endmodule
