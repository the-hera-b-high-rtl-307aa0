// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Used as the Event FIFO of the Pretrigger Board (512 x 297, 48 ns write
// clock, 25 MHz read clock), the Message FIFO (256 x 80, 25 MHz to 100 MHz)
// and the Message Generator's Test FIFO (512 x 20). The board builds these
// from FIFO chips; this is the simplest logic with the same function.
// Write side: wdata is stored at the wclk edge where we is high and wfull low;
// a write into a full FIFO is dropped and sets the sticky overflow flag.
// Read side: rdata shows the oldest word whenever rempty is low (first word
// fall-through); re pops it. Pointers cross the clock domains through two
// flip-flops, so full/empty are conservative by two to three cycles.
module async_fifo #(
  parameter int unsigned WIDTH = 297,
  parameter int unsigned DEPTH = 512,          // power of two
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wfull  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + (AW+1)'(we && !wfull);

  always_ff @(posedge wclk) begin
    if (we && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && wfull) overflow <= 1'b1;
    end
  end

  // read domain
  assign rempty = (rgray == wgray_r2);
  assign rbin_n = rbin + (AW+1)'(re && !rempty);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
