// clock_watchdog: watch dog for the PTB's input system clock.
//
// A flip-flop toggles on every edge of the watched clock mon_clk. Its level
// is brought into clk's domain by two flip-flops; each change restarts a
// counter. If no change is seen for TIMEOUT cycles of clk, the sticky err
// flag is set until clr. With a 48 ns input clock and 40 ns clk a change
// arrives every 1-2 cycles, so the default of 16 cycles leaves a wide margin.
// The document only names the watch dog; this circuit is this design's own.
module clock_watchdog #(
  parameter int unsigned TIMEOUT = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mon_clk,
  input  logic mon_rst_n,
  input  logic clr,
  output logic err
);
  localparam int unsigned CW = $clog2(TIMEOUT + 1);
  logic          tgl;
  logic [2:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge mon_clk or negedge mon_rst_n) begin
    if (!mon_rst_n) tgl <= 1'b0;
    else            tgl <= ~tgl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      cnt  <= '0;
      err  <= 1'b0;
    end else begin
      sync <= {sync[1:0], tgl};
      if (sync[2] != sync[1]) cnt <= '0;
      else if (cnt != CW'(TIMEOUT)) cnt <= cnt + 1'b1;
      if (clr) err <= 1'b0;
      else if (cnt == CW'(TIMEOUT)) err <= 1'b1;
    end
  end
endmodule
