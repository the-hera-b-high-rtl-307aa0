// bn_compare: Bunch Number comparison of the Pretrigger Board.
//
// The Bunch Number and Cycle Bit are the only predictable contents of the
// transfer channels, so their copies are compared every 48 ns to watch the
// links: 6 first-transmitter words carry CB and BN[0], 6 second-transmitter
// words carry CB and BN[7:0], 66 bits in all. Any disagreement with link 0's
// second word sets a sticky error flag; with irq_en set it raises irq.
// The flag is cleared by err_clr. The 9-bit BN/CB of link 0 is registered
// and passed on to the Event FIFO path, aligned with the coincidence logic's
// input register. Using link 0 as the reference is this design's choice.
module bn_compare
  import hpt_pkg::*;
#(
  parameter int unsigned N_L = N_LINK
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,        // compare only when live data flows
  input  logic [N_L-1:0]  cb_a,          // CB of first transmitters
  input  logic [N_L-1:0]  bn_a,          // BN[0] of first transmitters
  input  logic [N_L-1:0]  cb_b,          // CB of second transmitters
  input  logic [BN_W-1:0] bn_b [N_L],    // BN of second transmitters
  input  logic            err_clr,
  input  logic            irq_en,
  output logic [BN_W-1:0] bn_out,
  output logic            cb_out,
  output logic            mismatch,      // registered, this cycle's result
  output logic            err,
  output logic            irq
);
  logic diff;

  always_comb begin
    diff = 1'b0;
    for (int l = 0; l < N_L; l++) begin
      if (cb_a[l] != cb_b[0])     diff = 1'b1;
      if (cb_b[l] != cb_b[0])     diff = 1'b1;
      if (bn_a[l] != bn_b[0][0])  diff = 1'b1;
      if (bn_b[l] != bn_b[0])     diff = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bn_out   <= '0;
      cb_out   <= 1'b0;
      mismatch <= 1'b0;
      err      <= 1'b0;
    end else begin
      bn_out   <= bn_b[0];
      cb_out   <= cb_b[0];
      mismatch <= enable & diff;
      if (err_clr)              err <= 1'b0;
      else if (enable && diff)  err <= 1'b1;
    end
  end

  assign irq = err & irq_en;
endmodule
