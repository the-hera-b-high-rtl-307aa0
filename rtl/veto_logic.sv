// veto_logic: inhibits events whose bunch numbers the calorimeter vetoes.
//
// The calorimeter distributes bunch numbers of crossings to be inhibited
// (veto_we with veto_bn). A table of one flag per bunch number remembers
// them. The output state machine looks up every event it takes from the
// Event FIFO (q_bn -> hit, combinational); when the second row (CB = 1) of a
// vetoed crossing is consumed (q_done with q_cb), the flag is cleared so the
// next orbit's crossing with the same number is not touched. clr_all empties
// the table. Only the existence of the veto is given by the document; the
// flag table and its clearing rule are this design's choices.
module veto_logic
  import hpt_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            veto_we,
  input  logic [BN_W-1:0] veto_bn,
  input  logic [BN_W-1:0] q_bn,
  input  logic            q_cb,
  input  logic            q_done,
  input  logic            clr_all,
  output logic            hit
);
  logic [2**BN_W-1:0] flag;

  assign hit = flag[q_bn];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag <= '0;
    end else if (clr_all) begin
      flag <= '0;
    end else begin
      if (q_done && q_cb && flag[q_bn]) flag[q_bn] <= 1'b0;
      if (veto_we)                      flag[veto_bn] <= 1'b1;
    end
  end
endmodule
