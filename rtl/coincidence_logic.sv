// coincidence_logic: trigger road search of the Pretrigger Board.
//
// A three-stage pipeline on the 48 ns input clock, one detector row per cycle:
//  1. Input Register: the 3 x 96 pads (or, in test mode, the test pattern
//     for one cycle per test_strobe) are stored with masked bits cleared.
//  2. For every PT1 pad i a Road Starting Flag RSF[i] is formed:
//       RSF[i] = PT1[i] & OR_{j=i-2..i+2} PT2[j] & (PT3[j] | PT3[j+1])
//     i.e. the pad, one of the five PT2 pads of its road, and one of the two
//     PT3 pads joined to that PT2 pad. RSF, PT2, PT3, BN and CB are stored.
//  3. If any RSF is set (R-Flg), the data set is written to the Event FIFO
//     (zero suppression): fifo_we is high in the cycle before the third edge.
// The pipeline, masking, test register and the 1->5->6 road fan-out follow
// the document; the exact pad window of a road is this design's reading of
// the road figure (the real board loads it as CPLD firmware).
// bn_in/cb_in must be aligned with stage 1 (registered by bn_compare).
module coincidence_logic
  import hpt_pkg::*;
#(
  parameter int unsigned N = N_PADS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    pt1,
  input  logic [N-1:0]    pt2,
  input  logic [N-1:0]    pt3,
  input  logic [BN_W-1:0] bn_in,
  input  logic            cb_in,
  input  logic [N-1:0]    mask [3],     // 1 disables the input bit
  input  logic            test_mode,
  input  logic            test_strobe,
  input  logic [N-1:0]    test_pads [3],
  input  logic [BN_W-1:0] test_bn,
  input  logic            test_cb,
  output logic            fifo_we,      // R-Flg
  output logic [N-1:0]    rsf_out,
  output logic [N-1:0]    pt2_out,
  output logic [N-1:0]    pt3_out,
  output logic [BN_W-1:0] bn_out,
  output logic            cb_out
);
  // stage 1
  logic [N-1:0]    s1_p1, s1_p2, s1_p3;
  logic            s1_test;
  logic [BN_W-1:0] s1_tbn;
  logic            s1_tcb;
  // stage 2
  logic [N-1:0]    s2_rsf, s2_p2, s2_p3;
  logic [BN_W-1:0] s2_bn;
  logic            s2_cb;
  logic [N-1:0]    rsf_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_p1 <= '0; s1_p2 <= '0; s1_p3 <= '0;
      s1_test <= 1'b0; s1_tbn <= '0; s1_tcb <= 1'b0;
    end else begin
      if (test_mode) begin
        s1_p1 <= test_strobe ? (test_pads[0] & ~mask[0]) : '0;
        s1_p2 <= test_strobe ? (test_pads[1] & ~mask[1]) : '0;
        s1_p3 <= test_strobe ? (test_pads[2] & ~mask[2]) : '0;
      end else begin
        s1_p1 <= pt1 & ~mask[0];
        s1_p2 <= pt2 & ~mask[1];
        s1_p3 <= pt3 & ~mask[2];
      end
      s1_test <= test_mode;
      s1_tbn  <= test_bn;
      s1_tcb  <= test_cb;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      logic hit;
      hit = 1'b0;
      for (int d = -2; d <= 2; d++) begin
        int j;
        j = i + d;
        if (j >= 0 && j < int'(N)) begin
          if (s1_p2[j] && (s1_p3[j] || (j + 1 < int'(N) && s1_p3[j+1])))
            hit = 1'b1;
        end
      end
      rsf_c[i] = s1_p1[i] & hit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_rsf <= '0; s2_p2 <= '0; s2_p3 <= '0; s2_bn <= '0; s2_cb <= 1'b0;
    end else begin
      s2_rsf <= rsf_c;
      s2_p2  <= s1_p2;
      s2_p3  <= s1_p3;
      s2_bn  <= s1_test ? s1_tbn : bn_in;
      s2_cb  <= s1_test ? s1_tcb : cb_in;
    end
  end

  assign fifo_we = |s2_rsf;
  assign rsf_out = s2_rsf;
  assign pt2_out = s2_p2;
  assign pt3_out = s2_p3;
  assign bn_out  = s2_bn;
  assign cb_out  = s2_cb;
endmodule
