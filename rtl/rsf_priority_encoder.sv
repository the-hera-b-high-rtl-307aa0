// rsf_priority_encoder: the 7-bit priority encoder of the PTB output path.
//
// Returns the index of the most significant (highest-numbered) set bit of
// the Road Starting Flag pattern, and valid when any bit is set. Purely
// combinational; the output state machine registers the code as the first
// of its three pipeline steps.
module rsf_priority_encoder #(
  parameter int unsigned N = 96,
  parameter int unsigned W = $clog2(N)
) (
  input  logic [N-1:0] rsf,
  output logic [W-1:0] code,
  output logic         valid
);
  always_comb begin
    code  = '0;
    valid = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (rsf[i]) begin
        code  = W'(i);
        valid = 1'b1;
      end
    end
  end
endmodule
