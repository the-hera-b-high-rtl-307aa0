// road_pad_mux: pad multiplexer of the PTB output path.
//
// Given the RSF code i of a road, selects the WIN pads i+OFS .. i+OFS+WIN-1
// of one layer; pads outside the row read as 0. The board uses one for the
// 5 PT2 pads and one for the 6 PT3 pads of the road. The window position
// (starting two pads below the PT1 pad) is this design's reading of the road
// geometry and must match the coincidence logic.
module road_pad_mux #(
  parameter int unsigned N   = 96,
  parameter int unsigned WIN = 5,
  parameter int          OFS = -2,
  parameter int unsigned W   = $clog2(N)
) (
  input  logic [N-1:0]   pads,
  input  logic [W-1:0]   code,
  output logic [WIN-1:0] sel
);
  always_comb begin
    for (int k = 0; k < WIN; k++) begin
      int p;
      p = int'(code) + OFS + k;
      sel[k] = (p >= 0 && p < int'(N)) ? pads[p] : 1'b0;
    end
  end
endmodule
