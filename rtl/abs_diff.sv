// abs_diff: absolute difference unit (one "AD" of the SAD calculator).
//
// Computes |l - r| of two pixels. Purely combinational. The output is AD_W
// bits wide, matching the 9-bit AD output of the published SAD calculator;
// for 8-bit pixels the top bit is always zero. How the difference is formed
// (compare, then subtract the smaller from the larger) is this design's choice.
module abs_diff #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned AD_W  = 9
) (
  input  logic [PIX_W-1:0] l,
  input  logic [PIX_W-1:0] r,
  output logic [AD_W-1:0]  ad
);
  always_comb begin
    if (l >= r) ad = AD_W'(l - r);
    else        ad = AD_W'(r - l);
  end
endmodule
