// sad_module: one SAD calculator for a WIN x WIN window pair.
//
// Each of the WIN*WIN pixel pairs passes through a 2:1 pair multiplexer, an
// absolute-difference unit and into the parallel adder; the sum is captured in
// a register when en is high, so the SAD appears one clock after en. This is
// the structure of the published SAD calculator (multiplexer, AD1..AD25,
// parallel adder, 13-bit SAD).
//
// The multiplexer select sw is drawn in the published figure without a stated
// purpose. Here sw=0 routes (in_a, in_b) to the AD inputs (L, R) and sw=1
// swaps them. Because |L-R| = |R-L| the SAD value is the same for either
// setting; the multiplexer only selects which image drives the L side.
module sad_module #(
  parameter int unsigned WIN   = 5,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned AD_W  = 9,
  parameter int unsigned SAD_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             sw,
  input  logic [PIX_W-1:0] in_a [WIN*WIN],
  input  logic [PIX_W-1:0] in_b [WIN*WIN],
  output logic [SAD_W-1:0] sad
);
  localparam int unsigned NPIX = WIN * WIN;

  logic [PIX_W-1:0] l_px [NPIX];
  logic [PIX_W-1:0] r_px [NPIX];
  logic [AD_W-1:0]  ad   [NPIX];
  logic [SAD_W-1:0] sum;

  always_comb begin
    for (int unsigned k = 0; k < NPIX; k++) begin
      l_px[k] = sw ? in_b[k] : in_a[k];
      r_px[k] = sw ? in_a[k] : in_b[k];
    end
  end

  for (genvar k = 0; k < NPIX; k++) begin : g_ad
    abs_diff #(.PIX_W(PIX_W), .AD_W(AD_W)) u_ad (.l(l_px[k]), .r(r_px[k]), .ad(ad[k]));
  end

  parallel_adder #(.N(NPIX), .IN_W(AD_W), .OUT_W(SAD_W)) u_add (.in_vec(ad), .sum(sum));

  always_ff @(posedge clk) begin
    if (!rst_n)  sad <= '0;
    else if (en) sad <= sum;
  end
endmodule
