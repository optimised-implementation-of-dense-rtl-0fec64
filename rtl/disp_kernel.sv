// disp_kernel: disparity kernel for one window position.
//
// Two shift-tap chains hold the image data. The left chain (WIN*WIN taps)
// holds the WIN x WIN reference window of the left image. The right chain
// (WIN*(NDISP+WIN-1) taps) holds NDISP+WIN-1 columns of the same WIN rows of
// the right image, starting at the reference window's column. Both chains are
// filled column by column, top row first, so after a full fill the oldest
// column sits at the far end of each chain.
//
// NDISP SAD modules work in parallel: module d compares the left window with
// the right window that starts d columns further right (I_R(x+d, y), as in
// the SAD cost definition used by this design). A compute pulse loads all
// SAD registers (clock 1); the disparity segregator picks the smallest SAD and
// registers its index (clock 2). out_valid is therefore high two clocks after
// compute. shift_l/shift_r may be used while a result is being formed only
// after the compute clock.
//
// The chain-plus-64-SAD-plus-segregator structure is the published one; the
// right chain length (340 taps for 64 disparities, derived from the window
// geometry) and the fill order are this design's.
module disp_kernel #(
  parameter int unsigned WIN    = 5,
  parameter int unsigned NDISP  = 64,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned SAD_W  = 13,
  parameter int unsigned DISP_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_l,
  input  logic [PIX_W-1:0]  din_l,
  input  logic              shift_r,
  input  logic [PIX_W-1:0]  din_r,
  input  logic              sw,
  input  logic              compute,
  output logic              out_valid,
  output logic [DISP_W-1:0] disp,
  output logic [SAD_W-1:0]  sad_min
);
  localparam int unsigned NPIX       = WIN * WIN;
  localparam int unsigned RCOLS      = NDISP + WIN - 1;
  localparam int unsigned RIGHT_TAPS = WIN * RCOLS;

  logic [PIX_W-1:0] ltaps [NPIX];
  logic [PIX_W-1:0] rtaps [RIGHT_TAPS];
  logic [PIX_W-1:0] lwin  [NPIX];
  logic [PIX_W-1:0] rwin  [NDISP][NPIX];
  logic [SAD_W-1:0] sad   [NDISP];
  logic             sad_valid;

  shift_tap #(.TAPS(NPIX), .PIX_W(PIX_W)) u_left (
    .clk, .rst_n, .en(shift_l), .din(din_l), .taps(ltaps));

  shift_tap #(.TAPS(RIGHT_TAPS), .PIX_W(PIX_W)) u_right (
    .clk, .rst_n, .en(shift_r), .din(din_r), .taps(rtaps));

  // Window element k = r*WIN + c (row r, column c of the window).
  always_comb begin
    for (int unsigned r = 0; r < WIN; r++)
      for (int unsigned c = 0; c < WIN; c++) begin
        lwin[r*WIN+c] = ltaps[(WIN-1-c)*WIN + (WIN-1-r)];
        for (int unsigned d = 0; d < NDISP; d++)
          rwin[d][r*WIN+c] = rtaps[(RCOLS-1-(d+c))*WIN + (WIN-1-r)];
      end
  end

  for (genvar d = 0; d < NDISP; d++) begin : g_sad
    sad_module #(.WIN(WIN), .PIX_W(PIX_W), .SAD_W(SAD_W)) u_sad (
      .clk, .rst_n, .en(compute), .sw, .in_a(lwin), .in_b(rwin[d]), .sad(sad[d]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sad_valid <= 1'b0;
    else        sad_valid <= compute;
  end

  disparity_segregator #(.N(NDISP), .SAD_W(SAD_W), .DISP_W(DISP_W)) u_ds (
    .clk, .rst_n, .in_valid(sad_valid), .sad, .out_valid, .disp, .sad_min);
endmodule
