// shift_tap: byte-wide shift register with every stage brought out.
//
// When en is high, din enters taps[0] and every stored byte moves one stage
// up; taps[TAPS-1] is the oldest byte. The SAD kernel feeds it column by
// column, WIN rows per column, so TAPS = WIN*C bytes hold C columns of a
// WIN-row band of the image. The published design uses a 25-tap chain for the
// left image and a longer chain for the right image; the column-major fill
// order is this design's choice. Reset clears all stages.
module shift_tap #(
  parameter int unsigned TAPS  = 25,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PIX_W-1:0] din,
  output logic [PIX_W-1:0] taps [TAPS]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int unsigned k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
