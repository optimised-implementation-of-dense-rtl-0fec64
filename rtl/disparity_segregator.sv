// disparity_segregator: winner-take-all selection of the smallest SAD.
//
// The N SADs (one per candidate disparity d = 0..N-1) enter a binary tree of
// comparator/multiplexer stages: each comparator looks at two neighbouring
// candidates and its one-bit result steers a multiplexer that passes on the
// smaller SAD together with its disparity index. log2(N) levels later the
// survivor is the minimum; its index is the disparity. Results are registered:
// out_valid, disp and sad_min follow in_valid by one clock.
//
// The compare-and-multiplex tree follows the published description; on equal
// SADs the smaller disparity wins, which is this design's own rule.
module disparity_segregator #(
  parameter int unsigned N      = 64,
  parameter int unsigned SAD_W  = 13,
  parameter int unsigned DISP_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SAD_W-1:0]  sad [N],
  output logic              out_valid,
  output logic [DISP_W-1:0] disp,
  output logic [SAD_W-1:0]  sad_min
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP     = 1 << LEVELS;

  logic [SAD_W-1:0]  val [LEVELS+1][NP];
  logic [DISP_W-1:0] idx [LEVELS+1][NP];
  logic              sel;

  always_comb begin
    sel = 1'b0;
    for (int unsigned k = 0; k < NP; k++) begin
      val[0][k] = (k < N) ? sad[k] : '1;   // padding never wins
      idx[0][k] = DISP_W'(k);
    end
    for (int unsigned lv = 1; lv <= LEVELS; lv++) begin
      for (int unsigned k = 0; k < NP; k++) begin
        if (k < (NP >> lv)) begin
          // comparator bit: 1 when the right-hand neighbour is strictly smaller
          sel = val[lv-1][2*k+1] < val[lv-1][2*k];
          val[lv][k] = sel ? val[lv-1][2*k+1] : val[lv-1][2*k];
          idx[lv][k] = sel ? idx[lv-1][2*k+1] : idx[lv-1][2*k];
        end else begin
          val[lv][k] = '1;
          idx[lv][k] = '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      disp      <= '0;
      sad_min   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        disp    <= idx[LEVELS][0];
        sad_min <= val[LEVELS][0];
      end
    end
  end
endmodule
