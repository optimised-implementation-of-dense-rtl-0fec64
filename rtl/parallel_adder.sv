// parallel_adder: adds N unsigned operands in a balanced binary tree.
//
// Used to sum the 25 absolute differences of a 5x5 window into one SAD. The
// published design names a "parallel adder" with 25 9-bit inputs and a 13-bit
// output; the tree structure is this design's choice. Combinational: the sum
// is valid in the same cycle as the inputs. OUT_W must hold N*(2^IN_W-1) for
// an exact result (13 bits hold 25*255 for 8-bit pixels).
module parallel_adder #(
  parameter int unsigned N     = 25,
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 13
) (
  input  logic [IN_W-1:0]  in_vec [N],
  output logic [OUT_W-1:0] sum
);
  // Pad to a power of two and reduce level by level.
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP     = 1 << LEVELS;

  logic [OUT_W-1:0] node [LEVELS+1][NP];

  always_comb begin
    for (int unsigned k = 0; k < NP; k++)
      node[0][k] = (k < N) ? OUT_W'(in_vec[k]) : '0;
    for (int unsigned lv = 1; lv <= LEVELS; lv++)
      for (int unsigned k = 0; k < NP; k++)
        node[lv][k] = (k < (NP >> lv)) ? node[lv-1][2*k] + node[lv-1][2*k+1] : '0;
    sum = node[LEVELS][0];
  end
endmodule
