// sram_mux: selects which user drives the single SRAM port.
//
// Three users request SRAM access: index 0 the disparity writer, index 1 the
// line-buffer loader, index 2 the UART host link. The valid request with the
// lowest index wins (fixed priority) and is granted in the same clock; the
// others wait and keep requesting. Combinational. The published design draws
// multiplexers in front of the address map and the SRAM data input, steered
// by the controller; the fixed-priority rule is this design's choice.
module sram_mux
  import stereo_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  sram_req_t   req [N],
  output logic [N-1:0] gnt,
  output sram_req_t   sel
);
  always_comb begin
    gnt = '0;
    sel = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[k].valid) begin
        gnt = '0;
        gnt[k] = 1'b1;
        sel = req[k];
      end
    end
  end
endmodule
