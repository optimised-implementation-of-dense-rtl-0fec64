// sram_model: behavioural model of a synchronous 16-bit SRAM (testbench only).
//
// On each rising edge with ce_n low: a write (we_n low) stores wdata at addr;
// a read (oe_n low) drives mem[addr] on rdata from the next edge on. DEPTH
// words; contents start at zero. Testbenches preload or inspect mem directly.
module sram_model #(
  parameter int unsigned AW    = 18,
  parameter int unsigned DEPTH = 1 << AW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic          oe_n
);
  logic [15:0] mem [DEPTH];
  initial begin
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (!ce_n && !we_n) mem[addr] <= wdata;
    if (!ce_n && !oe_n) rdata <= mem[addr];
  end
endmodule
