// rtd_addr_decoder: address decoder shared by all bit-slices of the array.
//
// Turns a binary row address into one-hot row gates (the global write gates
// gwg[] or global read gates grg[] of the bit-slice organisation). When the
// enable is low every gate is off, so no F/F is written or no F/F output
// reaches the read mux tree. Purely combinational.
//
// Follows the document: one decoder per port, shared by every bit-slice,
// gated by the port's enable. Its gate-level form (NAND/NOR pre-decode) is
// left to synthesis here.
module rtd_addr_decoder #(
  parameter int unsigned ROWS = 64,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [AW-1:0]   addr,
  input  logic            en,
  output logic [ROWS-1:0] sel
);
  always_comb begin
    sel = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      sel[r] = en && (addr == AW'(r));
  end
endmodule
