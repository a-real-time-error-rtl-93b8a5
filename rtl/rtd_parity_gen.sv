// rtd_parity_gen: row parity generator (G) with H-way horizontal interleaving.
//
// Parity bit k is the XOR of the data bits j with j % H == k. With H = 1 it
// is the single row parity of the basic 2D ECC scheme; with H = 2 it gives
// separate parity for even and odd bit positions, the configuration the
// document evaluates. Purely combinational (an XOR tree per bit).
module rtd_parity_gen #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned H      = 2
) (
  input  logic [DATA_W-1:0] data,
  output logic [H-1:0]      par
);
  always_comb begin
    par = '0;
    for (int unsigned j = 0; j < DATA_W; j++)
      par[j % H] ^= data[j];
  end
endmodule
