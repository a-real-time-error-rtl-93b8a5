// rtd_row_checker: row parity checker (C1 on the read port, C2 on the PD port).
//
// Recomputes the H interleaved parity bits of a row read from the array and
// compares them with the parity bits stored with it. perr[k] = 1 means
// partition k of the row holds an odd number of faults. Combinational.
module rtd_row_checker #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned H      = 2
) (
  input  logic [DATA_W-1:0] data,
  input  logic [H-1:0]      par,
  output logic [H-1:0]      perr
);
  logic [H-1:0] calc;

  rtd_parity_gen #(.DATA_W(DATA_W), .H(H)) u_gen (.data(data), .par(calc));

  assign perr = calc ^ par;
endmodule
