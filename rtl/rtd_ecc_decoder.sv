// rtd_ecc_decoder: decoder D of the 2D ECC + RTD scheme.
//
// Inputs are the row parity status of the accessed row, one bit per
// horizontal interleave partition (from checker C1 or C2), and the error
// vector EV of the array (one bit per column). For every partition k it
// classifies the number of ones of EV in that partition as zero, odd or
// even-but-nonzero and decides:
//   * any partition with an even nonzero count          -> DUE
//   * a partition with a parity error but a zero count  -> DUE
//   * otherwise, a partition with a parity error        -> CE
//   * otherwise                                         -> NE
// With H = 1 this is the five-column table of the basic scheme, with H = 2
// the eight-column table of the interleaved scheme. On CE the correction
// vector CV holds the EV bits of the partitions whose parity failed; EV bits
// of partitions with good parity belong to faults in other rows and are
// masked. On NE and DUE, CV is zero (data passes unchanged).
// When en is low the decoder reports NE. Purely combinational.
module rtd_ecc_decoder
  import rtd_pkg::*;
#(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned H      = 2,
  localparam int unsigned COLS  = DATA_W + H
) (
  input  logic            en,
  input  logic [H-1:0]    perr,
  input  logic [COLS-1:0] ev,
  output dec_e            dec,
  output logic            ce,
  output logic            due,
  output logic [COLS-1:0] cv
);
  logic [H-1:0] odd, nz;

  always_comb begin
    odd = '0;
    nz  = '0;
    for (int unsigned c = 0; c < COLS; c++) begin
      int unsigned p;
      p      = col_part(c, DATA_W, H);
      odd[p] = odd[p] ^ ev[c];
      nz[p]  = nz[p] | ev[c];
    end
  end

  logic even_nz, perr_no_ev;
  assign even_nz    = |(nz & ~odd);
  assign perr_no_ev = |(perr & ~nz);

  always_comb begin
    if (!en)                          dec = DEC_NE;
    else if (even_nz || perr_no_ev)   dec = DEC_DUE;
    else if (|perr)                   dec = DEC_CE;
    else                              dec = DEC_NE;
  end

  assign ce  = (dec == DEC_CE);
  assign due = (dec == DEC_DUE);

  always_comb begin
    cv = '0;
    if (ce)
      for (int unsigned c = 0; c < COLS; c++)
        cv[c] = ev[c] & perr[col_part(c, DATA_W, H)];
  end
endmodule
