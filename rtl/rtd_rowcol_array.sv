// rtd_rowcol_array: flip-flop array with real-time parity on rows and columns.
//
// Every row has an XOR tree giving its real-time row parity (rtp_r) and a
// stored expected row parity (r.ep); every column likewise has rtp_c and a
// stored expected column parity (c.ep). Their XORs are the real-time error
// signals r.err and c.err. Because a row's error is known without reading
// its data, the read needs no parity tree at all:
//     out = d[row] ^ (r[row].err ? c.err : 0)
// (the column correction vector ccv). A single corrupted data bit anywhere
// in the array is thus corrected when its row is read. A fault in an r.ep or
// c.ep cell raises only a row or only a column error and flips nothing.
//
// Write (rising edge, wen = 1): the row takes din, its r.ep takes the parity
// of din, and c.ep ^= din ^ PD', where PD' is the overwritten row with its
// faulty bits inverted (PD ^ ccv of that row), so overwriting a corrupted
// row clears the column errors it caused.
// Read: combinational, dout valid in the cycle of raddr/ren.
// Initialisation: the cells have no reset; in the first cycle after reset,
// and when sync is pulsed, r.ep and c.ep take the real-time parities.
// Error injection (this design's own test hook): inj_en flips the cells of
// row inj_row selected by inj_mask; inj_rep / inj_cep flip expected-parity
// cells. All flips happen at the clock edge without updating any parity.
//
// Follows the document's combined row/column scheme with the default 4x4
// size of its example; the write-side logic, which the document describes in
// words only, and the initialisation are this design's reading of it.
module rtd_rowcol_array #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync,
  // write port
  input  logic            wen,
  input  logic [AW-1:0]   waddr,
  input  logic [COLS-1:0] din,
  // read port
  input  logic            ren,
  input  logic [AW-1:0]   raddr,
  output logic [COLS-1:0] dout,
  output logic            rd_corr,
  // error injection
  input  logic            inj_en,
  input  logic [AW-1:0]   inj_row,
  input  logic [COLS-1:0] inj_mask,
  input  logic [ROWS-1:0] inj_rep,
  input  logic [COLS-1:0] inj_cep,
  // real-time error signals
  output logic [ROWS-1:0] row_err,
  output logic [COLS-1:0] col_err,
  output logic            rtd_err
);
  logic [ROWS-1:0][COLS-1:0] d;
  logic [ROWS-1:0]           rep, rtp_r;
  logic [COLS-1:0]           cep, rtp_c;
  logic                      reload;

  // real-time row and column parity
  always_comb begin
    rtp_c = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      rtp_r[r] = ^d[r];
      rtp_c    = rtp_c ^ d[r];
    end
  end

  assign row_err = reload ? '0 : (rtp_r ^ rep);
  assign col_err = reload ? '0 : (rtp_c ^ cep);
  assign rtd_err = |row_err || |col_err;

  // read: column correction vector applied when the row's error is set
  always_comb begin
    dout    = '0;
    rd_corr = 1'b0;
    if (ren) begin
      rd_corr = row_err[raddr];
      dout    = d[raddr] ^ (rd_corr ? col_err : '0);
    end
  end

  // overwritten row with its faulty bits inverted
  logic [COLS-1:0] pd_fixed;
  assign pd_fixed = d[waddr] ^ (row_err[waddr] ? col_err : '0);

  // data cells: no reset
  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (wen && waddr == AW'(r)) d[r] <= din;
      if (inj_en && inj_row == AW'(r)) d[r] <= (wen && waddr == AW'(r) ? din : d[r]) ^ inj_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reload <= 1'b1;
    else        reload <= 1'b0;
  end

  // expected parity cells
  logic [ROWS-1:0] rep_n;
  logic [COLS-1:0] cep_n;

  always_comb begin
    if (reload || sync) begin
      rep_n = rtp_r;
      cep_n = rtp_c;
      if (wen) cep_n = cep_n ^ d[waddr] ^ din;
    end else begin
      rep_n = rep;
      cep_n = cep;
      if (wen) cep_n = cep_n ^ pd_fixed ^ din;
    end
    if (wen) rep_n[waddr] = ^din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep <= '0;
      cep <= '0;
    end else begin
      rep <= rep_n ^ inj_rep;
      cep <= cep_n ^ inj_cep;
    end
  end
endmodule
