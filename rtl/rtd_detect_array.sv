// rtd_detect_array: flip-flop array with real-time error detection only.
//
// The basic RTD arrangement: ROWS x COLS flip-flops in bit-slices, each with
// a read mux column, a previous-data (PD) mux column and a real-time column
// parity (RTCP) XOR tree, plus the stored column parity register (SCP).
// EV = SCP ^ RTCP flags, in real time and without any read, every column
// holding an odd number of faults (or a corrupted SCP bit). There is no row
// code, so nothing is corrected: reads return the stored data, and the error
// flag is meant to stop execution, start a repair, or, in post-silicon
// validation, mark the cycle in which an array corruption happened.
//
// Write (rising edge): the row takes din and SCP ^= din ^ PD. Without a row
// code a faulty PD cannot be repaired, so SCP and RTCP change by the same
// amount and a flagged column stays flagged even after the faulty cell is
// overwritten: the flag is sticky until sync reloads the SCP.
// Read: combinational. Initialisation and the enable behave as in rtd_scp:
// the SCP is loaded from the RTCP after reset, on sync and on re-enable.
// inj_* inverts cells at the clock edge; it is a test hook added here.
module rtd_detect_array #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rtd_en,
  input  logic            sync,
  input  logic            wen,
  input  logic [AW-1:0]   waddr,
  input  logic [COLS-1:0] din,
  input  logic            ren,
  input  logic [AW-1:0]   raddr,
  output logic [COLS-1:0] dout,
  input  logic            inj_en,
  input  logic [AW-1:0]   inj_row,
  input  logic [COLS-1:0] inj_mask,
  output logic [COLS-1:0] ev,
  output logic            rtd_err
);
  logic [ROWS-1:0] gwg, grg, ginj;

  rtd_addr_decoder #(.ROWS(ROWS)) u_wdec (.addr(waddr),   .en(wen),    .sel(gwg));
  rtd_addr_decoder #(.ROWS(ROWS)) u_rdec (.addr(raddr),   .en(ren),    .sel(grg));
  rtd_addr_decoder #(.ROWS(ROWS)) u_idec (.addr(inj_row), .en(inj_en), .sel(ginj));

  logic [COLS-1:0] pd_row, rtcp;

  for (genvar c = 0; c < COLS; c++) begin : g_slice
    rtd_bitslice #(.ROWS(ROWS), .V(1)) u_slice (
      .clk  (clk),
      .din  (din[c]),
      .wsel (gwg),
      .flip (ginj & {ROWS{inj_mask[c]}}),
      .rsel (grg),
      .dout (dout[c]),
      .pd   (pd_row[c]),
      .rtcp (rtcp[c])
    );
  end

  rtd_scp #(.COLS(COLS), .V(1)) u_scp (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (rtd_en),
    .sync    (sync),
    .upd     (wen),
    .upd_cls (1'b0),
    .in_row  (din),
    .pd_row  (pd_row),
    .cv      ('0),
    .rtcp    (rtcp),
    .scp     (),
    .ev      (ev),
    .err     (rtd_err)
  );
endmodule
