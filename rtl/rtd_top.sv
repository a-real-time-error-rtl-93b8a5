// rtd_top: the RTD designs side by side.
//
// 1. A 2D ECC RTD flip-flop array (rtd_2d_ecc_array: ROWS x DATA_W data
//    bits, H interleaved row parity bits per row, real-time column parity)
//    with a demand scrubber (rtd_scrubber) attached to its ports. The array
//    corrects in line on every read; the scrubber additionally repairs the
//    stored content. A scrub runs on scrub_req, or, when scrub_auto is set,
//    once for every new rise of the array's real-time error flag. While a
//    scrub runs (busy = 1) the scrubber owns the read and write ports and
//    the external wen/ren are ignored: the user must stall until busy falls.
// 2. A small array with real-time row and column parity (rtd_rowcol_array),
//    with its own ports prefixed rc_.
// 3. A detection-only RTD array without row code (rtd_detect_array), with
//    its own ports prefixed d_.
// With PD_PORT = 0 the main array reads the old row through its read port
// before each write: a write then takes two cycles (wready) and takes the
// read port for the first (rready).
// All ports are plain signals. Timing is that of the blocks: reads are
// combinational, writes, injections and scrub steps act on the rising edge.
// The pairing of scrubber and in-line array and the trigger policy are this
// design's choices; the blocks follow the document.
module rtd_top
#(
  parameter int unsigned ROWS    = 64,
  parameter int unsigned DATA_W  = 64,
  parameter int unsigned H       = 2,
  parameter int unsigned V       = 1,
  parameter bit          PD_PORT = 1'b1,
  parameter int unsigned RC_ROWS = 4,
  parameter int unsigned RC_COLS = 4,
  parameter int unsigned D_ROWS  = 64,
  parameter int unsigned D_COLS  = 64,
  localparam int unsigned COLS   = DATA_W + H,
  localparam int unsigned AW     = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned RC_AW  = (RC_ROWS > 1) ? $clog2(RC_ROWS) : 1,
  localparam int unsigned D_AW   = (D_ROWS > 1) ? $clog2(D_ROWS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ---- 2D ECC RTD array ----
  input  logic                   rtd_en,
  input  logic                   scp_sync,
  input  logic                   wen,
  input  logic [AW-1:0]          waddr,
  input  logic [DATA_W-1:0]      din,
  output logic                   wready,
  output logic                   wr_ce,
  output logic                   wr_due,
  input  logic                   ren,
  input  logic [AW-1:0]          raddr,
  output logic                   rready,
  output logic [DATA_W-1:0]      dout,
  output logic                   rd_ce,
  output logic                   rd_due,
  input  logic                   inj_en,
  input  logic [AW-1:0]          inj_row,
  input  logic [COLS-1:0]        inj_mask,
  output logic [V-1:0][COLS-1:0] ev,
  output logic                   rtd_err,
  // ---- demand scrubbing ----
  input  logic                   scrub_req,
  input  logic                   scrub_auto,
  output logic                   busy,
  output logic                   scrub_done,
  output logic                   scrub_fixed,
  output logic                   scrub_due,
  // ---- row + column RTD array ----
  input  logic                   rc_sync,
  input  logic                   rc_wen,
  input  logic [RC_AW-1:0]       rc_waddr,
  input  logic [RC_COLS-1:0]     rc_din,
  input  logic                   rc_ren,
  input  logic [RC_AW-1:0]       rc_raddr,
  output logic [RC_COLS-1:0]     rc_dout,
  output logic                   rc_rd_corr,
  input  logic                   rc_inj_en,
  input  logic [RC_AW-1:0]       rc_inj_row,
  input  logic [RC_COLS-1:0]     rc_inj_mask,
  input  logic [RC_ROWS-1:0]     rc_inj_rep,
  input  logic [RC_COLS-1:0]     rc_inj_cep,
  output logic [RC_ROWS-1:0]     rc_row_err,
  output logic [RC_COLS-1:0]     rc_col_err,
  output logic                   rc_rtd_err,
  // ---- detection-only RTD array ----
  input  logic                   d_rtd_en,
  input  logic                   d_sync,
  input  logic                   d_wen,
  input  logic [D_AW-1:0]        d_waddr,
  input  logic [D_COLS-1:0]      d_din,
  input  logic                   d_ren,
  input  logic [D_AW-1:0]        d_raddr,
  output logic [D_COLS-1:0]      d_dout,
  input  logic                   d_inj_en,
  input  logic [D_AW-1:0]        d_inj_row,
  input  logic [D_COLS-1:0]      d_inj_mask,
  output logic [D_COLS-1:0]      d_ev,
  output logic                   d_rtd_err
);
  // ---------------- scrubber and port sharing ----------------------------
  logic                   s_start, s_rd_en, s_wr_en;
  logic [AW-1:0]          s_rd_addr, s_wr_addr;
  logic [DATA_W-1:0]      s_wr_data;
  logic [COLS-1:0]        a_rd_row;
  logic [H-1:0]           a_rd_perr;
  logic [V-1:0][COLS-1:0] a_scp;
  logic                   err_q, pend;

  // remember a new rise of the error flag until a scrub can start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q <= 1'b0;
      pend  <= 1'b0;
    end else begin
      err_q <= rtd_err;
      if (s_start)                              pend <= 1'b0;
      else if (scrub_auto && rtd_err && !err_q) pend <= 1'b1;
    end
  end

  assign s_start = !busy && (scrub_req || (scrub_auto && (pend || (rtd_err && !err_q))));

  rtd_scrubber #(.ROWS(ROWS), .DATA_W(DATA_W), .H(H), .V(V)) u_scrub (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (s_start),
    .busy    (busy),
    .done    (scrub_done),
    .fixed   (scrub_fixed),
    .due     (scrub_due),
    .rd_en   (s_rd_en),
    .rd_addr (s_rd_addr),
    .rd_row  (a_rd_row),
    .rd_perr (a_rd_perr),
    .wr_en   (s_wr_en),
    .wr_addr (s_wr_addr),
    .wr_data (s_wr_data),
    .wr_ready(wready),
    .ev      (ev),
    .scp     (a_scp)
  );

  // ---------------- 2D ECC RTD array -------------------------------------
  rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DATA_W), .H(H), .V(V), .PD_PORT(PD_PORT)) u_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .rtd_en      (rtd_en),
    .scp_sync    (scp_sync),
    .wen         (busy ? s_wr_en   : wen),
    .waddr       (busy ? s_wr_addr : waddr),
    .din         (busy ? s_wr_data : din),
    .wr_keep_scp (busy),
    .wready      (wready),
    .wr_dec      (),
    .wr_ce       (wr_ce),
    .wr_due      (wr_due),
    .ren         (busy ? s_rd_en   : ren),
    .raddr       (busy ? s_rd_addr : raddr),
    .rready      (rready),
    .dout        (dout),
    .rd_dec      (),
    .rd_ce       (rd_ce),
    .rd_due      (rd_due),
    .rd_row      (a_rd_row),
    .rd_perr     (a_rd_perr),
    .inj_en      (inj_en),
    .inj_row     (inj_row),
    .inj_mask    (inj_mask),
    .ev          (ev),
    .scp         (a_scp),
    .rtd_err     (rtd_err)
  );

  // ---------------- row + column RTD array -------------------------------
  rtd_rowcol_array #(.ROWS(RC_ROWS), .COLS(RC_COLS)) u_rowcol (
    .clk      (clk),
    .rst_n    (rst_n),
    .sync     (rc_sync),
    .wen      (rc_wen),
    .waddr    (rc_waddr),
    .din      (rc_din),
    .ren      (rc_ren),
    .raddr    (rc_raddr),
    .dout     (rc_dout),
    .rd_corr  (rc_rd_corr),
    .inj_en   (rc_inj_en),
    .inj_row  (rc_inj_row),
    .inj_mask (rc_inj_mask),
    .inj_rep  (rc_inj_rep),
    .inj_cep  (rc_inj_cep),
    .row_err  (rc_row_err),
    .col_err  (rc_col_err),
    .rtd_err  (rc_rtd_err)
  );

  // ---------------- detection-only RTD array -----------------------------
  rtd_detect_array #(.ROWS(D_ROWS), .COLS(D_COLS)) u_detect (
    .clk      (clk),
    .rst_n    (rst_n),
    .rtd_en   (d_rtd_en),
    .sync     (d_sync),
    .wen      (d_wen),
    .waddr    (d_waddr),
    .din      (d_din),
    .ren      (d_ren),
    .raddr    (d_raddr),
    .dout     (d_dout),
    .inj_en   (d_inj_en),
    .inj_row  (d_inj_row),
    .inj_mask (d_inj_mask),
    .ev       (d_ev),
    .rtd_err  (d_rtd_err)
  );
endmodule
