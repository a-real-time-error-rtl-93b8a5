// rtd_2d_ecc_array: flip-flop memory array with in-line 2D ECC built on
// real-time error detection (RTD).
//
// Idea: every column of the array carries an XOR tree that gives its parity
// in real time (RTCP). A stored-column-parity register (SCP) tracks what that
// parity should be, so EV = SCP ^ RTCP names, at every cycle and without any
// read, the columns that hold a fault. Each row also stores H interleaved
// parity bits. A read therefore needs only a parity tree (checker C1) in
// series with the data: if the row's parity fails, the faulty bits are the
// EV bits of the failing partitions, and they are flipped on the way out.
// Decoder D (rtd_ecc_decoder) raises DUE where that is not safe.
//
// Organisation: COLS = DATA_W + H bit-slices (rtd_bitslice) share one read
// and one write address decoder. Each slice has a read mux column, a PD mux
// column that reads the row being overwritten, and the RTCP XOR column(s).
//
// Write (rising clk edge, wen = 1 and wready = 1): the row at waddr takes
// {parity, din}. With PD_PORT = 1 (default) each bit-slice has its own PD mux
// column and a write takes one cycle (wready is always 1). With PD_PORT = 0
// that column is left out: a write takes two cycles, the first reading the
// old row through the regular read port into a register (wready = 0, and the
// read port is taken: rready = 0, the external read is not served), the
// second writing. wen, waddr and din must be held until wready is seen.
// In the same cycle checker C2 checks the overwritten row PD; the decoder
// turns a correctable PD fault into a correction vector so the SCP update
// SCP ^= IN ^ PD ^ CV uses the fault-free PD. wr_keep_scp = 1 writes the row
// without touching the SCP; it is used to write back a row restored to its
// fault-free value (demand scrubbing), which leaves the column parity as is.
//
// Read (combinational, ren = 1): dout, rd_ce and rd_due settle in the same
// cycle as raddr. rd_row and rd_perr give the raw stored row and its parity
// status for the scrubber. Reading and writing the same row in one cycle
// returns the old content.
//
// RTD control: rtd_en = 0 (a control bit for field operation) holds the SCP
// and zeroes EV; the row parity still detects errors and reports them as
// DUE. scp_sync reloads the SCP from the RTCP. The SCP is also reloaded in
// the first enabled cycle after reset, because the cells have no reset.
//
// Error injection: when inj_en = 1 the cells of row inj_row selected by
// inj_mask are inverted at the clock edge, without an SCP update. This is
// how a test models an upset or an electrical bug; it is this design's own
// addition.
//
// Follows the document: the bit-slice structure, RTCP/SCP/EV, the SCP
// update rule, C1/C2 and decoder behaviour, H = 2 horizontal interleaving as
// evaluated, optional vertical interleaving V. This design's choices: the
// column layout (see rtd_pkg), combinational read, reload policy, the
// keep-SCP write and the injection port.
module rtd_2d_ecc_array
  import rtd_pkg::*;
#(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned H      = 2,
  parameter int unsigned V      = 1,
  parameter bit          PD_PORT = 1'b1,
  localparam int unsigned COLS  = DATA_W + H,
  localparam int unsigned AW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned VW    = (V > 1) ? $clog2(V) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rtd_en,
  input  logic                   scp_sync,
  // write port
  input  logic                   wen,
  input  logic [AW-1:0]          waddr,
  input  logic [DATA_W-1:0]      din,
  input  logic                   wr_keep_scp,
  output logic                   wready,
  output dec_e                   wr_dec,
  output logic                   wr_ce,
  output logic                   wr_due,
  // read port
  input  logic                   ren,
  input  logic [AW-1:0]          raddr,
  output logic                   rready,
  output logic [DATA_W-1:0]      dout,
  output dec_e                   rd_dec,
  output logic                   rd_ce,
  output logic                   rd_due,
  output logic [COLS-1:0]        rd_row,
  output logic [H-1:0]           rd_perr,
  // error injection
  input  logic                   inj_en,
  input  logic [AW-1:0]          inj_row,
  input  logic [COLS-1:0]        inj_mask,
  // real-time detection
  output logic [V-1:0][COLS-1:0] ev,
  output logic [V-1:0][COLS-1:0] scp,
  output logic                   rtd_err
);
  initial begin
    assert (ROWS >= 2 && (ROWS & (ROWS - 1)) == 0) else $error("ROWS must be a power of 2");
    assert (V >= 1 && (V & (V - 1)) == 0 && V <= ROWS) else $error("V must be a power of 2");
    assert (H >= 1 && H <= DATA_W) else $error("H out of range");
  end

  // ---------------- write sequencing (PD source) --------------------------
  // wr_go: the cells are written this cycle. pd_rd: the read port fetches
  // the old row for a two-cycle write (PD_PORT = 0 only).
  logic            wr_go, pd_rd;
  logic [AW-1:0]   raddr_i;
  logic            ren_i;
  logic [COLS-1:0] pd_mux, pd_row;

  if (PD_PORT) begin : g_pd_port
    assign wr_go  = wen;
    assign pd_rd  = 1'b0;
    assign pd_row = pd_mux;
  end else begin : g_pd_read
    logic            pd_phase;
    logic [COLS-1:0] pd_q;
    logic [AW-1:0]   pd_addr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pd_phase <= 1'b0;
        pd_q     <= '0;
        pd_addr  <= '0;
      end else begin
        pd_phase <= wen && !pd_phase;
        if (pd_rd) begin
          pd_q    <= rd_row;
          pd_addr <= waddr;
        end
      end
    end
    assign wr_go  = wen && pd_phase;
    assign pd_rd  = wen && !pd_phase;
    assign pd_row = pd_q;

    // the PD mux column is absent in this configuration
    logic unused_pd_mux;
    assign unused_pd_mux = ^pd_mux;

    // the write must keep its address between the two cycles
    always_ff @(posedge clk)
      if (wen && pd_phase)
        assert (waddr == pd_addr) else $error("waddr changed during a two-cycle write");
  end

  assign wready  = !pd_rd;
  assign rready  = !pd_rd;
  assign ren_i   = pd_rd || ren;
  assign raddr_i = pd_rd ? waddr : raddr;

  // ---------------- shared address decoders -----------------------------
  logic [ROWS-1:0] gwg, grg, ginj;

  rtd_addr_decoder #(.ROWS(ROWS)) u_wdec (.addr(waddr),   .en(wr_go),  .sel(gwg));
  rtd_addr_decoder #(.ROWS(ROWS)) u_rdec (.addr(raddr_i), .en(ren_i),  .sel(grg));
  rtd_addr_decoder #(.ROWS(ROWS)) u_idec (.addr(inj_row), .en(inj_en), .sel(ginj));

  // ---------------- row parity generator G -------------------------------
  logic [H-1:0]    wpar;
  logic [COLS-1:0] in_row;

  rtd_parity_gen #(.DATA_W(DATA_W), .H(H)) u_gen (.data(din), .par(wpar));
  assign in_row = {wpar, din};

  // ---------------- bit-slices -------------------------------------------
  logic [V-1:0][COLS-1:0] rtcp;

  for (genvar c = 0; c < COLS; c++) begin : g_slice
    logic [V-1:0] rtcp_c;

    rtd_bitslice #(.ROWS(ROWS), .V(V), .PD_MUX(PD_PORT)) u_slice (
      .clk  (clk),
      .din  (in_row[c]),
      .wsel (gwg),
      .flip (ginj & {ROWS{inj_mask[c]}}),
      .rsel (grg),
      .dout (rd_row[c]),
      .pd   (pd_mux[c]),
      .rtcp (rtcp_c)
    );

    for (genvar v = 0; v < V; v++) begin : g_v
      assign rtcp[v][c] = rtcp_c[v];
    end
  end

  // ---------------- SCP register and EV ----------------------------------
  logic [VW-1:0]   wcls, rcls;
  logic [COLS-1:0] wcv, rcv;

  assign wcls = VW'(waddr % AW'(V));
  assign rcls = VW'(raddr_i % AW'(V));

  rtd_scp #(.COLS(COLS), .V(V)) u_scp (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (rtd_en),
    .sync    (scp_sync),
    .upd     (wr_go && !wr_keep_scp),
    .upd_cls (wcls),
    .in_row  (in_row),
    .pd_row  (pd_row),
    .cv      (wcv),
    .rtcp    (rtcp),
    .scp     (scp),
    .ev      (ev),
    .err     (rtd_err)
  );

  // ---------------- read path: C1 + D + correction -----------------------
  rtd_row_checker #(.DATA_W(DATA_W), .H(H)) u_c1 (
    .data (rd_row[DATA_W-1:0]),
    .par  (rd_row[COLS-1:DATA_W]),
    .perr (rd_perr)
  );

  rtd_ecc_decoder #(.DATA_W(DATA_W), .H(H)) u_rd_dec (
    .en   (ren && rready),
    .perr (rd_perr),
    .ev   (ev[rcls]),
    .dec  (rd_dec),
    .ce   (rd_ce),
    .due  (rd_due),
    .cv   (rcv)
  );

  assign dout = rd_row[DATA_W-1:0] ^ rcv[DATA_W-1:0];

  // ---------------- write path: C2 + D for the overwritten row ----------
  logic [H-1:0] pd_perr;

  rtd_row_checker #(.DATA_W(DATA_W), .H(H)) u_c2 (
    .data (pd_row[DATA_W-1:0]),
    .par  (pd_row[COLS-1:DATA_W]),
    .perr (pd_perr)
  );

  rtd_ecc_decoder #(.DATA_W(DATA_W), .H(H)) u_wr_dec (
    .en   (wr_go),
    .perr (pd_perr),
    .ev   (ev[wcls]),
    .dec  (wr_dec),
    .ce   (wr_ce),
    .due  (wr_due),
    .cv   (wcv)
  );

  // the decoders report exactly one outcome
  always_comb begin
    assert (!(rd_ce && rd_due)) else $error("read decoder reports CE and DUE");
    assert (!(wr_ce && wr_due)) else $error("write decoder reports CE and DUE");
  end
endmodule
