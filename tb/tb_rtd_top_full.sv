// tb_rtd_top_full: end-to-end run of the top with every parameter at its
// default: 64 rows x 64 data bits, H = 2, with the PD mux column (one-cycle
// writes), the 4x4 row/column array and the 64x64 detection-only array.
// It fills the array, then walks through every mechanism and counts how
// often each happened:
//   in-line correction on read (CE), DUE on read, PD correction on a write
//   over a faulty row, DUE on such a write, real-time detection right after
//   an upset, a manual scrub ending in DUE, an automatic scrub started by the
//   error flag that rewrites the faulty row, the stall of external accesses
//   while the scrubber owns the ports, an SCP resynchronisation, RTD switched
//   off and on, correction in the row/column array, two-cycle writes (when
//   the PD column is left out) and detection in the detection-only array.
// A mechanism that never happened counts as a failure.
module tb_rtd_top_full;
  localparam int ROWS = 64, DW = 64, H = 2, COLS = DW + H, AW = $clog2(ROWS);
  localparam int RC_ROWS = 4, RC_COLS = 4, RC_AW = 2;
  localparam int D_ROWS = 64, D_COLS = 64, D_AW = 6;
  localparam bit PD_PORT = 1'b1;
  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0;
  logic                 rtd_en, scp_sync, wen, wr_ce, wr_due, ren, rd_ce, rd_due, wready, rready;
  logic [AW-1:0]        waddr, raddr, inj_row;
  logic [DW-1:0]        din, dout;
  logic                 inj_en, rtd_err;
  logic [COLS-1:0]      inj_mask;
  logic [0:0][COLS-1:0] ev;
  logic                 scrub_req, scrub_auto, busy, scrub_done, scrub_fixed, scrub_due;
  logic                 rc_sync, rc_wen, rc_ren, rc_rd_corr, rc_inj_en, rc_rtd_err;
  logic [RC_AW-1:0]     rc_waddr, rc_raddr, rc_inj_row;
  logic [RC_COLS-1:0]   rc_din, rc_dout, rc_inj_mask, rc_inj_cep, rc_col_err;
  logic [RC_ROWS-1:0]   rc_inj_rep, rc_row_err;
  logic                 d_rtd_en, d_sync, d_wen, d_ren, d_inj_en, d_rtd_err;
  logic [D_AW-1:0]      d_waddr, d_raddr, d_inj_row;
  logic [D_COLS-1:0]    d_din, d_dout, d_inj_mask, d_ev;

  logic [DW-1:0]      gold [ROWS];
  logic [RC_COLS-1:0] rc_gold [RC_ROWS];

  rtd_top dut (.*);

  // mechanism counters
  int n_rd_ce, n_rd_due, n_wr_ce, n_wr_due, n_rt_detect, n_scrub_due, n_scrub_fix;
  int n_auto, n_stall, n_sync, n_off, n_rc_corr, n_two_cycle, n_d_detect;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(int a, logic [DW-1:0] d);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    #1;
    // hold the write until the array takes it
    while (!wready) begin
      n_two_cycle++;
      @(negedge clk);
      #1;
    end
    begin
      if (wr_ce)  n_wr_ce++;
      if (wr_due) n_wr_due++;
    end
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  // read; exp: 0 NE, 1 CE, 2 DUE
  task automatic rd(int a, int exp);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1;
    check(rd_ce == (exp == 1) && rd_due == (exp == 2),
          $sformatf("read row %0d ce=%b due=%b, expected %0d", a, rd_ce, rd_due, exp));
    if (exp != 2) check(dout == gold[a], $sformatf("read row %0d data %h, expected %h", a, dout, gold[a]));
    if (rd_ce)  n_rd_ce++;
    if (rd_due) n_rd_due++;
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_mask = m;
    @(posedge clk);
    #1 inj_en = 0;
  endtask

  task automatic wait_done(output int cycles);
    cycles = 0;
    while (!scrub_done) begin
      @(negedge clk);
      cycles++;
      if (busy) begin
        // an external write while the scrubber owns the port must be ignored
        wen = 1; waddr = AW'(0); din = ~gold[0];
        n_stall++;
      end
    end
    wen = 0;
  endtask

  initial begin
    int cyc;
    rtd_en = 1; scp_sync = 0; wen = 0; ren = 0; waddr = 0; raddr = 0; din = 0;
    inj_en = 0; inj_row = 0; inj_mask = 0; scrub_req = 0; scrub_auto = 0;
    rc_sync = 0; rc_wen = 0; rc_ren = 0; rc_waddr = 0; rc_raddr = 0; rc_din = 0;
    rc_inj_en = 0; rc_inj_row = 0; rc_inj_mask = 0; rc_inj_rep = 0; rc_inj_cep = 0;
    d_rtd_en = 1; d_sync = 0; d_wen = 0; d_ren = 0; d_waddr = 0; d_raddr = 0; d_din = 0;
    d_inj_en = 0; d_inj_row = 0; d_inj_mask = 0;
    #12 rst_n = 1;
    @(negedge clk);

    // ---- fill and read back ----
    for (int r = 0; r < ROWS; r++) wr(r, DW'($urandom));
    for (int r = 0; r < ROWS; r++) rd(r, 0);
    check(!rtd_err, "clean array");

    // ---- single upset: real-time detection and in-line correction ----
    inject(5, COLS'(1) << 3);
    if (rtd_err && ev[0] == COLS'(1) << 3) n_rt_detect++;
    check(rtd_err, "upset flagged in the cycle after it happened");
    rd(5, 1);
    rd(4, 0);
    wr(5, DW'($urandom));
    check(!rtd_err, "clean after overwrite");

    // ---- two flips in one partition: DUE on read, manual scrub ends in DUE ----
    inject(9, COLS'(1) << 0 | COLS'(1) << 2);
    rd(9, 2);
    @(negedge clk);
    scrub_req = 1;
    @(negedge clk);
    scrub_req = 0;
    check(busy, "scrub started");
    wait_done(cyc);
    check(scrub_due && !scrub_fixed, "scrub reports DUE for the blind double flip");
    if (scrub_due) n_scrub_due++;
    wr(9, DW'($urandom));
    @(negedge clk);
    scp_sync = 1;
    @(negedge clk);
    scp_sync = 0;
    #1 if (!rtd_err) n_sync++;
    check(!rtd_err, "clean after SCP sync");
    rd(0, 0);   // the stalled external writes did not reach row 0

    // ---- automatic scrub repairs a single upset ----
    @(negedge clk);
    scrub_auto = 1;
    inject(12, COLS'(1) << 7);
    // the scrub starts at the first clock edge after the flag rises
    @(negedge clk);
    check(!busy, "scrub not yet started");
    @(negedge clk);
    if (busy) n_auto++;
    check(busy, "scrub started by the error flag");
    wait_done(cyc);
    check(cyc <= ROWS + 3, $sformatf("scrub finished in %0d cycles", cyc));
    check(scrub_fixed && !scrub_due, "scrub fixed the row");
    if (scrub_fixed) n_scrub_fix++;
    @(negedge clk);
    check(!rtd_err, "clean after scrub");
    rd(12, 0);   // stored content repaired: no correction needed
    rd(0, 0);
    scrub_auto = 0;

    // ---- write over a faulty row whose fault RTD cannot place: DUE ----
    inject(3, COLS'(1) << 4);
    inject(4, COLS'(1) << 4);
    rd(3, 2);
    wr(3, DW'($urandom));
    wr(4, DW'($urandom));
    check(!rtd_err, "clean after both rows rewritten");

    // ---- RTD off: row parity alone, errors are DUE ----
    @(negedge clk);
    rtd_en = 0;
    inject(7, COLS'(1) << 1);
    check(!rtd_err, "no RTD flag while off");
    rd(7, 2);
    n_off++;
    @(negedge clk);
    rtd_en = 1;
    wr(7, DW'($urandom));
    rd(7, 0);

    // ---- random traffic with upsets ----
    for (int t = 0; t < 200; t++) begin
      automatic int r = $urandom_range(ROWS - 1, 0);
      case ($urandom_range(2, 0))
        0: wr(r, DW'($urandom));
        1: rd(r, 0);
        default: begin
          inject(r, COLS'(1) << $urandom_range(COLS - 1, 0));
          rd(r, 1);
          wr(r, DW'($urandom));
        end
      endcase
    end
    check(!rtd_err, "clean after random traffic");

    // ---- row/column RTD array ----
    for (int r = 0; r < RC_ROWS; r++) begin
      @(negedge clk);
      rc_wen = 1; rc_waddr = RC_AW'(r); rc_din = RC_COLS'($urandom);
      rc_gold[r] = rc_din;
      @(posedge clk);
      #1 rc_wen = 0;
    end
    @(negedge clk);
    rc_inj_en = 1; rc_inj_row = 2'd1; rc_inj_mask = 4'b0100;
    @(posedge clk);
    #1 rc_inj_en = 0;
    check(rc_rtd_err && rc_row_err == 4'b0010 && rc_col_err == 4'b0100, "row/column array flags the upset");
    for (int r = 0; r < RC_ROWS; r++) begin
      @(negedge clk);
      rc_ren = 1; rc_raddr = RC_AW'(r);
      #1 check(rc_dout == rc_gold[r], $sformatf("row/column array row %0d", r));
      if (rc_rd_corr) n_rc_corr++;
      rc_ren = 0;
    end

    // ---- detection-only array ----
    for (int r = 0; r < D_ROWS; r++) begin
      @(negedge clk);
      d_wen = 1; d_waddr = D_AW'(r); d_din = D_COLS'($urandom);
      @(posedge clk);
      #1 d_wen = 0;
    end
    check(!d_rtd_err, "detection-only array clean");
    @(negedge clk);
    d_inj_en = 1; d_inj_row = D_AW'(3); d_inj_mask = D_COLS'(1) << 6;
    @(posedge clk);
    #1 d_inj_en = 0;
    if (d_rtd_err && d_ev == D_COLS'(1) << 6) n_d_detect++;
    check(d_rtd_err && d_ev == D_COLS'(1) << 6, "detection-only array flags column 6");

    // ---- every mechanism happened ----
    check(n_rd_ce > 0,     "in-line CE happened");
    check(n_rd_due > 0,    "read DUE happened");
    check(n_wr_ce > 0,     "PD correction on write happened");
    check(n_wr_due > 0,    "write DUE happened");
    check(n_rt_detect > 0, "real-time detection happened");
    check(n_scrub_due > 0, "scrub DUE happened");
    check(n_scrub_fix > 0, "scrub fix happened");
    check(n_auto > 0,      "automatic scrub happened");
    check(n_stall > 0,     "stall happened");
    check(n_sync > 0,      "SCP sync happened");
    check(n_off > 0,       "RTD off happened");
    check(n_rc_corr > 0,   "row/column correction happened");
    check(n_d_detect > 0,  "detection-only array detection happened");
    if (!PD_PORT) check(n_two_cycle > 0, "two-cycle write happened");
    $display("mechanisms: rd_ce=%0d rd_due=%0d wr_ce=%0d wr_due=%0d rt_detect=%0d scrub_due=%0d scrub_fix=%0d auto=%0d stall=%0d sync=%0d off=%0d rc_corr=%0d two_cycle=%0d d_detect=%0d",
             n_rd_ce, n_rd_due, n_wr_ce, n_wr_due, n_rt_detect, n_scrub_due, n_scrub_fix,
             n_auto, n_stall, n_sync, n_off, n_rc_corr, n_two_cycle, n_d_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
