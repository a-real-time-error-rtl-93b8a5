// tb_rtd_mbu_patterns: multi-bit upset patterns against five interleaving
// configurations of the 2D ECC RTD array (16 rows x 16 data bits each):
//   RTD (H=1, V=1), 2-way H, 2-way V, 4-way V, 2-way H + 2-way V.
// All five arrays hold the same random content. A pattern is injected at a
// random place in all of them at once, every faulty row is read, and the
// decoder outcome is compared with the expected strength of each
// configuration; a CE read must also return the original data. The
// real-time flag is checked too: a vertical pair leaves it low with V = 1,
// since the two faults cancel in the column parity. The pattern
// is then injected again, which flips the cells back, so the arrays and
// their SCPs are clean for the next one.
//
// Patterns and the outcome expected for each configuration:
//   p0   single bit                           CE  CE  CE  CE  CE
//   p1,2 two bits straight down a column      DUE DUE CE  CE  CE
//   p3   two bits side by side in a row       DUE CE  DUE DUE CE
//   p4,5 two bits on a diagonal (either way)  DUE CE  CE  CE  CE
// p3 is the horizontal two-bit burst; the shapes of the others are the
// simplest ones with these outcomes. Larger patterns are not covered.
module tb_rtd_mbu_patterns;
  import rtd_pkg::*;
  localparam int ROWS = 16, DW = 16, AW = 4, NCFG = 5, ITER = 40;
  localparam int HS [NCFG] = '{1, 2, 1, 1, 2};
  localparam int VS [NCFG] = '{1, 1, 2, 4, 2};
  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0;
  logic          wen, ren, inj_en;
  logic [AW-1:0] waddr, raddr, inj_row;
  logic [DW-1:0] din, inj_dmask;
  logic [DW-1:0] gold [ROWS];
  logic [DW-1:0] dout [NCFG];
  dec_e          dec  [NCFG];
  logic          err  [NCFG];

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    localparam int H = HS[k], V = VS[k], COLS = DW + H;
    logic [V-1:0][COLS-1:0] ev;
    rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DW), .H(H), .V(V)) dut (
      .clk(clk), .rst_n(rst_n), .rtd_en(1'b1), .scp_sync(1'b0),
      .wen(wen), .waddr(waddr), .din(din), .wr_keep_scp(1'b0), .wready(),
      .wr_dec(), .wr_ce(), .wr_due(),
      .ren(ren), .raddr(raddr), .rready(), .dout(dout[k]), .rd_dec(dec[k]),
      .rd_ce(), .rd_due(), .rd_row(), .rd_perr(),
      .inj_en(inj_en), .inj_row(inj_row), .inj_mask(COLS'(inj_dmask)),
      .ev(ev), .scp(), .rtd_err(err[k]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  task automatic inject(int r, logic [DW-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_dmask = m;
    @(posedge clk);
    #1 inj_en = 0;
  endtask

  // cells of a pattern: up to two (row, column) pairs
  typedef struct { int n; int r [2]; int c [2]; } pat_t;

  function automatic pat_t shape(int p, int r, int c);
    pat_t s;
    s.r[0] = r; s.c[0] = c; s.n = 2;
    case (p)
      0: s.n = 1;
      1: begin s.r[1] = r + 1; s.c[1] = c;     end  // vertical
      2: begin s.r[1] = r;     s.c[1] = c + 1; end  // horizontal
      3: begin s.r[1] = r + 1; s.c[1] = c + 1; end  // diagonal
      default: begin s.r[1] = r + 1; s.c[1] = c - 1; end  // anti-diagonal
    endcase
    return s;
  endfunction

  // expected outcome per shape (0..4) and configuration
  function automatic dec_e expect_dec(int p, int k);
    case (p)
      0: return DEC_CE;
      1: return (VS[k] > 1) ? DEC_CE : DEC_DUE;
      2: return (HS[k] > 1) ? DEC_CE : DEC_DUE;
      default: return (HS[k] > 1 || VS[k] > 1) ? DEC_CE : DEC_DUE;
    endcase
  endfunction

  function automatic string pname(int p);
    case (p)
      0: return "p0"; 1: return "p1,2"; 2: return "p3";
      default: return "p4,5";
    endcase
  endfunction

  int seen [5][NCFG][3];   // outcome counts per shape, configuration, NE/CE/DUE

  task automatic run_pattern(int p);
    pat_t s;
    int   r, c;
    r = $urandom_range(ROWS - 2);
    c = $urandom_range(DW - 2, 1);
    s = shape(p, r, c);
    for (int i = 0; i < s.n; i++) inject(s.r[i], DW'(1) << s.c[i]);
    // a vertical pair cancels in a single column parity: no flag without V
    for (int k = 0; k < NCFG; k++)
      check(err[k] == !(p == 1 && VS[k] == 1),
            $sformatf("%s flag %0b in config %0d", pname(p), err[k], k));
    for (int i = 0; i < s.n; i++) begin
      if (i == 1 && s.r[1] == s.r[0]) break;   // same row, read once
      @(negedge clk);
      ren = 1; raddr = AW'(s.r[i]);
      #1;
      for (int k = 0; k < NCFG; k++) begin
        dec_e e;
        e = expect_dec(p, k);
        seen[p][k][int'(dec[k])]++;
        check(dec[k] == e, $sformatf("%s config %0d row %0d: %s expected %s",
                                     pname(p), k, s.r[i], dec[k].name(), e.name()));
        if (e == DEC_CE)
          check(dout[k] == gold[s.r[i]], $sformatf("%s config %0d row %0d data", pname(p), k, s.r[i]));
      end
      ren = 0;
    end
    for (int i = 0; i < s.n; i++) inject(s.r[i], DW'(1) << s.c[i]);   // undo
    #1;
    for (int k = 0; k < NCFG; k++) check(!err[k], $sformatf("clean after %s, config %0d", pname(p), k));
  endtask

  initial begin
    wen = 0; ren = 0; inj_en = 0; waddr = 0; raddr = 0; din = 0;
    inj_row = 0; inj_dmask = 0;
    #1;
    #11 rst_n = 1;
    for (int r = 0; r < ROWS; r++) wr(r, DW'($urandom));
    #1;
    for (int k = 0; k < NCFG; k++) check(!err[k], $sformatf("clean start, config %0d", k));

    for (int it = 0; it < ITER; it++)
      for (int p = 0; p < 5; p++) run_pattern(p);

    for (int p = 0; p < 5; p++)
      for (int k = 0; k < NCFG; k++)
        $display("%-5s H=%0d V=%0d: NE=%0d CE=%0d DUE=%0d", pname(p), HS[k], VS[k],
                 seen[p][k][0], seen[p][k][1], seen[p][k][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
