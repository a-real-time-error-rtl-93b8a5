// tb_rtd_2d_ecc_array_vi: the array without horizontal interleaving (H = 1)
// and with 2-way vertical interleaving (V = 2), 8 rows x 8 data bits, beside
// a copy with V = 1. A 2-bit vertical burst (same column, adjacent rows)
// cancels in a single column parity, so the V = 1 array can only raise DUE;
// with even and odd rows tracked apart, both rows are corrected. A 2-bit
// horizontal burst is a DUE without horizontal interleaving.
module tb_rtd_2d_ecc_array_vi;
  import rtd_pkg::*;
  localparam int ROWS = 8, DW = 8, COLS = DW + 1, AW = 3;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic            wen, ren, inj_en;
  logic [AW-1:0]   waddr, raddr, inj_row;
  logic [DW-1:0]   din, dout2, dout1;
  logic [COLS-1:0] inj_mask;
  dec_e            dec2, dec1, wdec2, wdec1;
  logic            err2, err1;
  logic [1:0][COLS-1:0] ev2;
  logic [0:0][COLS-1:0] ev1;
  logic [DW-1:0]   gold [ROWS];

  rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DW), .H(1), .V(2)) dut_v2 (
    .clk(clk), .rst_n(rst_n), .rtd_en(1'b1), .scp_sync(1'b0),
    .wen(wen), .waddr(waddr), .din(din), .wr_keep_scp(1'b0), .wready(),
    .wr_dec(wdec2), .wr_ce(), .wr_due(),
    .ren(ren), .raddr(raddr), .rready(), .dout(dout2), .rd_dec(dec2), .rd_ce(), .rd_due(),
    .rd_row(), .rd_perr(), .inj_en(inj_en), .inj_row(inj_row), .inj_mask(inj_mask),
    .ev(ev2), .scp(), .rtd_err(err2));

  rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DW), .H(1), .V(1)) dut_v1 (
    .clk(clk), .rst_n(rst_n), .rtd_en(1'b1), .scp_sync(1'b0),
    .wen(wen), .waddr(waddr), .din(din), .wr_keep_scp(1'b0), .wready(),
    .wr_dec(wdec1), .wr_ce(), .wr_due(),
    .ren(ren), .raddr(raddr), .rready(), .dout(dout1), .rd_dec(dec1), .rd_ce(), .rd_due(),
    .rd_row(), .rd_perr(), .inj_en(inj_en), .inj_row(inj_row), .inj_mask(inj_mask),
    .ev(ev1), .scp(), .rtd_err(err1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [DW-1:0] d);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  task automatic rd(int a, dec_e e2, dec_e e1);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1;
    check(dec2 == e2, $sformatf("V=2 row %0d: %s expected %s", a, dec2.name(), e2.name()));
    check(dec1 == e1, $sformatf("V=1 row %0d: %s expected %s", a, dec1.name(), e1.name()));
    if (e2 != DEC_DUE) check(dout2 == gold[a], $sformatf("V=2 row %0d data", a));
    if (e1 != DEC_DUE) check(dout1 == gold[a], $sformatf("V=1 row %0d data", a));
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_mask = m;
    @(posedge clk);
    #1 inj_en = 0;
  endtask

  initial begin
    wen = 0; ren = 0; inj_en = 0; waddr = 0; raddr = 0; din = 0; inj_row = 0; inj_mask = 0;
    #12 rst_n = 1;
    for (int r = 0; r < ROWS; r++) wr(r, DW'($urandom));
    for (int r = 0; r < ROWS; r++) rd(r, DEC_NE, DEC_NE);

    // vertical 2-bit burst in column 2, rows 4 and 5
    inject(4, COLS'(1) << 2);
    inject(5, COLS'(1) << 2);
    #1;
    check(err2 && ev2[0] == COLS'(4) && ev2[1] == COLS'(4), "V=2: both row classes flag column 2");
    check(!err1, "V=1: the burst cancels in the column parity");
    rd(4, DEC_CE, DEC_DUE);
    rd(5, DEC_CE, DEC_DUE);
    rd(6, DEC_NE, DEC_NE);
    wr(4, DW'($urandom));
    wr(5, DW'($urandom));
    #1 check(!err2 && !err1, "both arrays clean after rewriting the rows");

    // horizontal 2-bit burst without horizontal interleaving: DUE
    inject(1, COLS'(3));
    rd(1, DEC_DUE, DEC_DUE);
    rd(3, DEC_DUE, DEC_DUE);  // same (odd) row class as row 1
    rd(2, DEC_NE, DEC_DUE);   // V=2: row 2 is in the other class

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
