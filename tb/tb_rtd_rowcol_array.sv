// tb_rtd_rowcol_array: the 4x4 array with real-time row and column parity.
// Every single data-bit upset is tried in turn: right after the edge exactly
// its row and column error signals must be set, reading that row returns the
// corrected word (rd_corr high), reading other rows is untouched, and
// overwriting the faulty row clears all error signals. Upsets in expected
// row or column parity cells must flip nothing. Then random writes, reads
// and single upsets against a golden copy.
module tb_rtd_rowcol_array;
  localparam int ROWS = 4, COLS = 4, AW = 2;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic            sync, wen, ren, rd_corr, inj_en, rtd_err;
  logic [AW-1:0]   waddr, raddr, inj_row;
  logic [COLS-1:0] din, dout, inj_mask, inj_cep, col_err;
  logic [ROWS-1:0] inj_rep, row_err;
  logic [COLS-1:0] gold [ROWS];

  rtd_rowcol_array dut (.*);

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

  task automatic wr(int a, logic [COLS-1:0] d);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  task automatic rd(int a, logic exp_corr);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1;
    check(dout == gold[a], $sformatf("row %0d data %h expected %h", a, dout, gold[a]));
    check(rd_corr == exp_corr, $sformatf("row %0d rd_corr %b", a, rd_corr));
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m, logic [ROWS-1:0] rep, logic [COLS-1:0] cep);
    @(negedge clk);
    inj_en = (m != '0); inj_row = AW'(r); inj_mask = m; inj_rep = rep; inj_cep = cep;
    @(posedge clk);
    #1 begin inj_en = 0; inj_rep = '0; inj_cep = '0; end
  endtask

  initial begin
    sync = 0; wen = 0; ren = 0; inj_en = 0; waddr = 0; raddr = 0; din = 0;
    inj_row = 0; inj_mask = 0; inj_rep = 0; inj_cep = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check(!rtd_err, "clean after the reset-time reload");
    for (int r = 0; r < ROWS; r++) wr(r, COLS'($urandom));
    #1 check(!rtd_err, "clean after writes");

    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        inject(r, COLS'(1) << c, '0, '0);
        check(row_err == ROWS'(1) << r && col_err == COLS'(1) << c,
              $sformatf("upset (%0d,%0d) flagged at once", r, c));
        for (int k = 0; k < ROWS; k++) rd(k, k == r);
        wr(r, COLS'($urandom));
        #1 check(!rtd_err, $sformatf("upset (%0d,%0d) cleared by overwrite", r, c));
      end
    end

    // expected-parity cells: errors flagged, nothing flipped
    inject(0, '0, ROWS'(4), '0);
    check(row_err == ROWS'(4) && col_err == '0, "row parity cell upset flagged");
    for (int k = 0; k < ROWS; k++) rd(k, k == 2);
    @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;
    #1 check(!rtd_err, "sync clears");
    inject(0, '0, '0, COLS'(2));
    check(row_err == '0 && col_err == COLS'(2), "column parity cell upset flagged");
    for (int k = 0; k < ROWS; k++) rd(k, 1'b0);
    @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;

    // random phase
    for (int t = 0; t < 300; t++) begin
      automatic int r = $urandom_range(ROWS - 1, 0);
      automatic int c = $urandom_range(COLS - 1, 0);
      case ($urandom_range(2, 0))
        0: wr(r, COLS'($urandom));
        1: rd(r, 1'b0);
        default: begin
          inject(r, COLS'(1) << c, '0, '0);
          rd(r, 1'b1);
          wr(r, COLS'($urandom));
        end
      endcase
    end
    #1 check(!rtd_err, "clean at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
