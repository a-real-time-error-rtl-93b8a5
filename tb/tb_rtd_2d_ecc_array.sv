// tb_rtd_2d_ecc_array: the 2D ECC RTD array at 16 rows x 16 data bits with
// 2-way horizontal interleaving, against a golden copy of the written data.
// Directed cases: fault-free reads; a single-bit upset, flagged by EV in the
// very cycle after it happens and corrected on read; overwriting a faulty
// row (PD correction keeps the SCP right); a 2-bit horizontal burst (CE with
// interleaving); two flips in one partition (DUE, also on other rows);
// a parity-bit fault; two faults in one column of two rows (invisible to
// RTD, DUE by the row parity); faults in two rows of different partitions
// (each row corrected with only its own partition's EV bits); RTD disabled;
// read-during-write; a write that stores some bits wrong (a failing speed
// path), flagged right after its edge. Then a random phase of writes, reads and single upsets.
module tb_rtd_2d_ecc_array;
  import rtd_pkg::*;
  localparam int ROWS = 16, DW = 16, H = 2, COLS = DW + H, AW = 4;
  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0;
  logic                 rtd_en, scp_sync;
  logic                 wen, wr_keep_scp, wr_ce, wr_due, wready, rready;
  logic [AW-1:0]        waddr, raddr, inj_row;
  logic [DW-1:0]        din, dout;
  logic                 ren, rd_ce, rd_due, inj_en, rtd_err;
  dec_e                 rd_dec, wr_dec;
  logic [COLS-1:0]      rd_row, inj_mask;
  logic [H-1:0]         rd_perr;
  logic [0:0][COLS-1:0] ev, scp;
  logic [DW-1:0]        gold [ROWS];

  rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DW), .H(H), .V(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(int a, logic [DW-1:0] d);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  // write and check what the PD decoder reports
  task automatic wr_expect(int a, logic [DW-1:0] d, dec_e exp);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    #1 check(wready && rready, "single-cycle write with the PD port");
    check(wr_dec == exp && wr_ce == (exp == DEC_CE) && wr_due == (exp == DEC_DUE),
             $sformatf("write row %0d PD outcome %s, expected %s", a, wr_dec.name(), exp.name()));
    @(posedge clk);
    gold[a] = d;
    #1 wen = 0;
  endtask

  task automatic rd(int a, dec_e exp, logic check_data = 1'b1);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1;
    check(rd_dec == exp && rd_ce == (exp == DEC_CE) && rd_due == (exp == DEC_DUE),
          $sformatf("read row %0d outcome %s, expected %s", a, rd_dec.name(), exp.name()));
    if (check_data)
      check(dout == gold[a], $sformatf("read row %0d data %h, expected %h", a, dout, gold[a]));
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_mask = m;
    @(posedge clk);
    #1 inj_en = 0;
  endtask

  function automatic logic [COLS-1:0] bit_at(int c);
    return COLS'(1) << c;
  endfunction

  initial begin
    rtd_en = 1; scp_sync = 0; wen = 0; wr_keep_scp = 0; ren = 0; inj_en = 0;
    waddr = 0; raddr = 0; din = 0; inj_row = 0; inj_mask = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check(!rtd_err, "no error after the reset-time reload");

    // fill the array
    for (int r = 0; r < ROWS; r++) wr(r, DW'($urandom));
    #1 check(ev == '0 && !rtd_err, "EV clean after writes");
    for (int r = 0; r < ROWS; r++) rd(r, DEC_NE);

    // single-bit upset in row 5, column 3
    inject(5, bit_at(3));
    // detection is real time: EV shows the fault right after the clock edge
    check(rtd_err && ev[0] == bit_at(3), "EV points at column 3 at once");
    rd(5, DEC_CE);
    rd(6, DEC_NE);
    wr_expect(5, DW'($urandom), DEC_CE);
    #1 check(ev == '0, "EV clean after overwriting the faulty row");
    rd(5, DEC_NE);

    // 2-bit horizontal burst (columns 6 and 7): corrected thanks to interleaving
    inject(2, bit_at(6) | bit_at(7));
    check(rtd_err, "burst detected");
    rd(2, DEC_CE);
    wr_expect(2, DW'($urandom), DEC_CE);
    #1 check(ev == '0, "EV clean after burst row rewritten");

    // two flips in the even partition of row 3: the parity misses them, RTD does not
    inject(3, bit_at(0) | bit_at(2));
    check(rtd_err, "even flips detected by RTD");
    rd(3, DEC_DUE, 1'b0);
    rd(4, DEC_DUE, 1'b0);
    wr_expect(3, DW'($urandom), DEC_DUE);
    // the SCP could not be repaired on that write; resynchronise it
    @(negedge clk);
    scp_sync = 1;
    @(negedge clk);
    scp_sync = 0;
    #1 check(ev == '0, "EV clean after SCP sync");
    rd(3, DEC_NE);

    // fault in the stored parity bit of row 7: data still correct
    inject(7, bit_at(DW));
    rd(7, DEC_CE);
    wr_expect(7, gold[7], DEC_CE);
    #1 check(ev == '0, "EV clean after parity fault rewritten");

    // same column, two rows: invisible to RTD, row parity raises DUE
    inject(8, bit_at(4));
    inject(9, bit_at(4));
    #1 check(!rtd_err, "column-even faults cancel in RTCP");
    rd(8, DEC_DUE, 1'b0);
    wr_expect(8, DW'($urandom), DEC_DUE);
    wr_expect(9, DW'($urandom), DEC_DUE);
    #1 check(ev == '0, "EV clean after both rows rewritten");
    rd(8, DEC_NE);
    rd(9, DEC_NE);

    // faults in two rows, different partitions: each row is corrected with
    // its own partition's EV bits only
    inject(10, bit_at(1));
    inject(11, bit_at(4));
    check(ev[0] == (bit_at(1) | bit_at(4)), "EV holds both columns");
    rd(10, DEC_CE);
    rd(11, DEC_CE);
    rd(12, DEC_NE);
    wr_expect(10, DW'($urandom), DEC_CE);
    wr_expect(11, DW'($urandom), DEC_CE);
    #1 check(ev == '0, "EV clean again");

    // read and write of the same row in one cycle return the old content
    @(negedge clk);
    ren = 1; raddr = 4'd1; wen = 1; waddr = 4'd1; din = ~gold[1];
    #1 check(dout == gold[1] && rd_dec == DEC_NE, "read during write returns old data");
    @(posedge clk);
    gold[1] = ~gold[1];
    #1 begin ren = 0; wen = 0; end
    rd(1, DEC_NE);

    // RTD switched off: only the row parity is left, so errors are DUE
    @(negedge clk);
    rtd_en = 0;
    inject(13, bit_at(0));
    check(!rtd_err && ev == '0, "EV silent while RTD is off");
    rd(13, DEC_DUE, 1'b0);
    @(negedge clk);
    rtd_en = 1;
    @(negedge clk);
    check(!rtd_err, "re-enable absorbs the old fault");
    wr(13, DW'($urandom));
    rd(13, DEC_NE);

    // keep-SCP write: the SCP is not updated, so a changed row shows up in EV
    @(negedge clk);
    wen = 1; waddr = 4'd14; din = gold[14] ^ DW'(1); wr_keep_scp = 1;
    @(posedge clk);
    #1 begin wen = 0; wr_keep_scp = 0; end
    check(ev[0] == (bit_at(0) | bit_at(DW)), "keep-SCP write leaves the SCP as it was");
    @(negedge clk);
    wen = 1; waddr = 4'd14; din = gold[14]; wr_keep_scp = 1;
    @(posedge clk);
    #1 begin wen = 0; wr_keep_scp = 0; end
    check(ev == '0, "EV clean after restoring row 14 with the SCP kept");
    rd(14, DEC_NE);

    // a write over a failing speed path: the row is stored with some data or
    // parity bits wrong at the very edge it is written; EV flags them at once
    for (int k = 0; k < 2 * COLS; k++) begin
      automatic int c = k % COLS;
      automatic logic [DW-1:0] d = DW'($urandom);
      @(negedge clk);
      wen = 1; waddr = 4'd9; din = d;
      inj_en = 1; inj_row = 4'd9; inj_mask = bit_at(c);
      @(posedge clk);
      gold[9] = d;
      #1 begin wen = 0; inj_en = 0; end
      check(rtd_err && ev[0] == bit_at(c), $sformatf("bad write into column %0d flagged at once", c));
      rd(9, DEC_CE);
      wr_expect(9, DW'($urandom), DEC_CE);
      #1 check(ev == '0, "EV clean after rewriting the badly written row");
    end

    // random phase
    for (int t = 0; t < 300; t++) begin
      int r;
      r = $urandom_range(ROWS - 1, 0);
      case ($urandom_range(3, 0))
        0: wr(r, DW'($urandom));
        1: rd(r, DEC_NE);
        default: begin
          int c;
          c = $urandom_range(COLS - 1, 0);
          inject(r, bit_at(c));
          rd(r, DEC_CE);
          rd((r + 1) % ROWS, DEC_NE);
          wr_expect(r, DW'($urandom), DEC_CE);
          #1 check(ev == '0, "EV clean after repair");
        end
      endcase
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
