// tb_rtd_detect_array: the detection-only RTD array at 8 rows x 8 columns.
// Checks plain reads and writes against a golden copy; that an upset in any
// cell raises exactly its column's EV bit right after the clock edge with no
// read; that reads return the corrupted value (no correction); that the flag
// stays set after the faulty row is overwritten and clears on sync; that
// two faults in one column cancel; and that turning RTD off and on again
// hides the flag and then restarts detection from the current content.
module tb_rtd_detect_array;
  localparam int ROWS = 8, COLS = 8, AW = 3;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic            rtd_en, sync, wen, ren, inj_en, rtd_err;
  logic [AW-1:0]   waddr, raddr, inj_row;
  logic [COLS-1:0] din, dout, inj_mask, ev;
  logic [COLS-1:0] gold [ROWS];

  rtd_detect_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic rd(int a);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1 check(dout == gold[a], $sformatf("row %0d data %h expected %h", a, dout, gold[a]));
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_mask = m;
    @(posedge clk);
    #1 inj_en = 0;
    gold[r] = gold[r] ^ m;   // no correction: reads see the fault
  endtask

  task automatic resync();
    @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;
    #1 check(!rtd_err && ev == '0, "clean after sync");
  endtask

  initial begin
    rtd_en = 1; sync = 0; wen = 0; ren = 0; inj_en = 0;
    waddr = 0; raddr = 0; din = 0; inj_row = 0; inj_mask = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) wr(r, COLS'($urandom));
    #1 check(!rtd_err, "clean after writes");
    for (int r = 0; r < ROWS; r++) rd(r);

    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c += 3) begin
        inject(r, COLS'(1) << c);
        check(rtd_err && ev == COLS'(1) << c, $sformatf("upset (%0d,%0d) flagged at once", r, c));
        rd(r);
        wr(r, COLS'($urandom));
        check(ev == COLS'(1) << c, "flag stays after overwrite");
        resync();
      end
    end

    inject(2, COLS'(1) << 5);
    inject(6, COLS'(1) << 5);
    check(!rtd_err, "two faults in one column cancel");
    rd(2);
    rd(6);
    resync();

    // RTD off: no flag; writes while off leave the SCP stale, so turning it
    // back on must reload the SCP rather than report the writes as faults
    @(negedge clk);
    rtd_en = 0;
    inject(1, COLS'(1) << 2);
    check(!rtd_err && ev == '0, "no flag while RTD is off");
    for (int r = 0; r < ROWS; r++) wr(r, COLS'($urandom));
    @(negedge clk);
    rtd_en = 1;
    @(negedge clk);
    check(!rtd_err && ev == '0, "clean after re-enable");
    inject(4, COLS'(1) << 7);
    check(rtd_err && ev == COLS'(1) << 7, "upset flagged after re-enable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
