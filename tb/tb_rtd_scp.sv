// tb_rtd_scp: stored column parity with 8 columns and 2 row classes. The
// testbench plays the array: it keeps a random "actual" column parity per
// class, writes rows (updating it with PD -> IN) and flips bits (faults).
// It checks the reload after reset, that EV equals the faults injected since
// the last write, that a write with the right correction vector clears EV,
// the sync reload and the disable/re-enable behaviour.
module tb_rtd_scp;
  localparam int COLS = 8, V = 2;
  int checks = 0, failures = 0;

  logic                   clk = 0, rst_n = 0;
  logic                   en, sync, upd, err;
  logic [0:0]             cls;
  logic [COLS-1:0]        in_row, pd_row, cv;
  logic [V-1:0][COLS-1:0] rtcp, scp, ev;
  logic [V-1:0][COLS-1:0] fault;   // faults injected and not yet repaired

  rtd_scp #(.COLS(COLS), .V(V)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .sync(sync), .upd(upd), .upd_cls(cls),
    .in_row(in_row), .pd_row(pd_row), .cv(cv), .rtcp(rtcp),
    .scp(scp), .ev(ev), .err(err)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ev(logic [V-1:0][COLS-1:0] exp, string what);
    #1;
    checks++;
    if (ev !== exp || err !== (|exp)) begin
      failures++;
      $display("FAIL %s: ev=%h exp=%h err=%b", what, ev, exp, err);
    end
  endtask

  initial begin
    en = 1; sync = 0; upd = 0; cls = 0; in_row = 0; pd_row = 0; cv = 0;
    rtcp = {$urandom, $urandom};
    fault = '0;
    #12 rst_n = 1;
    // first enabled cycle reloads: EV reads zero, then SCP == RTCP
    expect_ev('0, "during reload");
    @(negedge clk);
    expect_ev('0, "after reload");
    checks++;
    if (scp !== rtcp) begin failures++; $display("FAIL scp not loaded"); end

    for (int t = 0; t < 400; t++) begin
      automatic int kind = $urandom_range(2, 0);
      @(negedge clk);
      upd = 0; cv = '0;
      if (kind == 0) begin
        // fault: one cell flips, actual parity changes, SCP does not
        automatic int c = $urandom_range(COLS - 1, 0);
        automatic int v = $urandom_range(V - 1, 0);
        rtcp[v][c]  = ~rtcp[v][c];
        fault[v][c] = ~fault[v][c];
        expect_ev(fault, "after fault");
      end else begin
        // write a row of class v; PD carries that class's faults, CV repairs them
        automatic int v = $urandom_range(V - 1, 0);
        logic [COLS-1:0] good_pd;
        good_pd = COLS'($urandom);
        pd_row  = good_pd ^ fault[v];
        in_row  = COLS'($urandom);
        cv      = fault[v];
        cls     = v[0];
        upd     = 1;
        @(posedge clk);
        #1;
        // cells now hold IN instead of the faulty PD
        rtcp[v] = rtcp[v] ^ pd_row ^ in_row;
        upd = 0;
        fault[v] = '0;
        expect_ev(fault, "after write");
      end
    end

    // sync: faults are absorbed into SCP
    @(negedge clk);
    rtcp[0][3] = ~rtcp[0][3];
    fault[0][3] = ~fault[0][3];
    expect_ev(fault, "before sync");
    sync = 1;
    @(negedge clk);
    sync = 0;
    fault = '0;
    expect_ev('0, "after sync");

    // disable: EV masked, SCP held; a fault while off is absorbed on re-enable
    en = 0;
    @(negedge clk);
    rtcp[1][0] = ~rtcp[1][0];
    expect_ev('0, "disabled");
    checks++;
    if (scp[1][0] === rtcp[1][0]) begin failures++; $display("FAIL scp not held"); end
    en = 1;
    expect_ev('0, "re-enable reload");
    @(negedge clk);
    expect_ev('0, "after re-enable");
    checks++;
    if (scp !== rtcp) begin failures++; $display("FAIL scp not reloaded"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
