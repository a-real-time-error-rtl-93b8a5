// tb_rtd_scrubber: the demand scrubber (8 rows x 8 data bits, H = 2, V = 1)
// driving a behavioural array kept in this testbench: the stored rows with
// any injected faults, the fault-free rows, the SCP as the XOR of the
// fault-free rows and EV = SCP ^ XOR of the stored rows. Cases: a single
// upset (fixed), a 2-bit horizontal burst (fixed), faults in two rows (DUE),
// two flips in one parity partition (DUE), a fault-free array (nothing
// done), and a fault in a stored parity bit (fixed). It also checks the
// start-to-done latency of ROWS + V + 1 cycles and that writes only go to
// the faulty row.
module tb_rtd_scrubber;
  localparam int ROWS = 8, DW = 8, H = 2, COLS = DW + H, AW = 3;
  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0;
  logic                 start, busy, done, fixed, due;
  logic                 rd_en, wr_en;
  logic [AW-1:0]        rd_addr, wr_addr;
  logic [COLS-1:0]      rd_row;
  logic [H-1:0]         rd_perr;
  logic [DW-1:0]        wr_data;
  logic                 wr_ready, slow, wphase;
  logic [0:0][COLS-1:0] ev, scp;

  logic [COLS-1:0] mem  [ROWS];   // stored content, faults included
  logic [COLS-1:0] good [ROWS];   // fault-free content

  rtd_scrubber #(.ROWS(ROWS), .DATA_W(DW), .H(H), .V(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] encode(logic [DW-1:0] d);
    logic [H-1:0] p = '0;
    for (int j = 0; j < DW; j++) p[j % H] ^= d[j];
    return {p, d};
  endfunction

  // behavioural array
  always_comb begin
    logic [COLS-1:0] rt, sc;
    rt = '0; sc = '0;
    for (int r = 0; r < ROWS; r++) begin
      rt ^= mem[r];
      sc ^= good[r];
    end
    scp[0]  = sc;
    ev[0]   = sc ^ rt;
    rd_row  = mem[rd_addr];
    rd_perr = encode(rd_row[DW-1:0])[COLS-1:DW] ^ rd_row[COLS-1:DW];
  end

  // slow = 1 models an array without its own PD port: every write is held
  // off for one cycle (wr_ready low) while the old row is fetched
  assign wr_ready = !slow || wphase;
  always @(posedge clk) wphase <= slow && wr_en && !wphase;

  int writes;
  always @(posedge clk) begin
    if (wr_en && wr_ready) begin
      // only the stored copy changes: a repair must restore the fault-free row
      mem[wr_addr] <= encode(wr_data);
      writes++;
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fill();
    for (int r = 0; r < ROWS; r++) begin
      good[r] = encode(DW'($urandom));
      mem[r]  = good[r];
    end
  endtask

  task automatic scrub(logic exp_fixed, logic exp_due, int exp_writes, string what);
    int cycles;
    writes = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    check(busy, {what, ": busy after start"});
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == ROWS + 1 + 1 + ((slow && exp_writes > 0) ? 1 : 0),
          $sformatf("%s: latency %0d cycles", what, cycles));
    check(fixed == exp_fixed && due == exp_due,
          $sformatf("%s: fixed=%b due=%b", what, fixed, due));
    check(writes == exp_writes, $sformatf("%s: %0d writes", what, writes));
    @(negedge clk);
    check(!busy && fixed == exp_fixed && due == exp_due, {what, ": idle, result held"});
  endtask

  task automatic check_repaired(string what);
    for (int r = 0; r < ROWS; r++)
      check(mem[r] == good[r], $sformatf("%s: row %0d repaired", what, r));
  endtask

  initial begin
    start = 0; slow = 0; wphase = 0;
    fill();
    #12 rst_n = 1;
    #1;

    // single upset
    mem[3][5] = ~mem[3][5];
    scrub(1, 0, 1, "single upset");
    check_repaired("single upset");

    // 2-bit horizontal burst: even and odd partition both fail, one row
    fill();
    mem[6][1:0] = ~mem[6][1:0];
    scrub(1, 0, 1, "horizontal burst");
    check_repaired("horizontal burst");

    // faults in two rows
    fill();
    mem[1][2] = ~mem[1][2];
    mem[6][7] = ~mem[6][7];
    scrub(0, 1, 0, "two faulty rows");

    // two flips in one partition: row parity blind, EV not
    fill();
    mem[2][0] = ~mem[2][0];
    mem[2][4] = ~mem[2][4];
    scrub(0, 1, 0, "even flips in one partition");

    // clean array
    fill();
    scrub(0, 0, 0, "clean array");

    // stored parity bit
    fill();
    mem[7][DW+1] = ~mem[7][DW+1];
    scrub(1, 0, 1, "parity bit upset");
    check_repaired("parity bit upset");

    // the same repair against an array that needs two cycles per write
    slow = 1;
    fill();
    mem[4][3] = ~mem[4][3];
    scrub(1, 0, 1, "single upset, two-cycle write");
    check_repaired("single upset, two-cycle write");
    slow = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
