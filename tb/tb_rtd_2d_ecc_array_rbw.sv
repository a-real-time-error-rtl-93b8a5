// tb_rtd_2d_ecc_array_rbw: the 2D ECC RTD array without its own PD mux
// column (PD_PORT = 0), 8 rows x 8 data bits, H = 2. Each write reads the old
// row through the read port first: the testbench checks that wready and
// rready are low for exactly that first cycle, that a read requested in that
// cycle is not served, and that the SCP is still maintained correctly,
// including the PD correction when a faulty row is overwritten. A random
// phase mixes writes, reads and upsets against a golden copy.
module tb_rtd_2d_ecc_array_rbw;
  import rtd_pkg::*;
  localparam int ROWS = 8, DW = 8, H = 2, COLS = DW + H, AW = 3;
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

  rtd_2d_ecc_array #(.ROWS(ROWS), .DATA_W(DW), .H(H), .V(1), .PD_PORT(1'b0)) dut (.*);

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

  // two-cycle write; a read of another row is requested alongside
  task automatic wr(int a, logic [DW-1:0] d, dec_e exp);
    @(negedge clk);
    wen = 1; waddr = AW'(a); din = d;
    ren = 1; raddr = AW'((a + 3) % ROWS);
    #1 check(!wready && !rready && rd_dec == DEC_NE, "first write cycle: old row fetched, read not served");
    @(negedge clk);
    #1 check(wready && rready, "second write cycle: write done, read served");
    check(dout == gold[(a + 3) % ROWS], "read served in the second cycle");
    check(wr_dec == exp, $sformatf("write row %0d PD outcome %s expected %s", a, wr_dec.name(), exp.name()));
    @(posedge clk);
    gold[a] = d;
    #1 begin wen = 0; ren = 0; end
  endtask

  task automatic rd(int a, dec_e exp);
    @(negedge clk);
    ren = 1; raddr = AW'(a);
    #1 check(rready && rd_dec == exp, $sformatf("read row %0d outcome %s", a, rd_dec.name()));
    if (exp != DEC_DUE) check(dout == gold[a], $sformatf("read row %0d data", a));
    ren = 0;
  endtask

  task automatic inject(int r, logic [COLS-1:0] m);
    @(negedge clk);
    inj_en = 1; inj_row = AW'(r); inj_mask = m;
    @(posedge clk);
    #1 inj_en = 0;
  endtask

  initial begin
    rtd_en = 1; scp_sync = 0; wen = 0; wr_keep_scp = 0; ren = 0; inj_en = 0;
    waddr = 0; raddr = 0; din = 0; inj_row = 0; inj_mask = 0;
    for (int r = 0; r < ROWS; r++) gold[r] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    // first pass over power-up content: PD outcome is whatever it is
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wen = 1; waddr = AW'(r); din = DW'($urandom);
      @(negedge clk);
      @(posedge clk);
      gold[r] = din;
      #1 wen = 0;
    end
    #1 check(!rtd_err, "clean after fill");
    for (int r = 0; r < ROWS; r++) rd(r, DEC_NE);

    for (int t = 0; t < 200; t++) begin
      automatic int r = $urandom_range(ROWS - 1, 0);
      automatic int c = $urandom_range(COLS - 1, 0);
      case ($urandom_range(2, 0))
        0: wr(r, DW'($urandom), DEC_NE);
        1: rd(r, DEC_NE);
        default: begin
          inject(r, COLS'(1) << c);
          check(rtd_err, "upset flagged");
          rd(r, DEC_CE);
          wr(r, DW'($urandom), DEC_CE);
          #1 check(!rtd_err, "clean after overwriting the faulty row");
        end
      endcase
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
