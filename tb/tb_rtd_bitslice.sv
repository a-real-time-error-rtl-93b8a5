// tb_rtd_bitslice: one 8-row bit-slice with 2-way vertical interleaving,
// driven with random writes and random cell flips. A shadow copy of the
// column kept in the testbench gives the expected read mux output, PD output
// and the two real-time column parities after every clock edge.
module tb_rtd_bitslice;
  localparam int ROWS = 8;
  int checks = 0, failures = 0;

  logic            clk = 0;
  logic            din;
  logic [ROWS-1:0] wsel, flip, rsel;
  logic            dout, pd;
  logic [1:0]      rtcp;
  logic [ROWS-1:0] model;

  rtd_bitslice #(.ROWS(ROWS), .V(2)) dut (
    .clk(clk), .din(din), .wsel(wsel), .flip(flip), .rsel(rsel),
    .dout(dout), .pd(pd), .rtcp(rtcp)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(int ra, int wa);
    logic [1:0] exp_p;
    exp_p = '0;
    for (int r = 0; r < ROWS; r++) exp_p[r % 2] ^= model[r];
    checks++;
    if (dout !== (ra >= 0 ? model[ra] : 1'b0)) begin failures++; $display("FAIL dout ra=%0d", ra); end
    checks++;
    if (pd !== (wa >= 0 ? model[wa] : 1'b0)) begin failures++; $display("FAIL pd wa=%0d", wa); end
    checks++;
    if (rtcp !== exp_p) begin failures++; $display("FAIL rtcp %b exp %b", rtcp, exp_p); end
  endtask

  initial begin
    wsel = '0; flip = '0; rsel = '0; din = 0;
    // write every row with a known value
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wsel = ROWS'(1) << r; din = r[0] ^ r[1];
      model[r] = din;
    end
    @(negedge clk);
    wsel = '0;
    for (int t = 0; t < 1000; t++) begin
      int ra, wa, fa;
      ra = $urandom_range(ROWS, 0) - 1;   // -1: no read
      wa = $urandom_range(ROWS, 0) - 1;   // -1: no write
      fa = ($urandom_range(3, 0) == 0) ? $urandom_range(ROWS - 1, 0) : -1;
      rsel = (ra >= 0) ? ROWS'(1) << ra : '0;
      wsel = (wa >= 0) ? ROWS'(1) << wa : '0;
      flip = (fa >= 0) ? ROWS'(1) << fa : '0;
      din  = 1'($urandom);
      #1;
      check_outputs(ra, wa);
      @(posedge clk);
      if (wa >= 0) model[wa] = din;
      if (fa >= 0) model[fa] = ~model[fa];
      @(negedge clk);
    end
    rsel = '0; wsel = '0; flip = '0;
    #1;
    check_outputs(-1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
