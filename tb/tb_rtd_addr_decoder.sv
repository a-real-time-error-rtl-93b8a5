// tb_rtd_addr_decoder: exhaustive check of the one-hot address decoder at the
// default 64 rows and at 8 rows: for every address and both enable values the
// output must be one-hot at the address (enable high) or all zero.
module tb_rtd_addr_decoder;
  int checks = 0, failures = 0;

  logic [5:0]  a64;
  logic [2:0]  a8;
  logic        en;
  logic [63:0] s64;
  logic [7:0]  s8;

  rtd_addr_decoder              dut64 (.addr(a64), .en(en), .sel(s64));
  rtd_addr_decoder #(.ROWS(8))  dut8  (.addr(a8),  .en(en), .sel(s8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 64; a++) begin
        logic [63:0] exp64;
        exp64 = '0;
        if (e == 1) exp64[a] = 1'b1;
        en = e[0]; a64 = a[5:0]; a8 = a[2:0];
        #1;
        checks++;
        if (s64 !== exp64) begin
          failures++;
          $display("FAIL rows=64 addr=%0d en=%0d sel=%h", a, e, s64);
        end
        checks++;
        if (s8 !== ((e == 1) ? (8'd1 << a[2:0]) : 8'd0)) begin
          failures++;
          $display("FAIL rows=8 addr=%0d en=%0d sel=%b", a, e, s8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
