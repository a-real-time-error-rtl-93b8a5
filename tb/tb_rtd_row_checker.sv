// tb_rtd_row_checker: rows with known parity (even/odd positions computed
// here) and random injected flips; perr[k] must be set exactly when
// partition k holds an odd number of flipped bits (data or parity).
module tb_rtd_row_checker;
  int checks = 0, failures = 0;

  logic [63:0] data, flips;
  logic [1:0]  par, pflip, perr;

  rtd_row_checker dut (.data(data ^ flips), .par(par ^ pflip), .perr(perr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [1:0] exp;
      data = {$urandom, $urandom};
      par  = '0;
      for (int j = 0; j < 64; j++) par[j % 2] ^= data[j];
      flips = '0;
      pflip = '0;
      // 0..3 random flips among the 66 stored bits
      for (int n = 0; n < t % 4; n++) begin
        automatic int b = $urandom_range(65, 0);
        if (b < 64) flips[b] = ~flips[b];
        else        pflip[b-64] = ~pflip[b-64];
      end
      exp = pflip;
      for (int j = 0; j < 64; j++) exp[j % 2] ^= flips[j];
      #1;
      checks++;
      if (perr !== exp) begin
        failures++;
        $display("FAIL data=%h flips=%h pflip=%b perr=%b exp=%b", data, flips, pflip, perr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
