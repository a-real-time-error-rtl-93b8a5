// tb_rtd_parity_gen: random data through the row parity generator for H = 1,
// 2 (default) and 4; each parity bit is compared with the parity of the
// data bits picked out by a position mask built in the testbench.
module tb_rtd_parity_gen;
  int checks = 0, failures = 0;

  logic [63:0] data;
  logic [0:0]  p1;
  logic [1:0]  p2;
  logic [3:0]  p4;

  rtd_parity_gen #(.H(1)) dut1 (.data(data), .par(p1));
  rtd_parity_gen          dut2 (.data(data), .par(p2));
  rtd_parity_gen #(.H(4)) dut4 (.data(data), .par(p4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] every(int h, int k);
    logic [63:0] m = '0;
    for (int j = k; j < 64; j += h) m[j] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      data = {$urandom, $urandom};
      if (t == 0) data = '0;
      if (t == 1) data = 64'h1;
      if (t == 2) data = 64'h2;
      #1;
      checks++;
      if (p1 !== ^data) begin failures++; $display("FAIL H=1 %h", data); end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (p2[k] !== ^(data & every(2, k))) begin failures++; $display("FAIL H=2 k=%0d %h", k, data); end
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (p4[k] !== ^(data & every(4, k))) begin failures++; $display("FAIL H=4 k=%0d %h", k, data); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
