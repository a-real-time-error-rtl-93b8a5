// tb_rtd_ecc_decoder: exhaustive check of decoder D for 8 data bits, without
// interleaving (H = 1, 9 columns) and with 2-way horizontal interleaving
// (H = 2, 10 columns). The expected outcome is taken row by row from the two
// decoder tables: the count of EV ones per partition is classed as 0, odd
// or even, and the table column that matches gives NE, CE or DUE. On CE the
// corrected columns must be the EV bits of the failing partitions.
module tb_rtd_ecc_decoder;
  import rtd_pkg::*;
  int checks = 0, failures = 0;

  logic         en;
  logic [0:0]   perr1;
  logic [8:0]   ev1, cv1;
  logic         ce1, due1;
  dec_e         dec1;
  logic [1:0]   perr2;
  logic [9:0]   ev2, cv2;
  logic         ce2, due2;
  dec_e         dec2;

  rtd_ecc_decoder #(.DATA_W(8), .H(1)) dut1 (
    .en(en), .perr(perr1), .ev(ev1), .dec(dec1), .ce(ce1), .due(due1), .cv(cv1));
  rtd_ecc_decoder #(.DATA_W(8), .H(2)) dut2 (
    .en(en), .perr(perr2), .ev(ev2), .dec(dec2), .ce(ce2), .due(due2), .cv(cv2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {Z, O, E} cnt_e;   // zero, odd, even nonzero
  function automatic cnt_e cls(int n);
    return (n == 0) ? Z : (n % 2 == 1) ? O : E;
  endfunction

  // Table without interleaving
  function automatic dec_e table1(logic p, cnt_e n);
    if (n == E)           return DEC_DUE;
    if (!p)               return DEC_NE;    // 0-0, 0-o
    if (n == Z)           return DEC_DUE;   // 1-0
    return DEC_CE;                          // 1-o
  endfunction

  // Table with 2-way horizontal interleaving (columns left to right)
  function automatic dec_e table2(logic pe, logic po, cnt_e ne, cnt_e no);
    if (no == E)                        return DEC_DUE;  // X X X e
    if (ne == E)                        return DEC_DUE;  // X X e X
    if (!pe && !po)                     return DEC_NE;   // 0 0 y y
    if (po && no == Z)                  return DEC_DUE;  // X 1 X 0
    if (pe && ne == Z)                  return DEC_DUE;  // 1 X 0 X
    return DEC_CE;                                       // 0 1 y o / 1 0 o y / 1 1 o o
  endfunction

  initial begin
    en = 1;
    #1;
    for (int p = 0; p < 2; p++) begin
      for (int e = 0; e < 512; e++) begin
        dec_e exp;
        perr1 = p[0]; ev1 = e[8:0];
        #1;
        exp = table1(p[0], cls($countones(ev1)));
        checks++;
        if (dec1 !== exp || ce1 !== (exp == DEC_CE) || due1 !== (exp == DEC_DUE) ||
            cv1 !== ((exp == DEC_CE) ? ev1 : 9'd0)) begin
          failures++;
          $display("FAIL H=1 perr=%b ev=%b dec=%s exp=%s cv=%b", perr1, ev1, dec1.name(), exp.name(), cv1);
        end
      end
    end
    for (int p = 0; p < 4; p++) begin
      for (int e = 0; e < 1024; e++) begin
        dec_e exp;
        logic [9:0] me, mo, ecv;
        int   neven, nodd;
        perr2 = p[1:0]; ev2 = e[9:0];
        // even partition: data bits 0,2,4,6 and parity bit 8; odd: 1,3,5,7 and 9
        me = 10'b01_0101_0101;
        mo = 10'b10_1010_1010;
        neven = $countones(ev2 & me);
        nodd  = $countones(ev2 & mo);
        #1;
        exp = table2(perr2[0], perr2[1], cls(neven), cls(nodd));
        ecv = '0;
        if (exp == DEC_CE) ecv = (perr2[0] ? (ev2 & me) : '0) | (perr2[1] ? (ev2 & mo) : '0);
        checks++;
        if (dec2 !== exp || ce2 !== (exp == DEC_CE) || due2 !== (exp == DEC_DUE) || cv2 !== ecv) begin
          failures++;
          $display("FAIL H=2 perr=%b ev=%b dec=%s exp=%s cv=%b", perr2, ev2, dec2.name(), exp.name(), cv2);
        end
      end
    end
    // disabled decoder reports no error
    en = 0; perr2 = 2'b11; ev2 = 10'b1;
    #1;
    checks++;
    if (dec2 !== DEC_NE || cv2 !== '0) begin failures++; $display("FAIL disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
