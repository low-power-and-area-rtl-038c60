// tb_neda_adder_array -- checks the DA-matrix partial sums.
// Instance p6 uses the six-bit coefficient patterns of the worked example
// (60, 26, -7, -1, 2 written as 111100 011010 001001 000011 000010): with
// r = 1, 2, 3, 4, 5 it must give m = 7, 11, 1, 6, 3, -1, and
// sum m(i) 2^(i-1) = 97. Instance d7 uses the default seven-bit coefficients
// and random signed 5-bit inputs: every row is compared with the sum of
// the inputs whose coefficient has that bit set (negated for the sign bit),
// and the weighted row sum with the direct inner product.
module tb_neda_adder_array;
  import tb_ref_pkg::*;
  localparam int RW = 5, M_W = 8;
  logic [4:0][RW-1:0]  r;
  logic [5:0][M_W-1:0] m6;
  logic [6:0][M_W-1:0] m7;
  int checks = 0, failures = 0;

  neda_adder_array #(.RW(RW), .NR(5), .COEF_W(6), .COEFS(neda_pkg::LP_COEFS_6B)) p6 (
    .r(r), .m(m6)
  );
  neda_adder_array #(.RW(RW)) d7 (.r(r), .m(m7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    static longint ex6 [6] = '{7, 11, 1, 6, 3, -1};
    longint rv [5];
    longint z;
    // worked example
    for (int k = 0; k < 5; k++) r[k] = RW'(k + 1);
    #10;
    z = 0;
    for (int i = 0; i < 6; i++) begin
      check($sformatf("example m(%0d)", i + 1), sext(longint'(m6[i]), M_W), ex6[i]);
      z += sext(longint'(m6[i]), M_W) << i;
    end
    check("example Y", z, 97);
    // the same inputs with the seven-bit coefficients 60 26 -7 -1 2 also give 97
    z = 0;
    for (int i = 0; i < 7; i++) z += sext(longint'(m7[i]), M_W) << i;
    check("example Y, default coefficients", z, 97);
    // default coefficients, random inputs
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 5; k++) r[k] = RW'($urandom);
      if (t == 0) for (int k = 0; k < 5; k++) r[k] = 5'b10000;
      #10;
      for (int k = 0; k < 5; k++) rv[k] = sext(longint'(r[k]), RW);
      z = 0;
      for (int i = 0; i < 7; i++) begin
        longint e;
        e = 0;
        for (int k = 0; k < 5; k++) if (((LP[k] >> i) & 1) != 0) e += rv[k];
        if (i == 6) e = -e;
        check($sformatf("m(%0d)", i + 1), sext(longint'(m7[i]), M_W), e);
        z += sext(longint'(m7[i]), M_W) << i;
      end
      begin
        longint d;
        d = 0;
        for (int k = 0; k < 5; k++) d += LP[k] * rv[k];
        check("inner product", z, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
