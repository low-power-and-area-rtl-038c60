// tb_symmetric_preadder -- checks the tap folding of the 9-tap and 7-tap
// filters with random signed 4-bit taps: r(k) = X(n-k+1) + X(n-T+k) and the
// centre tap alone, as signed 5-bit values.
module tb_symmetric_preadder;
  import tb_ref_pkg::*;
  localparam int W = 4;
  logic [8:0][W-1:0] taps;
  logic [4:0][W:0]   r9;
  logic [3:0][W:0]   r7;
  int checks = 0, failures = 0;

  symmetric_preadder #(.W(W), .TAPS(9)) dut9 (.taps(taps),      .r(r9));
  symmetric_preadder #(.W(W), .TAPS(7)) dut7 (.taps(taps[6:0]), .r(r7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tv(int j);
    return sext(longint'(taps[j]), W);
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < 9; j++) taps[j] = W'($urandom);
      if (t == 0) for (int j = 0; j < 9; j++) taps[j] = 4'b1000;  // most negative
      #10;
      for (int k = 0; k < 5; k++) begin
        longint e;
        e = (k < 4) ? tv(k) + tv(8 - k) : tv(4);
        checks++;
        if (sext(longint'(r9[k]), W + 1) != e) begin
          failures++;
          $display("FAIL 9-tap r(%0d)=%0d expected %0d", k + 1, sext(longint'(r9[k]), W + 1), e);
        end
      end
      for (int k = 0; k < 4; k++) begin
        longint e;
        e = (k < 3) ? tv(k) + tv(6 - k) : tv(3);
        checks++;
        if (sext(longint'(r7[k]), W + 1) != e) begin
          failures++;
          $display("FAIL 7-tap r(%0d)=%0d expected %0d", k + 1, sext(longint'(r7[k]), W + 1), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
