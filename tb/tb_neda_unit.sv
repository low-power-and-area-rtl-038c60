// tb_neda_unit -- checks complete NEDA inner-product engines.
//  * ex6: six-bit worked-example coefficients, r = 1..5 -> 97.
//  * lp / hp: default low-pass (60 26 -7 -1 2) and high-pass (55 -29 -2 4)
//    units with random signed 5-bit inputs, compared with the direct
//    inner product.
// Results must arrive COEF_W + 1 clocks after the start cycle; starts are issued as
// soon as ready allows, so the period is COEF_W + 1 clocks.
module tb_neda_unit;
  import tb_ref_pkg::*;
  localparam int RW = 5;
  logic clk = 0, rst_n = 0;
  logic start6 = 0, ready6, done6;
  logic start = 0, ready_lp, ready_hp, done_lp, done_hp;
  logic [4:0][RW-1:0] r5;
  logic [3:0][RW-1:0] r4;
  logic [13:0] y6;
  logic [14:0] y_lp, y_hp;
  int checks = 0, failures = 0;

  neda_unit #(.RW(RW), .NR(5), .COEF_W(6), .COEFS(neda_pkg::LP_COEFS_6B)) ex6 (
    .clk(clk), .rst_n(rst_n), .start(start6), .ready(ready6), .r(r5), .done(done6), .y(y6)
  );
  neda_unit #(.RW(RW)) lp (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready_lp), .r(r5), .done(done_lp), .y(y_lp)
  );
  neda_unit #(.RW(RW), .NR(4), .COEFS(neda_pkg::HP_COEFS)) hp (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready_hp), .r(r4), .done(done_hp), .y(y_hp)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    longint el, eh;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example
    @(negedge clk);
    for (int k = 0; k < 5; k++) r5[k] = RW'(k + 1);
    start6 = 1;
    @(negedge clk);
    start6 = 0;
    for (int k = 0; k < 5; k++) r5[k] = '0;  // inputs are registered at start
    cyc = 1;
    while (!done6) begin @(negedge clk); cyc++; end
    check("example latency", cyc, 7);
    check("example Y", sext(longint'(y6), 14), 97);
    // default coefficients
    for (int t = 0; t < 300; t++) begin
      while (!(ready_lp && ready_hp)) @(negedge clk);
      el = 0; eh = 0;
      for (int k = 0; k < 5; k++) begin
        r5[k] = RW'($urandom);
        if (t == 0) r5[k] = 5'b10000;
        el += LP[k] * sext(longint'(r5[k]), RW);
      end
      for (int k = 0; k < 4; k++) begin
        r4[k] = RW'($urandom);
        if (t == 0) r4[k] = (HP[k] < 0) ? 5'b01111 : 5'b10000;
        eh += HP[k] * sext(longint'(r4[k]), RW);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      r5 = '0;
      r4 = '0;
      cyc = 1;
      while (!done_lp) begin @(negedge clk); cyc++; end
      check("latency", cyc, 8);
      check("hp done with lp", longint'(done_hp), 1);
      check("low-pass", sext(longint'(y_lp), 15), el);
      check("high-pass", sext(longint'(y_hp), 15), eh);
      check("ready in done cycle", longint'(ready_lp), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
