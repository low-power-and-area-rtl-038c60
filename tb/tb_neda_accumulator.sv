// tb_neda_accumulator -- checks the MUX / adder / shift-register loop.
// The partial sums of the worked example, m = 7, 11, 1, 6, 3, -1, must
// accumulate to 97. Random signed 8-bit rows must give
// sum_i m(i+1) 2^i exactly. Every result must appear exactly W + 1 = 7 clocks
// after its start cycle, ready must be low meanwhile, and starts are issued back
// to back (in the done cycle) to check the W + 1 clock period.
module tb_neda_accumulator;
  import tb_ref_pkg::*;
  localparam int M_W = 8, W = 6, Y_W = M_W + W;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  logic [W-1:0][M_W-1:0] m;
  logic [Y_W-1:0] y;
  int checks = 0, failures = 0;

  neda_accumulator #(.M_W(M_W), .W(W)) dut (.*);

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

  task automatic run(longint exp);
    int cyc = 0;
    @(negedge clk);
    check("ready before start", longint'(ready), 1);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      check("ready while busy", longint'(ready), 0);
      @(negedge clk);
      cyc++;
    end
    check("latency", cyc, W + 1);
    check("result", sext(longint'(y), Y_W), exp);
  endtask

  initial begin
    static longint ex [6] = '{7, 11, 1, 6, 3, -1};
    longint e;
    for (int i = 0; i < W; i++) m[i] = M_W'(ex[i]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(97);
    for (int t = 0; t < 300; t++) begin
      e = 0;
      for (int i = 0; i < W; i++) begin
        m[i] = M_W'($urandom);
        if (t == 0) m[i] = 8'h80;
        if (t == 1) m[i] = 8'h7f;
        e += sext(longint'(m[i]), M_W) << i;
      end
      run(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
