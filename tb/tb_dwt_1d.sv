// tb_dwt_1d -- checks the 1-D 9/7 analysis stage against the integer
// reference model. Lines of random even length with random signed 4-bit
// samples are streamed with random gaps in in_valid; each line ends with
// in_last. Every out_valid pair is compared with the decimated low-pass and
// high-pass outputs of the reference (zero history at each line start).
// A final line is streamed with in_valid held high to check the rate:
// two samples per COEF_W + 1 = 8 clocks.
module tb_dwt_1d;
  import tb_ref_pkg::*;
  localparam int DATA_W = 4, Y_W = 15;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid;
  logic [DATA_W-1:0] in_data = '0;
  logic [Y_W-1:0] out_lo, out_hi;
  int checks = 0, failures = 0;
  longint exp_lo [$], exp_hi [$];
  int n_out = 0, stalls = 0;
  bit full_rate = 0;
  longint last_out = -1;
  int n_gap = 0;

  dwt_1d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_lo.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        check("low-pass", sext(longint'(out_lo), Y_W), exp_lo.pop_front());
        check("high-pass", sext(longint'(out_hi), Y_W), exp_hi.pop_front());
      end
      n_out++;
      // back-to-back pairs at full rate: one output every COEF_W + 1 clocks
      if (full_rate && last_out >= 0) begin
        check("output spacing", ($time - last_out) / 10, 8);
        n_gap++;
      end
      last_out = $time;
    end
    if (rst_n && in_valid && !in_ready) stalls++;
  end

  task automatic send_line(int len, bit gaps);
    lvec_t x, lo, hi;
    for (int i = 0; i < len; i++) x.push_back(sext(longint'($urandom), DATA_W));
    line_dwt(x, lo, hi);
    foreach (lo[i]) begin
      exp_lo.push_back(lo[i]);
      exp_hi.push_back(hi[i]);
    end
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while (gaps && ($urandom % 3 == 0)) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_data  = DATA_W'(x[i]);
      in_last  = (i == len - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    in_last  = 0;
  endtask

  initial begin
    int total;
    repeat (2) @(posedge clk);
    rst_n = 1;
    total = 0;
    for (int l = 0; l < 40; l++) begin
      int len;
      len = 2 * (1 + $urandom % 12);
      send_line(len, 1'b1);
      total += len / 2;
    end
    // full-rate line: 32 samples
    repeat (20) @(posedge clk);
    full_rate = 1;
    last_out  = -1;
    send_line(32, 1'b0);
    total += 16;
    repeat (20) @(posedge clk);
    check("full-rate spacings seen", n_gap, 15);
    check("outputs", n_out, total);
    check("queue drained", exp_lo.size(), 0);
    if (stalls == 0) begin
      failures++;
      $display("FAIL back-pressure never happened");
    end
    $display("stalls=%0d outputs=%0d", stalls, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
