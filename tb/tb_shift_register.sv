// tb_shift_register -- checks the 8-stage, 4-bit tap delay line.
// First the value 0110 is held on x and must reach y1 after one clock, y2
// after two, .. y8 after eight, later stages still holding their reset zero.
// Then random samples with random shift enables and clears are compared
// stage by stage with a queue model.
module tb_shift_register;
  localparam int W = 4, DEPTH = 8;
  logic clk = 0, rst_n = 0, shift_en = 0, clr = 0;
  logic [W-1:0] x = '0;
  logic [DEPTH:1][W-1:0] y;
  logic [W-1:0] model [DEPTH+1];
  int checks = 0, failures = 0;

  shift_register #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 1; i <= DEPTH; i++) begin
      checks++;
      if (y[i] !== model[i]) begin
        failures++;
        $display("FAIL y%0d=%h expected %h", i, y[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i <= DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // constant 0110 on x, one stage per clock
    x <= 4'b0110;
    shift_en <= 1;
    for (int c = 1; c <= DEPTH; c++) begin
      @(posedge clk);
      #1;
      for (int i = 1; i <= DEPTH; i++) begin
        checks++;
        if (y[i] !== ((i <= c) ? 4'b0110 : 4'b0000)) begin
          failures++;
          $display("FAIL clock %0d: y%0d=%b", c, i, y[i]);
        end
      end
    end
    for (int i = 1; i <= DEPTH; i++) model[i] = 4'b0110;
    // random traffic
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      x        = W'($urandom);
      shift_en = ($urandom % 4) != 0;
      clr      = ($urandom % 23) == 0;
      @(posedge clk);
      if (clr) begin
        for (int i = 1; i <= DEPTH; i++) model[i] = '0;
      end else if (shift_en) begin
        for (int i = DEPTH; i >= 2; i--) model[i] = model[i-1];
        model[1] = x;
      end
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
