// tb_transpose_buffer -- checks the frame memory: random words are written
// to every address, then read back in a scrambled (column-like) order; the
// data must appear the clock after re and hold while re is low.
module tb_transpose_buffer;
  localparam int W = 30, DEPTH = 128, AW = 7;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  transpose_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      for (int i = 0; i < DEPTH; i++) begin
        int a;
        a = (i % 16) * 8 + i / 16;  // transpose of a 8 x 16 layout
        @(negedge clk);
        re = 1; raddr = AW'(a);
        @(negedge clk);
        re = 0; raddr = AW'(a ^ 1);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
        end
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL addr %0d not held", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
