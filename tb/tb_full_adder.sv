// tb_full_adder -- exhaustive check of the one-bit full adder: for all
// eight input combinations {car, s2} must equal a2 + b2 + c2.
module tb_full_adder;
  logic a2, b2, c2, s2, car;
  int checks = 0, failures = 0;

  full_adder dut (.a2(a2), .b2(b2), .c2(c2), .s2(s2), .car(car));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a2, b2, c2} = 3'(v);
      #10;
      checks++;
      if ({car, s2} != 2'(int'(a2) + int'(b2) + int'(c2))) begin
        failures++;
        $display("FAIL a2=%b b2=%b c2=%b -> car=%b s2=%b", a2, b2, c2, car, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
