// tb_half_adder: exhaustive check of the half adder's sum and carry against
// the arithmetic a + b.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] total;
      {a, b} = 2'(i);
      #1;
      total = 2'(a) + 2'(b);
      checks++;
      if ({carry, sum} !== total) begin
        failures++;
        $display("FAIL a=%b b=%b got carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
