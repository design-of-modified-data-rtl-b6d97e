// tb_icg: checks the latch + AND clock gate.
// The enable is changed at random in the low phase; every cycle the gated
// clock must carry a full pulse exactly when the enable was 1 at the rising
// edge, and stay low otherwise. The enable is also toggled in the middle of
// the high phase, which must not clip or create a pulse.
module tb_icg;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected_pulses = 0;
  int cycles = 0;

  icg dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    bit en_at_edge;
    @(negedge clk);
    repeat (200) begin
      en = 1'($urandom_range(0, 1));
      en_at_edge = en;
      if (en_at_edge) expected_pulses++;
      @(posedge clk);
      #1 check(gclk == en_at_edge, "gclk at start of high phase");
      #1 en = ~en;  // disturb the enable while clk is high
      #1 check(gclk == en_at_edge, "gclk held through enable glitch");
      @(negedge clk);
      #1 check(gclk == 1'b0, "gclk low in low phase");
      cycles++;
    end
    check(pulses == expected_pulses, "number of gated pulses");
    $display("pulses=%0d of %0d cycles", pulses, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
