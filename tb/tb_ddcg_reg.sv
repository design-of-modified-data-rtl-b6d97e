// tb_ddcg_reg: checks the data-driven clock-gated register at its default
// single-bit size and as a 4-bit group.
// Random data (held unchanged most cycles, so gating happens often) is applied
// in the low phase. A reference register computed in the bench gives the
// expected q one cycle later; the clock-enable request must equal "some bit of
// d differs from q", and the pulses that reach the flip-flops (counted on
// clk_en at each rising edge) must equal the number of cycles with a change.
module tb_ddcg_reg;
  localparam int unsigned KW = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          d1;
  logic          q1, en1;
  logic [KW-1:0] d4, q4;
  logic          en4;

  logic          ref1;
  logic [KW-1:0] ref4;
  int checks = 0, failures = 0;
  int pulses1 = 0, pulses4 = 0, exp_pulses1 = 0, exp_pulses4 = 0, cycles = 0;

  ddcg_reg dut1 (.clk(clk), .rst_n(rst_n), .d(d1), .q(q1), .clk_en(en1));
  ddcg_reg #(.K(KW)) dut4 (.clk(clk), .rst_n(rst_n), .d(d4), .q(q4), .clk_en(en4));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (en1) pulses1++;
    if (en4) pulses4++;
  end

  initial begin
    d1 = 1'b0; d4 = '0; ref1 = 1'b0; ref4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      // hold the data in about two of three cycles
      if ($urandom_range(0, 2) == 0) d1 = ~d1;
      if ($urandom_range(0, 2) == 0) d4[$urandom_range(0, KW-1)] ^= 1'b1;
      #1;
      check(en1 == (d1 != ref1), "K=1 enable request");
      check(en4 == (d4 != ref4), "K=4 enable request");
      if (d1 != ref1) exp_pulses1++;
      if (d4 != ref4) exp_pulses4++;
      @(posedge clk);
      ref1 = d1;
      ref4 = d4;
      #1;
      check(q1 == ref1, "K=1 q after edge");
      check(q4 == ref4, "K=4 q after edge");
      cycles++;
    end
    @(negedge clk);
    check(pulses1 == exp_pulses1, "K=1 delivered pulses");
    check(pulses4 == exp_pulses4, "K=4 delivered pulses");
    check(pulses1 < cycles && pulses4 < cycles, "some pulses were gated");
    $display("K=1 pulses %0d, K=4 pulses %0d, of %0d cycles", pulses1, pulses4, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
