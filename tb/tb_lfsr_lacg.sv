// tb_lfsr_lacg: checks the 4-bit LFSR of look-ahead clock-gated flip-flops
// against a plain, always-clocked reference LFSR computed in the bench
// (q0 <= q3 ^ q2, q[i] <= q[i-1]).
// Checked every cycle: the state, the serial output, and the clock enables
// (flip-flop i > 0 is clocked one edge after q[i-1] changed; q0 one edge after
// q3 or q2 changed). Also checked: the sequence returns to the seed after
// exactly 15 steps (maximal length) and fewer clock pulses are delivered than
// the 4 per cycle of the ungated register.
module tb_lfsr_lacg;
  localparam int unsigned N = 4;
  localparam logic [N-1:0] SEED = 4'b0001;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] q, clk_en;
  logic         out;
  logic [N-1:0] ref_q, ref_prev, exp_en;
  int checks = 0, failures = 0;
  int pulses = 0, cycles = 0, period = 0;

  lfsr_lacg dut (.clk(clk), .rst_n(rst_n), .q(q), .out(out), .clk_en(clk_en));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s (q=%b ref=%b en=%b exp=%b)", cycles, what, q, ref_q, clk_en, exp_en);
    end
  endtask

  initial begin
    logic [N-1:0] changed;
    ref_q = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_en = '1;  // every flip-flop is clocked on the first edge after reset
    repeat (60) begin
      #1 check(q == ref_q, "state");
      check(out == ref_q[N-1], "serial output");
      check(clk_en == exp_en, "look-ahead clock enables");
      if (cycles > 0 && period == 0 && ref_q == SEED) period = cycles;
      @(posedge clk);
      pulses += $countones(clk_en);
      ref_prev = ref_q;
      ref_q = {ref_q[N-2:0], ref_q[3] ^ ref_q[2]};
      changed = ref_q ^ ref_prev;
      exp_en = {changed[N-2:0], changed[3] | changed[2]};
      cycles++;
      @(negedge clk);
    end
    check(period == 15, "sequence period is 15");
    check(pulses < N * cycles, "fewer clock pulses than an ungated LFSR");
    $display("period %0d, pulses %0d of %0d ungated", period, pulses, N * cycles);
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
