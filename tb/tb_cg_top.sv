// tb_cg_top: end-to-end test of both clock-gated circuits at their default
// sizes (one data-driven gated flip-flop, 4-bit look-ahead gated LFSR).
// Reference models in the bench: an ungated register for the DDCG side and an
// ungated LFSR (q0 <= q3 ^ q2, shift q0 -> q3) for the LACG side. Every cycle
// the outputs and the clock enables are compared with them. The bench counts
// how often each mechanism occurred and fails if one never did:
//   DDCG pulse delivered / suppressed, LACG pulse delivered / suppressed for
//   every LFSR flip-flop, LFSR sequence wrap-around to the seed (period 15).
module tb_cg_top;
  localparam logic [3:0] SEED = 4'b0001;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [0:0] ddcg_d, ddcg_q;
  logic       ddcg_clk_en;
  logic [3:0] lfsr_q, lfsr_clk_en;
  logic       lfsr_out;

  logic       ref_d;
  logic [3:0] ref_l, prev_l, exp_en;
  int checks = 0, failures = 0, cycles = 0;
  int ddcg_on = 0, ddcg_off = 0, wraps = 0, period = 0;
  int lacg_on[4], lacg_off[4];

  cg_top dut (
    .clk(clk), .rst_n(rst_n),
    .ddcg_d(ddcg_d), .ddcg_q(ddcg_q), .ddcg_clk_en(ddcg_clk_en),
    .lfsr_q(lfsr_q), .lfsr_out(lfsr_out), .lfsr_clk_en(lfsr_clk_en)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  task automatic seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    logic [3:0] changed;
    foreach (lacg_on[i]) begin lacg_on[i] = 0; lacg_off[i] = 0; end
    ddcg_d = '0; ref_d = 1'b0; ref_l = SEED; exp_en = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) begin
      if ($urandom_range(0, 2) == 0) ddcg_d = ~ddcg_d;
      #1;
      check(ddcg_clk_en == (ddcg_d[0] != ref_d), "DDCG enable request");
      check(lfsr_q == ref_l, "LFSR state");
      check(lfsr_out == ref_l[3], "LFSR output");
      check(lfsr_clk_en == exp_en, "LACG enables");
      if (ddcg_clk_en) ddcg_on++; else ddcg_off++;
      for (int i = 0; i < 4; i++)
        if (lfsr_clk_en[i]) lacg_on[i]++; else lacg_off[i]++;
      if (cycles > 0 && ref_l == SEED) begin
        wraps++;
        if (period == 0) period = cycles;
      end
      @(posedge clk);
      ref_d = ddcg_d[0];
      prev_l = ref_l;
      ref_l = {ref_l[2:0], ref_l[3] ^ ref_l[2]};
      changed = ref_l ^ prev_l;
      exp_en = {changed[2:0], changed[3] | changed[2]};
      #1 check(ddcg_q[0] == ref_d, "DDCG q after edge");
      cycles++;
      @(negedge clk);
    end
    check(period == 15, "LFSR period 15");
    seen(ddcg_on, "DDCG clock pulse delivered");
    seen(ddcg_off, "DDCG clock pulse suppressed");
    seen(wraps, "LFSR wrap-around");
    for (int i = 0; i < 4; i++) begin
      seen(lacg_on[i], $sformatf("LACG pulse delivered to q%0d", i));
      seen(lacg_off[i], $sformatf("LACG pulse suppressed for q%0d", i));
    end
    $display("DDCG pulses %0d/%0d; LACG pulses q0..q3 %0d %0d %0d %0d of %0d; wraps %0d",
             ddcg_on, cycles, lacg_on[0], lacg_on[1], lacg_on[2], lacg_on[3], cycles, wraps);
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
