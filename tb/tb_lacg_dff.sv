// tb_lacg_dff: checks a look-ahead clock-gated flip-flop fed by one source
// flip-flop modelled in the bench.
// The source register src takes a random next value nxt at each rising edge
// (held most of the time). The gated flip-flop copies src, and its look-ahead
// input is the source's own change flag nxt ^ src. Expected: q equals src one
// edge late, the first edge after reset is always delivered, and afterwards a
// pulse is delivered exactly one edge after each change of src.
module tb_lacg_dff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic src, nxt, q, tgl, clk_en;
  logic src_prev;
  bit   src_changed_last;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0, cycles = 0;

  lacg_dff dut (
    .clk(clk), .rst_n(rst_n), .d(src), .la_en(nxt ^ src),
    .q(q), .tgl(tgl), .clk_en(clk_en)
  );

  always #5 clk = ~clk;

  // the source flip-flop, updated like any register at the rising edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) src <= 1'b1;
    else        src <= nxt;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    nxt = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // first cycle after reset: enable register holds its reset value 1
    check(clk_en == 1'b1, "first edge after reset enabled");
    src_changed_last = 1'b1;
    repeat (300) begin
      nxt = ($urandom_range(0, 2) == 0) ? ~src : src;
      #1;
      check(clk_en == src_changed_last, "enable predicted one cycle ahead");
      check(tgl == (src != q), "tgl is d ^ q");
      if (clk_en) exp_pulses++;
      @(posedge clk);
      if (clk_en) pulses++;
      src_prev = src;
      src_changed_last = (nxt != src);
      #1 check(q == src_prev, "q follows d with one cycle latency");
      cycles++;
      @(negedge clk);
    end
    check(pulses == exp_pulses, "delivered pulses");
    check(pulses < cycles, "some pulses were gated");
    $display("pulses %0d of %0d cycles", pulses, cycles);
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
