// lfsr_lacg: linear feedback shift register built from look-ahead clock-gated
// flip-flops.
//
// The register is a chain q[0] -> q[1] -> ... -> q[N-1]; the XOR of the tapped
// bits is fed back into q[0], and q[N-1] is the serial output. With the default
// N = 4 and taps q[3], q[2] it steps through all 15 non-zero states
// (x^4 + x^3 + 1). In a plain LFSR every flip-flop is clocked every cycle even
// though a bit often keeps its value; here each flip-flop is an lacg_dff whose
// clock is passed only if the bit can change:
//   * q[i], i > 0, copies q[i-1], so it is clocked only one edge after q[i-1]
//     changed: la_en[i] = tgl[i-1];
//   * q[0] takes the XOR of the tapped bits, so it is clocked only one edge
//     after a tapped bit changed: la_en[0] = OR of tgl over the taps.
// The OR for q[0] is the general look-ahead rule (it is conservative: for an
// XOR feedback it may deliver a pulse that leaves q[0] unchanged).
//
// From the source design: four LACG flip-flops, the shift direction q0 -> q3,
// the feedback XOR of q3 and q2 into q0, and q3 as the output. Own choices: the
// generic width/tap parameters, the OR rule for the feedback flip-flop, the
// non-zero reset value SEED (an all-zero LFSR would never leave zero), and the
// active-low asynchronous reset.
//
// Timing: after rst_n is released the register advances one LFSR step per
// rising edge of clk; clk_en[i] tells whether flip-flop i receives the pulse.
module lfsr_lacg #(
  parameter int unsigned     N    = 4,
  parameter logic [N-1:0]    TAPS = 4'b1100,   // bits XORed into q[0]
  parameter logic [N-1:0]    SEED = 4'b0001    // reset state, must be non-zero
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] q,
  output logic         out,
  output logic [N-1:0] clk_en
);
  logic [N-1:0] d;
  logic [N-1:0] tgl;
  logic [N-1:0] la_en;

  assign d[0]     = ^(q & TAPS);
  assign la_en[0] = |(tgl & TAPS);

  for (genvar i = 1; i < N; i++) begin : g_shift
    assign d[i]     = q[i-1];
    assign la_en[i] = tgl[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_ff
    lacg_dff #(.RST_VAL(SEED[i])) u_ff (
      .clk    (clk),
      .rst_n  (rst_n),
      .d      (d[i]),
      .la_en  (la_en[i]),
      .q      (q[i]),
      .tgl    (tgl[i]),
      .clk_en (clk_en[i])
    );
  end

  assign out = q[N-1];
endmodule
