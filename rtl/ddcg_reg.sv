// ddcg_reg: K-bit register with modified data-driven clock gating (DDCG).
//
// Each flip-flop compares its data input with its output in a half adder; the
// half-adder sum is 1 when the next edge would change that bit. The K sums are
// ORed into one joint request, which an integrated clock gate (latch + AND)
// turns into a gated clock shared by all K flip-flops (a multi-bit flip-flop
// group). When no bit would change, the group receives no clock pulse at all.
//
// From the source scheme: the per-bit XOR (realised as a half-adder sum), the
// OR over the k bits, the latch + AND gate, and the shared clock of the group.
// Own choices: the default group size K = 1 (the single flip-flop with d/q
// that the scheme was characterised on), an active-low asynchronous reset that
// clears q (reset is not described), and the clk_en status output that exposes
// the joint request so the number of delivered clock pulses can be observed.
// The half adders' carry outputs are not used and are left open.
//
// Interface / timing: d must be stable before the rising edge of clk (it feeds
// the ICG latch through the half adders). q takes d at a rising edge of clk,
// i.e. one cycle latency, exactly as an ungated register; the gating never
// changes the stored values, only whether a clock pulse is delivered.
module ddcg_reg #(
  parameter int unsigned K = 1  // flip-flops sharing one gated clock
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  output logic [K-1:0] q,
  output logic         clk_en   // 1: the next rising edge is passed to the group
);
  logic [K-1:0] bit_change;
  logic         gclk;

  for (genvar i = 0; i < K; i++) begin : g_detect
    half_adder u_ha (
      .a     (d[i]),
      .b     (q[i]),
      .sum   (bit_change[i]),
      .carry ()
    );
  end

  assign clk_en = |bit_change;

  icg u_icg (
    .clk  (clk),
    .en   (clk_en),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
