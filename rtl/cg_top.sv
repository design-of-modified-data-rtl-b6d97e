// cg_top: the two clock-gated circuits side by side.
//
//   * a register with modified data-driven clock gating (ddcg_reg): the
//     group's clock is passed only when its data input differs from its
//     output, detected with half adders and gated by a latch + AND cell;
//   * a 4-bit LFSR built from look-ahead clock-gated flip-flops (lfsr_lacg):
//     each flip-flop's clock is passed only when one of the flip-flops feeding
//     it changed at the previous edge.
// The two share the clock and the active-low asynchronous reset, nothing else.
// clk_en outputs show, per gated group, whether the coming rising edge is
// delivered, so clock activity can be counted outside.
//
// Parameters default to the single-flip-flop DDCG cell and the 4-bit LFSR with
// feedback q3 ^ q2; the seed and reset are this design's own choice.
module cg_top #(
  parameter int unsigned          DDCG_K     = 1,
  parameter int unsigned          LFSR_N     = 4,
  parameter logic [LFSR_N-1:0]    LFSR_TAPS  = 4'b1100,
  parameter logic [LFSR_N-1:0]    LFSR_SEED  = 4'b0001
) (
  input  logic              clk,
  input  logic              rst_n,
  // data-driven clock-gated register
  input  logic [DDCG_K-1:0] ddcg_d,
  output logic [DDCG_K-1:0] ddcg_q,
  output logic              ddcg_clk_en,
  // look-ahead clock-gated LFSR
  output logic [LFSR_N-1:0] lfsr_q,
  output logic              lfsr_out,
  output logic [LFSR_N-1:0] lfsr_clk_en
);
  ddcg_reg #(.K(DDCG_K)) u_ddcg (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (ddcg_d),
    .q      (ddcg_q),
    .clk_en (ddcg_clk_en)
  );

  lfsr_lacg #(.N(LFSR_N), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk    (clk),
    .rst_n  (rst_n),
    .q      (lfsr_q),
    .out    (lfsr_out),
    .clk_en (lfsr_clk_en)
  );
endmodule
