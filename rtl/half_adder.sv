// half_adder: one-bit half adder used as the change detector of a clock-gated
// flip-flop.
//
// With a = the flip-flop's present data input D and b = its present output Q,
// the sum a ^ b is 1 exactly when the next clock edge would change the stored
// bit, so it serves as the clock-enable request; when D and Q agree the sum is
// 0 and the clock pulse can be suppressed. The carry a & b is provided so the
// cell is a complete half adder; the gating logic in this design uses only the
// sum and leaves the carry open (tools may report that pin as unconnected).
//
// Using a half adder as the data-change detector is taken from the modified
// data-driven clock gating scheme; the carry output is kept for completeness.
//
// Interface: purely combinational, no clock, no latency.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
