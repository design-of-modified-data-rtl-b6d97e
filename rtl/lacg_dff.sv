// lacg_dff: flip-flop with look-ahead clock gating (LACG).
//
// In data-driven gating the enable of a flip-flop is derived from its own D and
// Q in the same cycle, which leaves little time for the gating logic. Look-ahead
// gating instead predicts one cycle early whether this flip-flop will need a
// clock: a flip-flop whose D comes from other flip-flops can only change one
// edge after one of those sources has changed. The caller therefore supplies
// la_en = "one of my source flip-flops changes at the coming edge", which is
// the OR of the sources' tgl outputs. la_en is captured in an enable register
// on the free-running clock; the registered enable drives an integrated clock
// gate (latch + AND) whose gated clock loads q. So the pulse at edge t+1 is
// delivered only if a source toggled at edge t.
//
// Each cell also exports tgl = d ^ q (a half-adder sum): 1 when this flip-flop
// itself changes at the coming edge. Chaining tgl into the la_en of the
// flip-flops it feeds builds look-ahead gating for a whole circuit.
//
// From the source design: a flip-flop cell with its own look-ahead clock gate,
// used as the building block of the gated LFSR, and the half-adder change
// detector. Own choices (the cell's internals are not spelled out): the
// registered look-ahead enable, the OR-of-sources rule left to the caller, the
// active-low asynchronous reset to RST_VAL, and the enable register resetting
// to 1 so that the first edge after reset is always delivered; that edge makes
// q consistent with d, which the prediction relies on afterwards.
//
// Timing: d and la_en must be stable before the rising edge of clk. q takes d
// at a rising edge (one cycle latency) whenever the prediction made in the
// previous cycle asked for the pulse. clk_en shows the enable used at the next
// rising edge. An assertion flags any suppressed edge at which d differed
// from q, i.e. a look-ahead enable that does not cover all changes of d.
// The assertion is disabled during reset, so lint may note that rst_n, an
// asynchronous reset, is also sampled by a clocked (checking-only) process.
module lacg_dff #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic la_en,   // a source of d changes at the coming edge
  output logic q,
  output logic tgl,     // this flip-flop changes at the coming edge (d ^ q)
  output logic clk_en   // the coming edge is passed to this flip-flop
);
  logic en_q;
  logic gclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= la_en;
  end

  assign clk_en = en_q;

  icg u_icg (
    .clk  (clk),
    .en   (en_q),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RST_VAL;
    else        q <= d;
  end

  half_adder u_ha (
    .a     (d),
    .b     (q),
    .sum   (tgl),
    .carry ()
  );

  // The look-ahead rule of the caller must never suppress an edge at which the
  // flip-flop would change: a wrong la_en would otherwise lose data silently.
  a_no_lost_change: assert property (@(posedge clk) disable iff (!rst_n) !en_q |-> d == q)
    else $error("lacg_dff: clock suppressed while d != q (look-ahead enable too weak)");
endmodule
