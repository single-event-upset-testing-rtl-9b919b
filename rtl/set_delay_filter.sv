// set_delay_filter: single-rail SET filter using a delayed copy of the signal.
//
// The signal d is split in two: one branch goes straight to the AND-OR
// multiplexer suppressor, the other through a chain of N_INV inverters (an
// even number, two by default) that delays it. A transient narrower than the
// chain's delay is present on only one branch at any moment, so the
// suppressor (which changes only when both inputs agree) ignores it. A
// transient wider than the delay, or an upset of the register after the
// filter, is not caught.
//
// In a zero-delay simulation the two branches are always equal. set_pulse
// models a transient narrower than the delay arriving on the direct branch:
// it flips that branch while the delayed branch still holds the old value.
// Tie it to zero in normal use. On an FPGA the inverter chain must be kept
// from being optimised away (a keep attribute on its nets). N_INV = 2 is the
// original design's chain; the rest is this design's choice.
module set_delay_filter #(
  parameter int unsigned W     = 1,
  parameter int unsigned N_INV = 2
) (
  input  logic [W-1:0] d,
  input  logic [W-1:0] set_pulse,
  output logic [W-1:0] y
);

  logic [N_INV:0][W-1:0] chain;
  logic [W-1:0]          direct;

  assign chain[0] = d;
  for (genvar k = 0; k < N_INV; k++) begin : g_inv
    assign chain[k+1] = ~chain[k];
  end

  // An even chain restores the polarity; an odd N_INV would invert it, so the
  // last stage is corrected for odd lengths.
  logic [W-1:0] delayed;
  assign delayed = (N_INV % 2 == 0) ? chain[N_INV] : ~chain[N_INV];
  assign direct  = d ^ set_pulse;

  set_suppressor #(.W(W)) u_sup (.a(direct), .b(delayed), .y(y));

endmodule
