// set_suppressor: AND-OR multiplexer filter for single event transients.
//
// Two redundant copies of a signal, a and b, feed an AND branch and an OR
// branch. A two-input multiplexer picks the AND branch while the output is 0
// and the OR branch while the output is 1: its select is its own output. When
// the two copies agree both branches carry the same value and the output
// follows it; when a transient flips one copy the two branches differ and the
// multiplexer simply returns its own present value, so the transient never
// reaches the output in either polarity.
//
// The multiplexer with its output fed back to its select is a storage loop:
// it behaves exactly as a transparent latch that is open while the AND and OR
// branches agree. It is written here in that latch form, which keeps the AND
// branch, the OR branch and the "select the branch that matches the output"
// rule visible while giving tools a well-defined storage element. The latch
// the tools report is therefore intended. There is no clock; the output
// settles one gate delay after the copies agree. The second input may come
// from a duplicated logic copy (DMR form) or from a delay line
// (see set_delay_filter).
//
// A lint tool that analyses the per-bit loop as a whole may warn that it
// finds no latch in the always_latch block; synthesis does infer one latch
// per bit, and the hold behaviour is checked bit by bit in simulation.
module set_suppressor #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] and_br, or_br;

  always_comb begin
    and_br = a & b;
    or_br  = a | b;
  end

  // With the select tied to the output, the multiplexer passes the branch
  // that equals the output; its value can only change when both branches
  // carry the same new value, and then it takes that value.
  always_latch begin
    for (int i = 0; i < W; i++)
      if (and_br[i] == or_br[i]) y[i] = or_br[i];
  end

endmodule
