// mbu_filter: three-input SET/MBU filter, the AND-OR multiplexer filter
// extended to three redundant copies.
//
// A three-input AND branch and a three-input OR branch of copies a, b, c feed
// a multiplexer whose select is its own output (AND while the output is 0, OR
// while it is 1). The output therefore changes only when all three copies
// agree on a new value. A wrong value on one copy, or the same wrong value on
// two copies at once (a multiple bit upset), leaves the output where it was.
// It takes the place of the majority voter after tripled registers.
//
// As in set_suppressor, the multiplexer feedback is a storage loop and is
// written as the equivalent transparent latch (open while the AND and OR
// branches agree); the reported latch is intended. No clock.
//
// A lint tool that analyses the per-bit loop as a whole may warn that it
// finds no latch in the always_latch block; synthesis does infer one latch
// per bit, and the hold behaviour is checked bit by bit in simulation.
module mbu_filter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  logic [W-1:0] and_br, or_br;

  always_comb begin
    and_br = a & b & c;
    or_br  = a | b | c;
  end

  // With the select tied to the output, the multiplexer passes the branch
  // that equals the output; its value can only change when both branches
  // carry the same new value, and then it takes that value.
  always_latch begin
    for (int i = 0; i < W; i++)
      if (and_br[i] == or_br[i]) y[i] = or_br[i];
  end

endmodule
