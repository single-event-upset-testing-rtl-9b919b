// guard_gate: guard gate (Muller C-element) filter built from NAND gates.
//
// Truth table: a=b=0 gives 0, a=b=1 gives 1, a!=b keeps the previous output.
// The NAND form uses three two-input NANDs (a.b, a.y, b.y) and a three-input
// NAND that combines them, so y = a.b + a.y + b.y: the output is the majority
// of the two inputs and its own value. A transient on one of two duplicated
// inputs therefore cannot change the output; only an upset of both copies
// does.
//
// The feedback makes this a storage element. It is written as the equivalent
// transparent latch (open while a and b agree, loading their common value),
// so the latch that tools report is the intended C-element state. No clock,
// no reset: the latch opens as soon as the two copies agree, which they do
// after every reset of the surrounding registers.
//
// A lint tool that analyses the per-bit loop as a whole may warn that it
// finds no latch in the always_latch block; synthesis does infer one latch
// per bit, and the hold behaviour is checked bit by bit in simulation.
module guard_gate #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] n_ab;

  // NAND of the two inputs. When a and b agree, the NAND terms with y vanish
  // from y = a.b + a.y + b.y as far as the new value is concerned: y = a.b = a.
  always_comb n_ab = ~(a & b);

  always_latch begin
    for (int i = 0; i < W; i++)
      if (a[i] == b[i]) y[i] = ~n_ab[i];
  end

endmodule
