// maj_voter: bitwise two-out-of-three majority gate.
//
// Each output bit is 1 when at least two of the three corresponding input
// bits are 1, so a wrong value on any one copy is outvoted. Purely
// combinational, no timing. W sets the number of bits voted in parallel.
// This is the voter of the triple-modular-redundant controller and the
// register-side voter of the DMR and guard-gate controllers.
module maj_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
