// state_reg: one register bank of the VGA controller, with an upset input.
//
// A plain bank of W D flip-flops with synchronous, active-high reset to zero
// (the controller clears its counters on a clock edge while rst is high). The
// output is the stored value XOR seu: while a bit of seu is high the
// corresponding flip-flop reads as upset, and the next clock edge reloads it
// from d, which is how a single event upset in a register behaves. seu is tied
// to zero in normal use. One clock of latency from d to q.
module state_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  input  logic [W-1:0] seu,
  output logic [W-1:0] q
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (rst) r <= '0;
    else     r <= d;
  end

  assign q = r ^ seu;

endmodule
