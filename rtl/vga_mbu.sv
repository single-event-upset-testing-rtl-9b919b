// vga_mbu: the VGA sync controller with a three-input MBU filter in place of
// the majority voter, and a forced multiple bit upset (the "VGA MBU"
// implementation).
//
// The next-state logic is doubled. Logic copy 0 loads register bank 0 and
// logic copy 1 loads bank 2. Bank 1 does not follow its D input: every bit of
// it is driven by the asynchronous set (from bank 0's bit) and asynchronous
// clear (from its inverse), so it copies bank 0 at all times. An upset of
// bank 0 therefore appears on banks 0 and 1 together: a deliberate two-bit
// upset. Two mbu_filter instances (one per logic copy) combine the three
// banks; a filter output changes only when all three banks agree, so the
// forced double upset, like a single upset of bank 2, is held off until the
// next clock reloads the banks. The pins come from filter 0.
//
// Doubling the logic and slaving the second bank to the first through set and
// clear follow the original design; using one filter per logic copy is this
// design's choice. The filters are latches by construction (see mbu_filter).
//
// Interface as vga_default. fault.seu[0] upsets bank 0 (and so bank 1),
// fault.seu[2] upsets bank 2, fault.set[0..1] inject into the logic copies.
// fault.seu[1] and fault.set[2] are not used: bank 1 is held by its set/clear.
module vga_mbu
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  fault_t     fault,
  output vga_out_t   vga
);

  vga_state_t q0, q1, q2;
  vga_state_t filt [2];
  vga_state_t nxt [2];
  vga_state_t c [2];

  for (genvar j = 0; j < 2; j++) begin : g_logic
    mbu_filter #(.W(STATE_W)) u_filt (.a(q0), .b(q1), .c(q2), .y(filt[j]));
    vga_next_state u_logic (.cur(filt[j]), .rgb_in(rgb_in), .nxt(nxt[j]));
    assign c[j] = nxt[j] ^ fault.set[j];
  end

  state_reg #(.W(STATE_W)) u_reg0 (.clk(clk), .rst(rst), .d(c[0]), .seu(fault.seu[0]), .q(q0));
  state_reg #(.W(STATE_W)) u_reg2 (.clk(clk), .rst(rst), .d(c[1]), .seu(fault.seu[2]), .q(q2));

  // Bank 1: each flip-flop's set is bank 0's bit and its clear the inverse,
  // so the bit always equals bank 0's bit; its D input (logic copy 0) only
  // matters if both were released, which cannot happen.
  logic [STATE_W-1:0] q0v, q1v, c0v;
  assign q0v = q0;
  assign c0v = c[0];
  for (genvar b = 0; b < STATE_W; b++) begin : g_follow
    logic set_b, clr, ff;
    assign set_b = q0v[b];
    assign clr   = ~q0v[b];
    always_ff @(posedge clk or posedge clr or posedge set_b) begin
      if (clr)        ff <= 1'b0;
      else if (set_b) ff <= 1'b1;
      else            ff <= c0v[b];
    end
    assign q1v[b] = ff;
  end
  assign q1 = q1v;

  assign vga = state_to_pins(filt[0]);

endmodule
