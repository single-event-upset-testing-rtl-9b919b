// vga_tmr: the VGA sync controller with local triple modular redundancy.
//
// Three copies of the next-state logic, three register banks and three
// majority voters. Voter i votes bitwise over the three banks and feeds logic
// copy i, and logic copy i loads bank i, so a wrong bank or a transient in one
// logic copy is outvoted and is overwritten at the next clock. The pins come
// from voter 0. Clock and reset are shared by the three copies (local TMR, not
// full global TMR), as in the original design.
//
// Interface as vga_default. fault.set[i] and fault.seu[i], i = 0..2, inject
// into logic copy i and bank i.
module vga_tmr
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  fault_t     fault,
  output vga_out_t   vga
);

  vga_state_t q [3];
  vga_state_t voted [3];
  vga_state_t nxt [3];
  vga_state_t d [3];

  for (genvar i = 0; i < 3; i++) begin : g_copy
    maj_voter #(.W(STATE_W)) u_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(voted[i]));
    vga_next_state u_logic (.cur(voted[i]), .rgb_in(rgb_in), .nxt(nxt[i]));
    assign d[i] = nxt[i] ^ fault.set[i];
    state_reg #(.W(STATE_W)) u_reg (.clk(clk), .rst(rst), .d(d[i]), .seu(fault.seu[i]), .q(q[i]));
  end

  assign vga = state_to_pins(voted[0]);

endmodule
