// vga_set_delay: the VGA sync controller with delay-based SET suppressors
// (the "VGA SET Delay" implementation).
//
// No redundancy: one copy of the next-state logic and one register bank, as
// in vga_default, with a set_delay_filter (AND-OR multiplexer suppressor fed
// by the signal and a two-inverter delayed copy of it) in front of every
// flip-flop. A transient narrower than the delay is filtered; an upset of the
// register is not, and persists like in the unmitigated controller.
//
// Interface as vga_default. fault.set[0] models a transient narrower than the
// delay on the direct branch of each filter; fault.seu[0] upsets the bank.
module vga_set_delay
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  fault_t     fault,
  output vga_out_t   vga
);

  vga_state_t q, nxt, d;

  vga_next_state u_logic (.cur(q), .rgb_in(rgb_in), .nxt(nxt));

  set_delay_filter #(.W(STATE_W), .N_INV(2)) u_filt (.d(nxt), .set_pulse(fault.set[0]), .y(d));

  state_reg #(.W(STATE_W)) u_reg (.clk(clk), .rst(rst), .d(d), .seu(fault.seu[0]), .q(q));

  assign vga = state_to_pins(q);

endmodule
