// vga_default: the VGA sync controller with no mitigation (the reference).
//
// One copy of the next-state logic (vga_next_state) feeds one 27-bit register
// bank (state_reg); the five pins come straight from the bank. A transient
// captured by the bank, or an upset of the bank, is kept: a wrong counter bit
// shifts the sync timing until the next reset.
//
// Interface: clk is the 25 MHz pixel clock, rst a synchronous active-high
// reset, rgb_in the 3-bit colour, vga the registered R, G, B, H, V pins.
// fault.set[0] flips the logic output at the register input, fault.seu[0]
// flips the register output; the other fault fields are not used here.
module vga_default
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

  assign d = nxt ^ fault.set[0];

  state_reg #(.W(STATE_W)) u_reg (.clk(clk), .rst(rst), .d(d), .seu(fault.seu[0]), .q(q));

  assign vga = state_to_pins(q);

endmodule
