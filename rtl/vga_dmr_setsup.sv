// vga_dmr_setsup: the VGA sync controller with DMR logic and AND-OR
// multiplexer SET suppressors (the "VGA DMR" implementation).
//
// The next-state logic is doubled. In front of each of the three register
// banks sits a set_suppressor whose two inputs are the two logic copies, so a
// transient in one copy (of either polarity) never reaches a register. The
// three banks are majority-voted; voter j feeds logic copy j (two voters), so
// an upset of one bank is outvoted and is reloaded at the next clock. The
// pins come from voter 0.
//
// The filters are storage loops (latches); they are open whenever the two
// logic copies agree, which is the normal case, so in fault-free operation
// the controller behaves exactly like vga_default.
//
// Interface as vga_default. fault.set[0..1] inject into the two logic copies,
// fault.seu[0..2] into the three banks; fault.set[2] is not used.
module vga_dmr_setsup
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  fault_t     fault,
  output vga_out_t   vga
);

  vga_state_t q [3];
  vga_state_t filt [3];
  vga_state_t voted [2];
  vga_state_t nxt [2];
  vga_state_t c [2];

  for (genvar j = 0; j < 2; j++) begin : g_logic
    maj_voter #(.W(STATE_W)) u_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(voted[j]));
    vga_next_state u_logic (.cur(voted[j]), .rgb_in(rgb_in), .nxt(nxt[j]));
    assign c[j] = nxt[j] ^ fault.set[j];
  end

  for (genvar i = 0; i < 3; i++) begin : g_bank
    set_suppressor #(.W(STATE_W)) u_filt (.a(c[0]), .b(c[1]), .y(filt[i]));
    state_reg #(.W(STATE_W)) u_reg (.clk(clk), .rst(rst), .d(filt[i]), .seu(fault.seu[i]), .q(q[i]));
  end

  assign vga = state_to_pins(voted[0]);

endmodule
