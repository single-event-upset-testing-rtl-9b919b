// seu_test_system: the SEU test set-up for VGA controllers, in logic.
//
// Six implementations of a 640x480, 25 MHz VGA sync controller, one without
// mitigation and five hardened against single event effects, run side by
// side on the device under test (dut_fpga). Each is built twice (copy A and
// copy B) so that the two copies' pins can be compared; the control board
// (control_board) compares every pin pair, latches differences and counts
// error events per implementation for the colour, hsync and vsync signals.
// Under radiation the counts divided by fluence and flip-flop count give each
// implementation's upset cross-section.
//
// Ports: clk_dut is the 25 MHz pixel clock (made by a PLL elsewhere), clk_ctrl
// the faster control clock, rst resets both boards (synchronous, active high),
// clr_counts clears the counters. rgb_in is the colour input of every
// controller (held at 111 in the test). fault[i] injects transients and
// upsets into instance 0 of copy A of implementation i (tie to zero outside
// simulation). vga_pins are the DUT's 60 VGA pins, err_flags the 30 latched
// mismatch flags, err_count the 18 event counters.
module seu_test_system
  import vga_pkg::*;
(
  input  logic                             clk_dut,
  input  logic                             clk_ctrl,
  input  logic                             rst,
  input  logic                             clr_counts,
  input  logic [2:0]                       rgb_in,
  input  fault_t   [N_IMPL-1:0]            fault,
  output vga_out_t [N_IMPL-1:0][1:0]       vga_pins,
  output logic     [N_IMPL-1:0][4:0]       err_flags,
  output logic     [N_IMPL-1:0][2:0][15:0] err_count
);

  dut_fpga u_dut (
    .clk(clk_dut), .rst(rst), .rgb_in(rgb_in), .fault(fault), .pins(vga_pins));

  control_board #(.STRETCH(350), .CW(16)) u_ctrl (
    .clk(clk_ctrl), .rst(rst), .clr_counts(clr_counts), .pins(vga_pins),
    .err(err_flags), .count(err_count));

endmodule
