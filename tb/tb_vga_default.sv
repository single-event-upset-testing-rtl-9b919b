// tb_vga_default: self-checking testbench of vga_default.
//
// vga_variant_checker runs one full frame and compares every pin on every
// clock with a closed-form model of the sync timing, measures the line,
// hsync, vsync and frame lengths in clocks, then injects transients and
// upsets and checks which of them this implementation masks:
// transient on one logic copy: visible;
// upset of bank 0: visible;
// upset of bank 2: not run;
// the same transient on logic copies 0 and 1: visible.
module tb_vga_default;
  import vga_pkg::*;

  logic       clk, rst;
  logic [2:0] rgb_in;
  fault_t     fault;
  vga_out_t   vga;

  vga_default dut (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(fault), .vga(vga));

  vga_variant_checker #(
    .MASK_A(1'b0), .MASK_B(1'b0), .MASK_C(1'b0), .MASK_D(1'b0),
    .SKIP_A(1'b0), .SKIP_C(1'b1)
  ) chk (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(fault), .vga(vga));

endmodule
