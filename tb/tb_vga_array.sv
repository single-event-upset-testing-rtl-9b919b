// tb_vga_array: self-checking testbench of vga_array, with three unmitigated
// controllers (KIND = VGA_DEFAULT, N = 3).
//
// While all three instances run in step the ANDed pins must equal one
// controller's pins, which vga_variant_checker compares on every clock of a
// full frame against its closed-form timing model. A transient or upset
// injected into instance 0 must then show through the AND on the outputs.
module tb_vga_array;
  import vga_pkg::*;

  logic       clk, rst;
  logic [2:0] rgb_in;
  fault_t     fault;
  vga_out_t   vga;

  vga_array #(.KIND(VGA_DEFAULT), .N(3)) dut (
    .clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(fault), .vga(vga));

  vga_variant_checker #(
    .MASK_A(1'b0), .MASK_B(1'b0), .MASK_C(1'b0), .MASK_D(1'b0),
    .SKIP_A(1'b0), .SKIP_C(1'b1)
  ) chk (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(fault), .vga(vga));

endmodule
