// vga_array: N identical copies of one VGA controller implementation with
// their pins ANDed together.
//
// To fill the device under test (and so raise the chance of an upset), one
// implementation is instantiated N times and the same pin of every instance
// is ANDed into one output pin: red with red, hsync with hsync, and so on.
// While every instance runs in step the ANDed pins equal one controller's
// pins; a fault in any instance that drives one of its pins low shows on the
// output. KIND picks the implementation (vga_kind_e). Instance 0 receives the
// fault-injection bundle, the others run fault-free. The AND is
// combinational, so the pins keep the controllers' one-clock latency.
module vga_array
  import vga_pkg::*;
#(
  parameter vga_kind_e   KIND = VGA_DEFAULT,
  parameter int unsigned N    = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  fault_t     fault,
  output vga_out_t   vga
);

  vga_out_t pins [N];

  for (genvar k = 0; k < N; k++) begin : g_inst
    fault_t f;
    assign f = (k == 0) ? fault : '0;
    case (KIND)
      VGA_DMR: begin : g_dmr
        vga_dmr_setsup u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
      VGA_TMR: begin : g_tmr
        vga_tmr u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
      VGA_GG: begin : g_gg
        vga_dmr_gg u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
      VGA_SET_DELAY: begin : g_delay
        vga_set_delay u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
      VGA_MBU: begin : g_mbu
        vga_mbu u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
      default: begin : g_default
        vga_default u_vga (.clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(f), .vga(pins[k]));
      end
    endcase
  end

  always_comb begin
    vga = '1;
    for (int k = 0; k < N; k++) vga &= pins[k];
  end

endmodule
