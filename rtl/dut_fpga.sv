// dut_fpga: the logic placed on the device under test.
//
// The six VGA controller implementations (default, DMR with SET suppressor,
// TMR, DMR with guard gate, SET suppressor with delay, MBU filter) each fill
// two halves of the chip: copy A and copy B are two vga_array blocks of the
// same implementation and size, run from the same clock, reset and colour
// inputs. Every implementation thus brings out ten pins, R G B H V of copy A
// and of copy B, which stay equal unless an upset disturbs one copy. The
// control board compares them pin by pin.
//
// The instance counts per half default to values that reproduce the
// flip-flop totals the original chip held for each implementation (for
// example 41 default controllers of 27 flip-flops per half give about 2240
// flip-flops in all); they are this design's estimate, not given counts.
//
// fault[i] is injected into instance 0 of copy A of implementation i
// (index = vga_kind_e); tie it to zero in normal use. pins[i][0] is copy A,
// pins[i][1] copy B. All pins are registered in the controllers.
module dut_fpga
  import vga_pkg::*;
#(
  parameter int unsigned N_DEFAULT = 41,
  parameter int unsigned N_DMR     = 18,
  parameter int unsigned N_TMR     = 21,
  parameter int unsigned N_GG      = 15,
  parameter int unsigned N_DELAY   = 23,
  parameter int unsigned N_MBU     = 20
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [2:0]                       rgb_in,
  input  fault_t   [N_IMPL-1:0]            fault,
  output vga_out_t [N_IMPL-1:0][1:0]       pins
);

  localparam int unsigned COUNT [N_IMPL] = '{N_DEFAULT, N_DMR, N_TMR, N_GG, N_DELAY, N_MBU};

  for (genvar i = 0; i < N_IMPL; i++) begin : g_impl
    for (genvar s = 0; s < 2; s++) begin : g_copy
      vga_array #(.KIND(vga_kind_e'(i)), .N(COUNT[i])) u_arr (
        .clk(clk), .rst(rst), .rgb_in(rgb_in),
        .fault((s == 0) ? fault[i] : fault_t'('0)),
        .vga(pins[i][s]));
    end
  end

endmodule
