// control_board: the monitoring board between the device under test and the
// data acquisition.
//
// For each of the six implementations it compares copy A and copy B of the
// five VGA pins in a mismatch_detector, giving 30 latched error flags (err).
// The flags are grouped as on the error display: a colour error is any of the
// red, green and blue flags, then hsync, then vsync. Each group drives an
// error_counter, so count[i][0..2] hold the colour, hsync and vsync error
// events of implementation i. clk is the control clock (faster than the
// 25 MHz DUT clock); rst resets the channels, clr_counts clears the counters.
// Flags appear three control clocks after a pin difference (two synchroniser
// stages and the latch); counters step one clock later.
module control_board
  import vga_pkg::*;
#(
  parameter int unsigned STRETCH = 350,
  parameter int unsigned CW      = 16
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               clr_counts,
  input  vga_out_t [N_IMPL-1:0][1:0]         pins,
  output logic     [N_IMPL-1:0][4:0]         err,
  output logic     [N_IMPL-1:0][2:0][CW-1:0] count
);

  for (genvar i = 0; i < N_IMPL; i++) begin : g_impl
    logic [4:0] pa, pb;
    assign pa = pins[i][0];
    assign pb = pins[i][1];
    // err bit order matches vga_out_t: [4]=red [3]=green [2]=blue [1]=hsync [0]=vsync
    for (genvar s = 0; s < 5; s++) begin : g_sig
      mismatch_detector #(.STRETCH(STRETCH)) u_cmp (
        .clk(clk), .rst(rst), .a(pa[s]), .b(pb[s]), .err(err[i][s]));
    end

    logic [2:0] grp;
    assign grp[0] = |err[i][4:2];
    assign grp[1] = err[i][1];
    assign grp[2] = err[i][0];
    for (genvar g = 0; g < 3; g++) begin : g_cnt
      error_counter #(.CW(CW)) u_cnt (
        .clk(clk), .rst(rst | clr_counts), .flag(grp[g]), .count(count[i][g]));
    end
  end

endmodule
