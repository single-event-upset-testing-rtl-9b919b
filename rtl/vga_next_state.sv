// vga_next_state: the combinational logic of the VGA sync controller.
//
// From the current register bank and the colour inputs it computes the value
// the bank takes at the next pixel clock:
//   * h_count runs 0..H_END and wraps; v_count advances when h_count wraps
//     and itself wraps after V_END.
//   * hsync (vsync) is low while h_count (v_count) lies inside the sync window
//     [H_SYNC_LOW, H_SYNC_HIGH] ([V_SYNC_LOW, V_SYNC_HIGH]), high otherwise.
//   * video_on_h / video_on_v flag the visible 640 columns / 480 rows.
//   * the colour outputs pass rgb_in while both video-on flags are set and
//     are blanked (0) otherwise.
// All outputs are registered by the caller, so every pin changes one clock
// after the count that decides it. Mitigated variants instantiate this module
// two or three times; that duplication is what the SET filters rely on.
// The sync windows, active area and vertical wrap follow the original
// controller's constants; the horizontal wrap at 799 is this design's choice.
module vga_next_state
  import vga_pkg::*;
(
  input  vga_state_t cur,
  input  logic [2:0] rgb_in,
  output vga_state_t nxt
);

  logic h_wrap;

  always_comb begin
    h_wrap = (cur.h_count >= CNT_W'(H_END));

    nxt = cur;
    nxt.h_count = h_wrap ? '0 : cur.h_count + 1'b1;
    if (h_wrap)
      nxt.v_count = (cur.v_count >= CNT_W'(V_END)) ? '0 : cur.v_count + 1'b1;

    nxt.hsync = !((cur.h_count >= CNT_W'(H_SYNC_LOW)) && (cur.h_count <= CNT_W'(H_SYNC_HIGH)));
    nxt.vsync = !((cur.v_count >= CNT_W'(V_SYNC_LOW)) && (cur.v_count <= CNT_W'(V_SYNC_HIGH)));

    nxt.video_on_h = (cur.h_count < CNT_W'(H_PIXELS));
    nxt.video_on_v = (cur.v_count < CNT_W'(V_PIXELS));

    nxt.rgb = (cur.video_on_h && cur.video_on_v) ? rgb_in : 3'b000;
  end

endmodule
