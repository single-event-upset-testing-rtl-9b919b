// vga_pkg: types and timing constants shared by the VGA controller variants
// and the SEU test harness.
//
// The controller is a 640x480 VGA sync generator clocked at 25 MHz with a
// 3-bit colour input (eight colours). Its whole state is one register bank of
// 27 flip-flops (vga_state_t): the horizontal and vertical counters, the two
// video-on flags and the five registered output pins. Every mitigation variant
// replicates or filters exactly this bank, so the struct is the unit that gets
// doubled or tripled.
//
// The horizontal and vertical sync windows and the active area follow the
// timing constants of the original controller (sync low from count 664 to 760
// on a line, from 491 to 493 in a frame, 640 x 480 visible, vertical count
// wrapping at 526). The horizontal wrap at 799 (800 clocks per line, 32 us at
// 25 MHz) is this design's choice.
//
// fault_t is the fault-injection bundle every variant accepts: one SET mask
// per copy of the next-state logic and one SEU mask per copy of the register
// bank. In normal use it is tied to zero.
package vga_pkg;

  localparam int unsigned CNT_W       = 10;
  localparam int unsigned H_PIXELS    = 640;
  localparam int unsigned H_SYNC_LOW  = 664;
  localparam int unsigned H_SYNC_HIGH = 760;
  localparam int unsigned H_END       = 799;
  localparam int unsigned V_PIXELS    = 480;
  localparam int unsigned V_SYNC_LOW  = 491;
  localparam int unsigned V_SYNC_HIGH = 493;
  localparam int unsigned V_END       = 526;

  // One register bank of the controller (27 bits).
  typedef struct packed {
    logic [CNT_W-1:0] h_count;
    logic [CNT_W-1:0] v_count;
    logic             video_on_h;
    logic             video_on_v;
    logic             hsync;     // active low
    logic             vsync;     // active low
    logic [2:0]       rgb;       // {red, green, blue}
  } vga_state_t;

  localparam int unsigned STATE_W = $bits(vga_state_t);

  // The five pins of one controller.
  typedef struct packed {
    logic       red;
    logic       green;
    logic       blue;
    logic       hsync;
    logic       vsync;
  } vga_out_t;

  // Fault injection: set[i] flips bits of logic copy i's output (a single
  // event transient reaching the register input); seu[i] flips bits of
  // register copy i's output until that register next loads (a single event
  // upset). Copies a variant does not have are ignored.
  typedef struct packed {
    logic [2:0][STATE_W-1:0] set;
    logic [2:0][STATE_W-1:0] seu;
  } fault_t;

  // The six implementations placed on the device under test.
  typedef enum logic [2:0] {
    VGA_DEFAULT   = 3'd0,
    VGA_DMR       = 3'd1,
    VGA_TMR       = 3'd2,
    VGA_GG        = 3'd3,
    VGA_SET_DELAY = 3'd4,
    VGA_MBU       = 3'd5
  } vga_kind_e;

  localparam int unsigned N_IMPL = 6;

  function automatic vga_out_t state_to_pins(vga_state_t s);
    return '{red: s.rgb[2], green: s.rgb[1], blue: s.rgb[0],
             hsync: s.hsync, vsync: s.vsync};
  endfunction

endpackage
