// tb_vga_next_state: self-checking testbench of vga_next_state.
//
// Applies the corner counts of every timing window (0, the sync edges, the
// visible-area edges, the wrap points and their neighbours) in all
// combinations, plus 20000 random states, and checks every field of the
// next state against arithmetic written out here: the horizontal count wraps
// after 799, the vertical count steps on the horizontal wrap and wraps after
// 526, hsync is low for counts 664..760, vsync for 491..493, video-on marks
// counts below 640 / 480, and the colour passes only when both current
// video-on flags are set.
module tb_vga_next_state;
  import vga_pkg::*;
  vga_state_t cur, nxt;
  logic [2:0] rgb_in;
  int checks = 0, failures = 0;

  vga_next_state dut (.cur(cur), .rgb_in(rgb_in), .nxt(nxt));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int h, v, eh, ev;
    #1;
    h = int'(cur.h_count); v = int'(cur.v_count);
    eh = (h >= 799) ? 0 : h + 1;
    ev = (h >= 799) ? ((v >= 526) ? 0 : v + 1) : v;
    checks++;
    if (int'(nxt.h_count) != eh || int'(nxt.v_count) != ev ||
        nxt.hsync !== !(h >= 664 && h <= 760) || nxt.vsync !== !(v >= 491 && v <= 493) ||
        nxt.video_on_h !== (h < 640) || nxt.video_on_v !== (v < 480) ||
        nxt.rgb !== ((cur.video_on_h && cur.video_on_v) ? rgb_in : 3'b000)) begin
      failures++;
      if (failures < 5) $display("h=%0d v=%0d -> %p", h, v, nxt);
    end
  endtask

  initial begin
    int hs [] = '{0, 1, 638, 639, 640, 641, 663, 664, 665, 759, 760, 761, 798, 799, 1023};
    int vs [] = '{0, 1, 478, 479, 480, 481, 490, 491, 492, 493, 494, 525, 526, 1023};
    foreach (hs[i]) foreach (vs[j]) for (int k = 0; k < 4; k++) begin
      cur = '0;
      cur.h_count = CNT_W'(hs[i]);
      cur.v_count = CNT_W'(vs[j]);
      {cur.video_on_h, cur.video_on_v} = 2'(k);
      rgb_in = 3'(k + i);
      check_one();
    end
    repeat (20000) begin
      cur = vga_state_t'({$urandom, $urandom});
      cur.h_count = CNT_W'($urandom_range(0, 850));
      cur.v_count = CNT_W'($urandom_range(0, 560));
      rgb_in = 3'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
