// tb_control_board: self-checking testbench of control_board (STRETCH = 8).
//
// The 60 pin inputs are driven with random but pairwise-equal values (no
// flag may rise), then for 120 random (implementation, signal) choices one
// copy of that pin is inverted for one clock. The testbench checks that
// exactly that flag rises, and after each injection that every counter holds
// the number of events expected for its group (colour = red, green or blue;
// hsync; vsync). clr_counts must clear all counters.
module tb_control_board;
  import vga_pkg::*;
  logic clk = 1'b0, rst, clr_counts;
  vga_out_t [N_IMPL-1:0][1:0]       pins;
  logic     [N_IMPL-1:0][4:0]       err;
  logic     [N_IMPL-1:0][2:0][15:0] count;
  int checks = 0, failures = 0;
  int expc [N_IMPL][3];

  control_board #(.STRETCH(8), .CW(16)) dut (
    .clk(clk), .rst(rst), .clr_counts(clr_counts), .pins(pins), .err(err), .count(count));

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic equal_pins();
    for (int i = 0; i < N_IMPL; i++) begin
      pins[i][0] = vga_out_t'($urandom);
      pins[i][1] = pins[i][0];
    end
  endtask

  initial begin
    int seen;
    rst = 1'b1; clr_counts = 1'b0;
    equal_pins();
    foreach (expc[i, g]) expc[i][g] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (100) begin
      @(negedge clk); equal_pins();
      checks++;
      if (err != '0) failures++;
    end
    repeat (120) begin
      int i, s, g;
      i = $urandom_range(0, N_IMPL - 1);
      s = $urandom_range(0, 4);
      g = (s >= 2) ? 0 : (s == 1) ? 1 : 2;
      @(negedge clk);
      pins[i][$urandom_range(0, 1)][s] ^= 1'b1;
      @(negedge clk);
      equal_pins();
      seen = 0;
      repeat (6) begin
        @(negedge clk);
        if (err[i][s]) seen = 1;
        for (int j = 0; j < N_IMPL; j++)
          for (int t = 0; t < 5; t++)
            if (err[j][t] && !(j == i && t == s)) begin
              failures++;
              $display("flag %0d/%0d raised for a change on %0d/%0d", j, t, i, s);
            end
      end
      checks++;
      if (!seen) begin failures++; $display("no flag for %0d/%0d", i, s); end
      expc[i][g]++;
      repeat (12) @(negedge clk);    // let the stretched flag fall
      for (int j = 0; j < N_IMPL; j++)
        for (int t = 0; t < 3; t++) begin
          checks++;
          if (int'(count[j][t]) != expc[j][t]) begin
            failures++;
            $display("count %0d/%0d = %0d, expected %0d", j, t, count[j][t], expc[j][t]);
          end
        end
    end
    @(negedge clk) clr_counts = 1'b1;
    @(negedge clk) clr_counts = 1'b0;
    checks++;
    if (count != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
