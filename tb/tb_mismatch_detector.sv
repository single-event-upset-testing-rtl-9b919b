// tb_mismatch_detector: self-checking testbench of mismatch_detector
// (STRETCH = 20 to keep it short).
//
// The two inputs are driven equal with random values for a while (err must
// stay low), then isolated differences of 1 to 3 clocks are applied. For each
// the testbench checks that err rises exactly three clocks after the first
// differing clock edge (two synchroniser stages and the latch) and stays high
// for exactly STRETCH clocks after the last difference has passed the
// synchroniser. A second difference inside the stretch must extend it.
module tb_mismatch_detector;
  localparam int unsigned STRETCH = 20;
  logic clk = 1'b0, rst, a, b, err;
  int checks = 0, failures = 0;

  mismatch_detector #(.STRETCH(STRETCH)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .err(err));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock index and the clocks at which err was last seen rising and falling.
  int cyc = 0, rise_at = -1, fall_at = -1;
  logic err_q = 1'b0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (err && !err_q) rise_at = cyc;
    if (!err && err_q) fall_at = cyc;
    err_q = err;
  end

  // Difference applied for len clocks; optionally a second one of len2 clocks
  // starting gap2 clocks after the first ends. With the first differing edge
  // at clock c0+1, err must first be seen high at clock c0+3 and stay high
  // until STRETCH clocks after the last difference leaves the synchroniser.
  task automatic pulse(int len, int gap2, int len2);
    int c0, span;
    logic v;
    @(negedge clk);
    c0 = cyc;
    v = 1'($urandom);
    a = v; b = ~v;
    repeat (len) @(negedge clk);
    a = v; b = v;
    span = len;
    if (len2 > 0) begin
      repeat (gap2) @(negedge clk);
      a = ~v; b = v;
      repeat (len2) @(negedge clk);
      a = v; b = v;
      span = len + gap2 + len2;
    end
    repeat (span + STRETCH + 10) @(negedge clk);
    checks++;
    if (rise_at != c0 + 3) begin failures++; $display("rise at %0d, expected %0d", rise_at, c0 + 3); end
    checks++;
    if (fall_at - rise_at != span - 1 + STRETCH) begin
      failures++;
      $display("high %0d clocks, expected %0d", fall_at - rise_at, span - 1 + STRETCH);
    end
  endtask

  initial begin
    rst = 1'b1; a = 1'b0; b = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (200) begin
      @(negedge clk);
      a = 1'($urandom); b = a;
      checks++;
      if (err) failures++;
    end
    @(negedge clk); a = 1'b0; b = 1'b0;
    repeat (4) @(negedge clk);
    pulse(1, 0, 0);
    pulse(2, 0, 0);
    pulse(3, 0, 0);
    pulse(1, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
