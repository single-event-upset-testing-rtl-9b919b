// tb_guard_gate: self-checking testbench of guard_gate.
//
// Drives 4000 random input vectors on an 8-bit instance, one every 10 ns,
// and compares the output after each step with a reference model kept in
// the testbench: the C-element truth table, 00 gives 0, 11 gives 1, otherwise the previous value (input c is unused).
// The input sequence is biased so that the inputs agree about half the time,
// so both the pass and the hold behaviour are exercised many times; the
// number of steps in which at least one bit held is counted and must be
// non-zero.
module tb_guard_gate;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, c, y, ref_y;
  int checks = 0, failures = 0, holds = 0;

  guard_gate #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] base;
    a = '0; b = '0; c = '0;
    #10;
    ref_y = '0;
    checks++;
    if (y !== ref_y) failures++;
    for (int n = 0; n < 4000; n++) begin
      base = W'($urandom);
      a = base; b = base; c = base;
      case ($urandom_range(0, 3))
        0: a = base ^ W'($urandom);
        1: b = base ^ W'($urandom);
        2: c = base ^ W'($urandom);
        default: ;
      endcase
      if ($urandom_range(0, 7) == 0) begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
      #10;
      for (int i = 0; i < W; i++) begin
        if (a[i] == b[i]) ref_y[i] = a[i]; else holds++;
      end
      checks++;
      if (y !== ref_y) begin
        failures++;
        if (failures < 5) $display("a=%b b=%b c=%b y=%b expected %b", a, b, c, y, ref_y);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
