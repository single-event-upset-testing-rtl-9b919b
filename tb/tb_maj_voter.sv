// tb_maj_voter: exhaustive self-checking testbench of maj_voter.
//
// A 3-bit instance is given all 512 combinations of its three inputs; each
// output bit is compared with the count of ones among the three input bits
// (1 when the count is at least two).
module tb_maj_voter;
  logic [2:0] a, b, c, y;
  int checks = 0, failures = 0;

  maj_voter #(.W(3)) dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      {a, b, c} = 9'(n);
      #1;
      for (int i = 0; i < 3; i++) begin
        int ones;
        ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
        checks++;
        if (y[i] !== (ones >= 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
