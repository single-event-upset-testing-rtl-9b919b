// tb_error_counter: self-checking testbench of error_counter.
//
// A random flag made of high and low runs of 1 to 6 clocks is applied to a
// 16-bit and a 3-bit counter. The expected count is the number of runs of
// ones seen since reset (a run held high for several clocks is one event),
// saturating at 7 for the 3-bit counter. Both counts are compared on every
// clock, and a mid-run reset must clear them.
module tb_error_counter;
  logic clk = 1'b0, rst, flag;
  logic [15:0] cnt16;
  logic [2:0]  cnt3;
  int checks = 0, failures = 0;
  int runs, sat;
  logic prev;

  error_counter #(.CW(16)) dut16 (.clk(clk), .rst(rst), .flag(flag), .count(cnt16));
  error_counter #(.CW(3))  dut3  (.clk(clk), .rst(rst), .flag(flag), .count(cnt3));

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(int n_runs);
    for (int r = 0; r < n_runs; r++) begin
      repeat ($urandom_range(1, 6)) begin
        @(negedge clk); flag = 1'b1;
        @(posedge clk); #1;
        if (!prev) runs++;
        prev = 1'b1;
        checks++;
        if (cnt16 != 16'(runs) || cnt3 != 3'((runs > 7) ? 7 : runs)) begin
          failures++;
          if (failures < 5) $display("runs=%0d cnt16=%0d cnt3=%0d", runs, cnt16, cnt3);
        end
      end
      repeat ($urandom_range(1, 6)) begin
        @(negedge clk); flag = 1'b0;
        @(posedge clk); #1;
        prev = 1'b0;
        checks++;
        if (cnt16 != 16'(runs)) failures++;
      end
    end
  endtask

  initial begin
    rst = 1'b1; flag = 1'b0; prev = 1'b0; runs = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_phase(300);
    checks++;
    if (cnt3 != 3'd7) failures++;
    @(negedge clk) rst = 1'b1; flag = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (cnt16 != 0 || cnt3 != 0) failures++;
    @(negedge clk) rst = 1'b0; flag = 1'b0;
    runs = 0; prev = 1'b0;
    run_phase(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
