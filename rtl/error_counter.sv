// error_counter: counts error events, each exactly once.
//
// An event is counted on the clock where flag is high while the counter is
// armed; counting disarms it, and it re-arms only once flag has been seen low
// again. A flag held high for many clocks (as the stretched mismatch flags
// are) is thus one event. The count saturates at its maximum and clears with
// rst (synchronous, active high). This is the counting rule of the original
// error display; its width is this design's choice.
module error_counter #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          flag,
  output logic [CW-1:0] count
);

  logic armed;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      armed <= 1'b1;
    end else if (flag && armed) begin
      if (count != '1) count <= count + 1'b1;
      armed <= 1'b0;
    end else if (!flag) begin
      armed <= 1'b1;
    end
  end

endmodule
