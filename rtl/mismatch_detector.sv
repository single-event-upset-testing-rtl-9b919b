// mismatch_detector: one comparison channel of the control board.
//
// The two copies of one VGA pin arrive from the device under test
// asynchronously to the control clock; each passes a two-flip-flop
// synchroniser, then an XOR flags any difference. Because the data
// acquisition that reads the flag samples far more slowly than the control
// clock, a difference is latched: err goes high on the clock after the XOR
// sees a mismatch and stays high until STRETCH control clocks have passed
// without one. With the default 350 clocks at 50 MHz that is 7 us, one
// sampling period of the acquisition module. XOR and latch follow the
// original board; the synchroniser and the timed release are this design's
// choices. Synchronous, active-high reset.
module mismatch_detector #(
  parameter int unsigned STRETCH = 350
) (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic err
);

  localparam int unsigned CW = $clog2(STRETCH + 1);

  logic [1:0]    sync_a, sync_b;
  logic [CW-1:0] hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_a <= '0;
      sync_b <= '0;
      hold   <= '0;
    end else begin
      sync_a <= {sync_a[0], a};
      sync_b <= {sync_b[0], b};
      if (sync_a[1] ^ sync_b[1])
        hold <= CW'(STRETCH);
      else if (hold != '0)
        hold <= hold - 1'b1;
    end
  end

  assign err = (hold != '0);

endmodule
