// tb_seu_test_system: end-to-end testbench of the whole test set-up at its
// default size (41, 18, 21, 15, 23 and 20 controllers per half for the six
// implementations; 350-clock flag stretch; 16-bit counters).
//
// Clocks: 25 MHz pixel clock and a 50 MHz control clock, offset by 5 ns.
//   1. One full frame without faults: copy A and copy B of every
//      implementation are compared with the closed-form timing model on every
//      pixel clock, and no mismatch flag may rise.
//   2. Register upset: bit 5 of the horizontal count in bank 0 of one copy-A
//      controller of every implementation is upset at the same moment. The
//      unmitigated and delay-filter implementations must then count at least
//      one hsync error, the TMR, DMR, guard-gate and MBU implementations none.
//   3. Transient on logic copy 0 (red output bit) of every implementation:
//      counted as a colour error by the default implementation only.
//   4. Upset of bit 8 of the vertical count in the default implementation:
//      a vsync error must be counted within one frame.
//   5. clr_counts clears every counter.
// Each mechanism (masked upset, detected hsync / colour / vsync error, flag
// stretch, counter clear) is counted; one that never happened is a failure.
module tb_seu_test_system;
  import vga_pkg::*;
  localparam int unsigned LINE = 800, LINES = 527, FRAME = LINE * LINES;
  localparam int unsigned HBIT = STATE_W - CNT_W + 5;     // h_count[5]
  localparam int unsigned VBIT = STATE_W - 2 * CNT_W + 8; // v_count[8]
  localparam int unsigned RBIT = 2;                       // rgb[2] = red

  logic clk_dut = 1'b0, clk_ctrl = 1'b0, rst, clr_counts;
  logic [2:0] rgb_in;
  fault_t   [N_IMPL-1:0]            fault;
  vga_out_t [N_IMPL-1:0][1:0]       vga_pins;
  logic     [N_IMPL-1:0][4:0]       err_flags;
  logic     [N_IMPL-1:0][2:0][15:0] err_count;
  int checks = 0, failures = 0;
  longint t;
  int n_masked = 0, n_hsync_err = 0, n_colour_err = 0, n_vsync_err = 0, n_stretch = 0, n_clear = 0;

  seu_test_system dut (
    .clk_dut(clk_dut), .clk_ctrl(clk_ctrl), .rst(rst), .clr_counts(clr_counts),
    .rgb_in(rgb_in), .fault(fault), .vga_pins(vga_pins), .err_flags(err_flags),
    .err_count(err_count));

  always #20 clk_dut = ~clk_dut;
  initial begin #5; forever #10 clk_ctrl = ~clk_ctrl; end

  initial begin
    #(64'd40 * (3 * FRAME));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vga_out_t model(longint te, logic [2:0] rgb);
    longint hp, vp, hpp, vpp;
    vga_out_t m;
    hp = (te - 1) % LINE;  vp = ((te - 1) / LINE) % LINES;
    hpp = (te - 2) % LINE; vpp = ((te - 2) / LINE) % LINES;
    m.hsync = !(hp >= 664 && hp <= 760);
    m.vsync = !(vp >= 491 && vp <= 493);
    {m.red, m.green, m.blue} = (te >= 2 && hpp < 640 && vpp < 480) ? rgb : 3'b000;
    return m;
  endfunction

  task automatic reset_all();
    fault = '0; rst = 1'b1; clr_counts = 1'b0;
    repeat (4) @(posedge clk_dut);
    rst <= 1'b0; t = 0;
  endtask

  task automatic run(int n);
    repeat (n) begin @(posedge clk_dut); t++; end
  endtask

  // measure how long one flag stays high (in control clocks)
  int flag_high = 0, longest = 0;
  always @(posedge clk_ctrl) begin
    if (err_flags != '0) flag_high <= flag_high + 1;
    else begin
      if (flag_high > longest) longest <= flag_high;
      flag_high <= 0;
    end
  end

  initial begin
    bit unprotected [N_IMPL] = '{1, 0, 0, 0, 1, 0};
    bit colour_visible [N_IMPL] = '{1, 0, 0, 0, 0, 0};
    rgb_in = 3'b111;
    reset_all();

    // 1. fault-free frame
    for (int n = 0; n < FRAME; n++) begin
      @(posedge clk_dut); t++;
      @(negedge clk_dut);
      for (int i = 0; i < N_IMPL; i++)
        for (int s = 0; s < 2; s++) begin
          checks++;
          if (vga_pins[i][s] !== model(t, rgb_in)) begin
            failures++;
            if (failures < 5) $display("impl %0d copy %0d t=%0d: %b vs %b", i, s, t, vga_pins[i][s], model(t, rgb_in));
          end
        end
      if (err_flags != '0) begin failures++; if (failures < 5) $display("flag without fault at t=%0d", t); end
    end
    checks++;
    if (err_count != '0) failures++;

    // 2. register upset in every implementation
    run(100);
    @(negedge clk_dut);
    for (int i = 0; i < N_IMPL; i++) fault[i].seu[0][HBIT] = 1'b1;
    @(posedge clk_dut); fault <= '0; t++;
    run(3 * LINE);
    for (int i = 0; i < N_IMPL; i++) begin
      checks++;
      if (unprotected[i]) begin
        if (err_count[i][1] == 0) begin failures++; $display("impl %0d: upset not counted", i); end
        else n_hsync_err++;
      end else begin
        if (err_count[i] != '0) begin failures++; $display("impl %0d: masked upset counted", i); end
        else n_masked++;
      end
    end
    checks++;
    if (longest >= 350) n_stretch++;
    else begin failures++; $display("flag held %0d control clocks", longest); end

    // 3. transient on the red output of logic copy 0, during the visible area
    reset_all();
    run(200);
    @(negedge clk_dut);
    for (int i = 0; i < N_IMPL; i++) fault[i].set[0][RBIT] = 1'b1;
    @(posedge clk_dut); fault <= '0; t++;
    run(LINE);
    for (int i = 0; i < N_IMPL; i++) begin
      checks++;
      if (colour_visible[i]) begin
        if (err_count[i][0] != 16'd1) begin failures++; $display("impl %0d: colour error count %0d", i, err_count[i][0]); end
        else n_colour_err++;
      end else if (err_count[i] != '0) begin
        failures++; $display("impl %0d: masked transient counted", i);
      end else n_masked++;
    end

    // 4. vertical-count upset in the default implementation
    reset_all();
    run(300);
    @(negedge clk_dut);
    fault[VGA_DEFAULT].seu[0][VBIT] = 1'b1;
    @(posedge clk_dut); fault <= '0; t++;
    run(FRAME + LINE);
    checks++;
    if (err_count[VGA_DEFAULT][2] == 0) begin failures++; $display("vsync error not counted"); end
    else n_vsync_err++;

    // 5. clear the counters
    @(negedge clk_dut) clr_counts = 1'b1;
    repeat (2) @(posedge clk_ctrl);
    @(negedge clk_dut) clr_counts = 1'b0;
    checks++;
    if (err_count != '0) begin failures++; $display("counters not cleared"); end
    else n_clear++;

    $display("mechanisms: masked=%0d hsync_err=%0d colour_err=%0d vsync_err=%0d stretch=%0d clear=%0d",
             n_masked, n_hsync_err, n_colour_err, n_vsync_err, n_stretch, n_clear);
    checks++;
    if (n_masked == 0 || n_hsync_err == 0 || n_colour_err == 0 || n_vsync_err == 0 ||
        n_stretch == 0 || n_clear == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
