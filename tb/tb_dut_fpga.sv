// tb_dut_fpga: self-checking testbench of dut_fpga with two controllers per
// half of each implementation.
//
// Phase 1 runs one full frame and compares all 60 pins (six implementations,
// copies A and B) on every clock with the closed-form timing model. Phase 2
// upsets bit 5 of the horizontal count in register bank 0 of instance 0,
// copy A, of all six implementations at once, then watches two lines: copy B
// must stay on the model everywhere, copy A must leave it for the default and
// delay-filter implementations (no register protection) and must stay on it
// for the TMR, DMR, guard-gate and MBU implementations.
module tb_dut_fpga;
  import vga_pkg::*;
  localparam int unsigned LINE = 800, LINES = 527, FRAME = LINE * LINES;
  localparam int unsigned BIT = STATE_W - CNT_W + 5;

  logic clk = 1'b0, rst;
  logic [2:0] rgb_in;
  fault_t   [N_IMPL-1:0]      fault;
  vga_out_t [N_IMPL-1:0][1:0] pins;
  int checks = 0, failures = 0;
  longint t;

  dut_fpga #(.N_DEFAULT(2), .N_DMR(2), .N_TMR(2), .N_GG(2), .N_DELAY(2), .N_MBU(2)) dut (
    .clk(clk), .rst(rst), .rgb_in(rgb_in), .fault(fault), .pins(pins));

  always #20 clk = ~clk;

  initial begin
    #(64'd40 * (FRAME + 10000));
    failures++;
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

  initial begin
    int diffs [N_IMPL][2];
    bit exp_visible [N_IMPL] = '{1, 0, 0, 0, 1, 0};
    fault = '0; rgb_in = 3'b111; rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0; t = 0;
    for (int n = 0; n < FRAME + 100; n++) begin
      @(posedge clk); t++;
      @(negedge clk);
      for (int i = 0; i < N_IMPL; i++)
        for (int s = 0; s < 2; s++) begin
          checks++;
          if (pins[i][s] !== model(t, rgb_in)) begin
            failures++;
            if (failures < 5) $display("impl %0d copy %0d t=%0d: %b vs %b", i, s, t, pins[i][s], model(t, rgb_in));
          end
        end
    end
    foreach (diffs[i, s]) diffs[i][s] = 0;
    for (int i = 0; i < N_IMPL; i++) fault[i].seu[0][BIT] = 1'b1;
    @(posedge clk); fault <= '0; t++;
    repeat (2 * LINE) begin
      @(negedge clk);
      for (int i = 0; i < N_IMPL; i++)
        for (int s = 0; s < 2; s++)
          if (pins[i][s] !== model(t, rgb_in)) diffs[i][s]++;
      @(posedge clk); t++;
    end
    for (int i = 0; i < N_IMPL; i++) begin
      checks += 2;
      if (diffs[i][1] != 0) begin failures++; $display("impl %0d copy B disturbed", i); end
      if ((diffs[i][0] != 0) != exp_visible[i]) begin
        failures++;
        $display("impl %0d copy A: %0d differing clocks, expected %s", i, diffs[i][0],
                 exp_visible[i] ? "some" : "none");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
