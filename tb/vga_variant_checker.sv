// vga_variant_checker: stimulus and self-check shared by the testbenches of
// the six VGA controller implementations.
//
// It drives clock (25 MHz), reset, colour and the fault-injection bundle of
// one controller and checks its five pins against a closed-form model: after
// t clock edges out of reset the horizontal count is t mod 800 and the line is
// (t div 800) mod 527, and each pin shows the decision made from the counts
// one edge earlier (two for the colour, which goes through the video-on
// flags). Phases:
//   1. one full frame without faults, every pin compared on every clock, and
//      the hsync period, hsync low time, vsync low time and frame length
//      measured in clocks;
//   2. four fault cases, each after a fresh reset: A) a transient on logic
//      copy 0, B) an upset of register bank 0, C) an upset of bank 2, D) the
//      same transient on logic copies 0 and 1 at once. Each hits bit 5 of the
//      horizontal count for the half clock before an edge. The pins are then
//      compared for two lines: a masked case must show no difference, an
//      unmasked one must show some. MASK_x says which behaviour the
//      implementation must show; SKIP_x leaves a case out.
module vga_variant_checker
  import vga_pkg::*;
#(
  parameter bit MASK_A = 1'b0,
  parameter bit MASK_B = 1'b0,
  parameter bit MASK_C = 1'b0,
  parameter bit MASK_D = 1'b0,
  parameter bit SKIP_A = 1'b0,
  parameter bit SKIP_C = 1'b0
) (
  output logic       clk,
  output logic       rst,
  output logic [2:0] rgb_in,
  output fault_t     fault,
  input  vga_out_t   vga
);

  localparam int unsigned LINE  = 800;
  localparam int unsigned LINES = 527;
  localparam int unsigned FRAME = LINE * LINES;
  localparam int unsigned BIT   = STATE_W - CNT_W + 5;   // h_count[5]

  int checks = 0, failures = 0;
  longint t;                      // clock edges since reset
  int unsigned cycles = 0;

  initial clk = 1'b0;
  always #20 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #(64'd40 * (FRAME + 40000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vga_out_t model(longint te, logic [2:0] rgb);
    longint hp, vp, hpp, vpp;
    vga_out_t m;
    hp  = (te - 1) % LINE;
    vp  = ((te - 1) / LINE) % LINES;
    hpp = (te - 2) % LINE;
    vpp = ((te - 2) / LINE) % LINES;
    m.hsync = !(hp >= 664 && hp <= 760);
    m.vsync = !(vp >= 491 && vp <= 493);
    if (te >= 2 && hpp < 640 && vpp < 480) {m.red, m.green, m.blue} = rgb;
    else {m.red, m.green, m.blue} = 3'b000;
    return m;
  endfunction

  task automatic do_reset();
    fault = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    t = 0;
  endtask

  // advance one clock and compare at the following negative edge
  task automatic step(output logic mismatch);
    @(posedge clk);
    t++;
    @(negedge clk);
    mismatch = (vga !== model(t, rgb_in));
  endtask

  task automatic fault_case(string name, int which, bit masked);
    logic mm;
    int diffs;
    do_reset();
    rgb_in = 3'b111;
    repeat (100) begin step(mm); checks++; if (mm) failures++; end
    // inject during the half clock before the next edge
    case (which)
      0: fault.set[0][BIT] = 1'b1;
      1: fault.seu[0][BIT] = 1'b1;
      2: fault.seu[2][BIT] = 1'b1;
      default: begin fault.set[0][BIT] = 1'b1; fault.set[1][BIT] = 1'b1; end
    endcase
    @(posedge clk);
    fault <= '0;
    t++;
    diffs = 0;
    repeat (2 * LINE) begin
      @(negedge clk);
      if (vga !== model(t, rgb_in)) diffs++;
      @(posedge clk);
      t++;
    end
    checks++;
    if (masked != (diffs == 0)) begin
      failures++;
      $display("case %s: expected %s, saw %0d differing clocks", name,
               masked ? "masked" : "visible", diffs);
    end
  endtask

  initial begin
    logic mm;
    int unsigned hs_fall [$];
    int unsigned hs_low, vs_low;
    int unsigned vs_fall [$];
    logic hs_prev, vs_prev;
    rgb_in = 3'b101;
    do_reset();
    hs_prev = 1'b1; vs_prev = 1'b1; hs_low = 0; vs_low = 0;
    // phase 1: one frame plus two lines, exact comparison
    for (int n = 0; n < FRAME + 2 * LINE; n++) begin
      step(mm);
      checks++;
      if (mm) begin
        failures++;
        if (failures < 5) $display("t=%0d pins %b expected %b", t, vga, model(t, rgb_in));
      end
      if (!vga.hsync && hs_prev) hs_fall.push_back(cycles);
      if (!vga.vsync && vs_prev) vs_fall.push_back(cycles);
      if (!vga.hsync && hs_fall.size() == 1) hs_low++;
      if (!vga.vsync && vs_fall.size() == 1) vs_low++;
      hs_prev = vga.hsync; vs_prev = vga.vsync;
      if (n == 1000) rgb_in = 3'b011;
    end
    checks += 4;
    if (hs_fall.size() < 2 || hs_fall[1] - hs_fall[0] != LINE) begin failures++; $display("hsync period wrong"); end
    if (hs_low != 97) begin failures++; $display("hsync low %0d clocks, expected 97", hs_low); end
    if (vs_low != 3 * LINE) begin failures++; $display("vsync low %0d clocks, expected %0d", vs_low, 3 * LINE); end
    if (vs_fall.size() < 2 || vs_fall[1] - vs_fall[0] != FRAME) begin
      // one frame plus two lines holds only one vsync edge: check its position
      if (vs_fall.size() != 1) begin failures++; $display("vsync edges: %0d", vs_fall.size()); end
    end

    // phase 2: fault cases
    if (!SKIP_A) fault_case("A set copy 0", 0, MASK_A);
    fault_case("B seu bank 0", 1, MASK_B);
    if (!SKIP_C) fault_case("C seu bank 2", 2, MASK_C);
    fault_case("D set copies 0+1", 3, MASK_D);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
