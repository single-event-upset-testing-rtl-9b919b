// tb_beam_run: a simulated irradiation run of the whole test set-up at its
// default size, the situation the set-up was built for. Single faults arrive
// one at a time at random places, and every implementation's error counters
// are read at the end, as the beam-test tables do.
//
// Clocks as in the end-to-end test: 25 MHz pixel clock, 50 MHz control clock.
// A fault is one of the fault masks of an implementation, with one random
// bit of the 27 state bits raised from a falling edge to the next rising
// edge. A fault arrives on a random clock, on average every 600 pixel clocks.
//
//   Phase 1, one full frame: faults go only to the places where the
//   implementations are meant to mask them:
//     - TMR: any logic copy or any bank;
//     - DMR and guard gate: either logic copy, any bank;
//     - MBU: bank 0 (a forced double upset) or bank 2;
//     - SET delay: transients on its logic.
//   Each copy-A and copy-B pin must match the closed-form timing model on
//   every clock, no error flag may rise, and every counter must read zero.
//
//   Phase 2, one more frame: register upsets at random bits of bank 0 of the
//   unmitigated and SET-delay implementations. Copy B (never faulted) must
//   still match the model on every clock. Both implementations must count
//   errors, and no other implementation may count any. A counter-state upset
//   leaves that controller out of step until the next reset, just as on the
//   real board. The test then resets the DUT and clears the counters before
//   the next upset.
//
// The faults injected and the error events counted per implementation are
// printed at the end. The fault rate and the random stream are this test's
// own choices; they stand in for the proton flux, not for its value.
module tb_beam_run;
  import vga_pkg::*;
  localparam int unsigned LINE = 800, LINES = 527, FRAME = LINE * LINES;
  localparam int unsigned GAP = 1200;  // mean gap is GAP/2 pixel clocks

  logic clk_dut, clk_ctrl, rst, clr_counts;
  logic [2:0] rgb_in;
  fault_t   [N_IMPL-1:0]            fault;
  vga_out_t [N_IMPL-1:0][1:0]       vga_pins;
  logic     [N_IMPL-1:0][4:0]       err_flags;
  logic     [N_IMPL-1:0][2:0][15:0] err_count;
  int checks = 0, failures = 0;
  longint t;
  int n_fault [N_IMPL];
  int n_event [N_IMPL];

  seu_test_system dut (
    .clk_dut(clk_dut), .clk_ctrl(clk_ctrl), .rst(rst), .clr_counts(clr_counts),
    .rgb_in(rgb_in), .fault(fault), .vga_pins(vga_pins), .err_flags(err_flags),
    .err_count(err_count));

  initial begin clk_dut = 1'b0; forever #20 clk_dut = ~clk_dut; end
  initial begin clk_ctrl = 1'b0; #5; forever #10 clk_ctrl = ~clk_ctrl; end

  initial begin
    #(64'd40 * (4 * FRAME));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pins of a fault-free controller t clocks after reset was released.
  function automatic vga_out_t model(longint te, logic [2:0] rgb);
    longint hp, vp, hpp, vpp;
    vga_out_t m;
    hp = (te - 1) % longint'(LINE);  vp = ((te - 1) / longint'(LINE)) % longint'(LINES);
    hpp = (te - 2) % longint'(LINE); vpp = ((te - 2) / longint'(LINE)) % longint'(LINES);
    m.hsync = !(hp >= 664 && hp <= 760);
    m.vsync = !(vp >= 491 && vp <= 493);
    {m.red, m.green, m.blue} = (te >= 2 && hpp < 640 && vpp < 480) ? rgb : 3'b000;
    return m;
  endfunction

  task automatic reset_dut();
    fault = '0; rst = 1'b1; clr_counts = 1'b0;
    repeat (4) @(posedge clk_dut);
    rst <= 1'b0; t = 0;
  endtask

  // Sum of an implementation's three counters.
  function automatic int events(int i);
    return int'(err_count[i][0]) + int'(err_count[i][1]) + int'(err_count[i][2]);
  endfunction

  // Raise one mask bit for the second half of the current clock. Called
  // just after a falling edge (where step_check leaves off); the next
  // step_check clears it at the rising edge.
  task automatic strike(int i, bit is_seu, int copy, int unsigned b);
    if (is_seu) fault[i].seu[copy][b] = 1'b1;
    else        fault[i].set[copy][b] = 1'b1;
    n_fault[i]++;
  endtask

  // One pixel clock with pin checks; copies to check are selected by mask.
  task automatic step_check(bit [N_IMPL-1:0] check_a);
    @(posedge clk_dut); fault <= '0; t++;
    @(negedge clk_dut);
    for (int i = 0; i < N_IMPL; i++)
      for (int s = 0; s < 2; s++)
        if (s == 1 || check_a[i]) begin
          checks++;
          if (vga_pins[i][s] !== model(t, rgb_in)) begin
            failures++;
            if (failures < 6) $display("impl %0d copy %0d t=%0d: pins %b, expected %b",
                                       i, s, t, vga_pins[i][s], model(t, rgb_in));
          end
        end
  endtask

  initial begin
    int next_hit, i, r;
    bit flag_seen;
    rgb_in = 3'b111;
    for (int k = 0; k < N_IMPL; k++) begin n_fault[k] = 0; n_event[k] = 0; end
    reset_dut();

    // Phase 1: faults the hardened forms must mask.
    next_hit = 100 + $urandom_range(GAP);
    flag_seen = 1'b0;
    for (int n = 0; n < FRAME; n++) begin
      if (n == next_hit) begin
        // pick one of DMR, TMR, GG, SET delay, MBU
        i = 1 + $urandom_range(4);
        r = $urandom_range(5);
        case (vga_kind_e'(i))
          VGA_TMR:       strike(i, r[0], r % 3, $urandom_range(STATE_W - 1));
          VGA_DMR,
          VGA_GG:        strike(i, r[0], r[0] ? r % 3 : r % 2, $urandom_range(STATE_W - 1));
          VGA_MBU:       strike(i, 1'b1, r[0] ? 2 : 0, $urandom_range(STATE_W - 1));
          default:       strike(i, 1'b0, 0, $urandom_range(STATE_W - 1));
        endcase
        next_hit = n + 1 + $urandom_range(GAP);
      end
      step_check('1);
      if (err_flags != '0) flag_seen = 1'b1;
    end
    run_ctrl_settle();
    checks++;
    if (flag_seen || err_count != '0) begin
      failures++;
      $display("phase 1: a masked fault raised an error flag");
    end

    // Phase 2: register upsets in the unmitigated and SET-delay forms.
    next_hit = 100 + $urandom_range(GAP);
    for (int n = 0; n < FRAME; n++) begin
      if (n == next_hit) begin
        i = ($urandom_range(1) == 1) ? int'(VGA_SET_DELAY) : int'(VGA_DEFAULT);
        strike(i, 1'b1, 0, $urandom_range(STATE_W - 1));
        step_check('0);
        // let the disturbance play out for one line and the flag release
        for (int k = 0; k < LINE; k++) step_check('0);
        run_ctrl_settle();
        for (int k = 0; k < N_IMPL; k++) n_event[k] += events(k);
        // reset the DUT, let any held flag drop, then clear the counts, as
        // the operators did
        reset_dut();
        run_ctrl_settle();
        @(posedge clk_dut); t++; clr_counts = 1'b1;
        @(posedge clk_dut); t++; clr_counts = 1'b0;
        @(negedge clk_dut);
        n += LINE + 1;
        next_hit = n + 1 + $urandom_range(GAP);
      end
      step_check('0);
    end

    for (int k = 0; k < N_IMPL; k++)
      $display("impl %0d: %0d faults injected, %0d error events counted", k, n_fault[k], n_event[k]);

    for (int k = 0; k < N_IMPL; k++) begin
      checks++;
      if (k == int'(VGA_DEFAULT) || k == int'(VGA_SET_DELAY)) begin
        if (n_fault[k] == 0 || n_event[k] == 0) begin
          failures++;
          $display("impl %0d: register upsets were never counted", k);
        end
      end else if (n_fault[k] == 0 || n_event[k] != 0) begin
        failures++;
        $display("impl %0d: no faults, or masked faults counted", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait 200 pixel clocks (400 control clocks) for the synchronisers, the
  // flag stretch and the counters, keeping the model's clock count.
  task automatic run_ctrl_settle();
    repeat (200) begin @(posedge clk_dut); t++; end
  endtask
endmodule
