// tb_pulse_gen_top: end-to-end test of the pulse generator at its default
// parameters (50 MHz clock, 5 MHz tick, 10 Hz frames, 20 x 50 kHz and
// 80 x 200 kHz bursts).
//
// Four frames are run: 50 kHz, then 200 kHz (SW0 moved during the idle
// time), then 200 kHz with SW0 moved back in the middle of the burst
// (the burst must finish unchanged), then 50 kHz. For every burst the
// test measures, clock by clock, the OE width (20000 clocks = 0.4 ms),
// the number of INA cycles (20 or 80), the length of every half cycle
// (500 or 125 clocks = 50 kHz or 200 kHz) and that INA and INB are
// complementary; between bursts it checks OE = 0, INA = 0, INB = 1. It
// also checks the time to the first burst (101 ticks plus two clocks of
// pipeline) and the burst-to-burst period (499899 ticks = 4998990
// clocks, about 10 Hz). Each mechanism is counted and must occur: leaving
// INIT, a 50 kHz burst, a 200 kHz burst, entering IDLE_STATE, the counter
// reloading 101 at the end of a frame, and a switch move mid-burst.
module tb_pulse_gen_top;
  import pulse_pkg::*;

  localparam int FRAME_CLOCKS = 10 * (499_999 - 101 + 1);
  localparam int FIRST_OE     = 10 * 101 + 1;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        sw0 = 1'b1;
  logic        oe, ina, inb;
  state_t      state;
  logic [18:0] count;
  int          checks = 0, failures = 0;

  always #10ns clk = ~clk;  // 50 MHz

  pulse_gen_top dut (.clk_50(clk), .rst_n(rst_n), .sw0(sw0), .oe(oe), .ina(ina), .inb(inb),
                     .state(state), .count(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Mechanism counters.
  int n_init_exit = 0, n_burst_50k = 0, n_burst_200k = 0, n_idle_entry = 0;
  int n_reload = 0, n_sw_mid_burst = 0;

  // Clock-by-clock monitor.
  longint clk_no = 0;          // rising edges since reset release
  longint last_rise = -1;
  int     bursts = 0;
  int     oe_clocks, rises, run, bad_run, bad_comp;
  int     exp_half, exp_n;
  logic   prev_oe = 1'b0, prev_ina = 1'b0;
  state_t prev_state = ST_INIT;
  logic [18:0] prev_count = '0;
  int     idle_bad = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      clk_no <= clk_no + 1;
      #1;
      if (prev_state == ST_INIT && state == ST_WRITE) n_init_exit++;
      if (prev_state == ST_WRITE && state == ST_IDLE) n_idle_entry++;
      if (prev_count == 19'd499_999 && count == 19'd101) n_reload++;
      if (oe && !prev_oe) begin
        // A burst begins: the carrier is the one SW0 shows (SW0 never moves
        // within a few clocks of a burst start in this test).
        checks++;
        if (state != ST_WRITE) begin failures++; $display("FAIL: burst outside WRITE_STATE"); end
        if (last_rise < 0) begin
          checks++;
          if (clk_no != FIRST_OE) begin
            failures++;
            $display("FAIL: first burst at clock %0d, expected %0d", clk_no, FIRST_OE);
          end
        end else begin
          checks++;
          if (clk_no - last_rise != FRAME_CLOCKS) begin
            failures++;
            $display("FAIL: burst period %0d clocks, expected %0d", clk_no - last_rise, FRAME_CLOCKS);
          end
        end
        last_rise = clk_no;
        exp_half = sw0 ? 500 : 125;
        exp_n    = sw0 ? 20 : 80;
        oe_clocks = 0; rises = 0; run = 0; bad_run = 0; bad_comp = 0;
      end
      if (oe) begin
        oe_clocks++;
        if (ina == inb) bad_comp++;
        if (ina != prev_ina || !prev_oe) begin
          if (ina) rises++;
          if (prev_oe && run != exp_half) bad_run++;
          run = 1;
        end else run++;
      end else begin
        if (ina || !inb) idle_bad++;
        if (prev_oe) begin
          // A burst has ended.
          bursts++;
          check(run == exp_half, $sformatf("last half cycle %0d clocks", run));
          check(oe_clocks == 20_000, $sformatf("OE high %0d clocks, expected 20000", oe_clocks));
          check(rises == exp_n, $sformatf("%0d cycles, expected %0d", rises, exp_n));
          check(bad_run == 0, $sformatf("%0d half cycles not %0d clocks", bad_run, exp_half));
          check(bad_comp == 0, $sformatf("%0d clocks with INA == INB", bad_comp));
          if (exp_n == 20) n_burst_50k++; else n_burst_200k++;
        end
      end
      prev_oe    = oe;
      prev_ina   = ina;
      prev_state = state;
      prev_count = count;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Frame 1: SW0 = 1, 50 kHz.
    wait (bursts == 1);
    check(state == ST_WRITE, "after the burst the state machine stays in WRITE_STATE");
    repeat (100) @(posedge clk);
    sw0 <= 1'b0;                     // frame 2: 200 kHz
    wait (bursts == 2);
    wait (oe);                       // frame 3 burst under way
    repeat (5000) @(posedge clk);
    sw0 <= 1'b1;                     // moved mid-burst: must not disturb it
    repeat (3) @(posedge clk);
    if (oe) n_sw_mid_burst++;
    wait (bursts == 4);
    repeat (10) @(posedge clk);
    check(idle_bad == 0, $sformatf("%0d idle clocks without INA = 0, INB = 1", idle_bad));
    check(bursts == 4, "four bursts");
    check(n_init_exit == 1, "leaving INIT never seen");
    check(n_burst_50k == 2, $sformatf("%0d 50 kHz bursts, expected 2", n_burst_50k));
    check(n_burst_200k == 2, $sformatf("%0d 200 kHz bursts, expected 2", n_burst_200k));
    check(n_idle_entry >= 3, "entering IDLE_STATE seen too rarely");
    check(n_reload == 3, $sformatf("counter reload seen %0d times", n_reload));
    check(n_sw_mid_burst == 1, "switch move during a burst never happened");
    $display("mechanisms: init_exit=%0d burst_50k=%0d burst_200k=%0d idle_entry=%0d reload=%0d sw_mid_burst=%0d",
             n_init_exit, n_burst_50k, n_burst_200k, n_idle_entry, n_reload, n_sw_mid_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * FRAME_CLOCKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
