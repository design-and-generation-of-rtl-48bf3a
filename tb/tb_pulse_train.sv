// tb_pulse_train: self-checking test of the burst generator.
//
// Two instances: the 50 kHz carrier (HALF_PERIOD 500, 20 cycles) and the
// 200 kHz carrier (HALF_PERIOD 125, 80 cycles), both at a 50 MHz clock.
// For each burst the test checks: idle values INA = 0, INB = 1, OE = 0;
// OE high for exactly 2*HALF*N clocks (20000 = 0.4 ms for both); INA and
// INB complementary; exactly N rising edges of INA, every high and low
// phase HALF clocks long; that a start during a burst is ignored; and
// that a second burst behaves like the first.
module tb_pulse_train;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start50 = 1'b0, start200 = 1'b0;
  logic ina50, inb50, oe50, ina200, inb200, oe200;
  int   checks = 0, failures = 0;

  always #10ns clk = ~clk;

  pulse_train                                   u50  (.clk(clk), .rst_n(rst_n), .start(start50),
                                                      .ina(ina50), .inb(inb50), .oe(oe50));
  pulse_train #(.HALF_PERIOD(125), .N_CYCLES(80)) u200 (.clk(clk), .rst_n(rst_n), .start(start200),
                                                      .ina(ina200), .inb(inb200), .oe(oe200));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Fire one burst on the selected instance and measure it clock by clock.
  task automatic burst(input bit sel200, input int half, input int n, input bit poke);
    int oe_clocks, rises, run, bad_run, bad_comp;
    logic prev_ina, a, b, o;
    @(negedge clk);
    check(sel200 ? (!oe200 && !ina200 && inb200) : (!oe50 && !ina50 && inb50),
          "idle values before the burst");
    if (sel200) start200 = 1'b1; else start50 = 1'b1;
    @(negedge clk);
    start200 = 1'b0; start50 = 1'b0;
    oe_clocks = 0; rises = 0; run = 0; bad_run = 0; bad_comp = 0; prev_ina = 1'b0;
    forever begin
      a = sel200 ? ina200 : ina50;
      b = sel200 ? inb200 : inb50;
      o = sel200 ? oe200  : oe50;
      if (!o) break;
      oe_clocks++;
      if (a == b) bad_comp++;
      if (a != prev_ina) begin
        if (a) rises++;
        if (oe_clocks > 1 && run != half) bad_run++;
        run = 1;
      end else run++;
      prev_ina = a;
      // A second start halfway through must not restart the burst.
      if (poke && oe_clocks == half * n) begin
        if (sel200) start200 = 1'b1; else start50 = 1'b1;
        @(negedge clk);
        start200 = 1'b0; start50 = 1'b0;
      end else @(negedge clk);
    end
    check(run == half, $sformatf("last phase %0d clocks, expected %0d", run, half));
    check(oe_clocks == 2 * half * n, $sformatf("OE high %0d clocks, expected %0d", oe_clocks, 2 * half * n));
    check(rises == n, $sformatf("%0d INA cycles, expected %0d", rises, n));
    check(bad_run == 0, $sformatf("%0d phases of the wrong length", bad_run));
    check(bad_comp == 0, $sformatf("%0d clocks with INA == INB", bad_comp));
    check(sel200 ? (!ina200 && inb200) : (!ina50 && inb50), "initial values after the burst");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    // Reset state: INA = 0, INB = 1, OE = 0 on both.
    check(!oe50 && !ina50 && inb50 && !oe200 && !ina200 && inb200, "reset values");
    burst(1'b0, 500, 20, 1'b0);
    burst(1'b1, 125, 80, 1'b0);
    repeat (100) @(posedge clk);
    burst(1'b0, 500, 20, 1'b1);
    burst(1'b1, 125, 80, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
