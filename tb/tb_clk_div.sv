// tb_clk_div: self-checking test of the clock divider.
//
// Runs the default divider (50 MHz -> 5 MHz, DIV = 10) and a DIV = 3 copy.
// For each it checks that the first tick comes on the DIV-th clock after
// reset, that every tick is one clock wide, that ticks are exactly DIV
// clocks apart, and that N*DIV clocks produce N ticks.
module tb_clk_div;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick10, tick3;
  int   checks = 0, failures = 0;

  always #10ns clk = ~clk;  // 50 MHz

  clk_div                u_div10 (.clk(clk), .rst_n(rst_n), .tick(tick10));
  clk_div #(.DIV(3))     u_div3  (.clk(clk), .rst_n(rst_n), .tick(tick3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sample `tick` at rising edges; report the edge numbers where it is high.
  task automatic measure(input int div, input int n_ticks);
    int edge_no, last, seen;
    logic t;
    edge_no = 0; last = 0; seen = 0;
    while (seen < n_ticks) begin
      @(posedge clk);
      edge_no++;
      t = (div == 10) ? tick10 : tick3;
      if (t) begin
        seen++;
        if (seen == 1) check(edge_no == div, $sformatf("DIV=%0d first tick at edge %0d", div, edge_no));
        else           check(edge_no - last == div, $sformatf("DIV=%0d tick spacing %0d", div, edge_no - last));
        last = edge_no;
      end
    end
    check(edge_no == n_ticks * div, $sformatf("DIV=%0d: %0d ticks took %0d clocks", div, n_ticks, edge_no));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);  // rst_n seen high from the next edge on
    measure(10, 100);
    // Reset again for the DIV = 3 copy.
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    measure(3, 300);
    // Width: a tick never lasts two consecutive edges.
    repeat (50) begin
      @(posedge clk);
      if (tick10) begin
        @(posedge clk);
        check(!tick10, "DIV=10 tick wider than one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
