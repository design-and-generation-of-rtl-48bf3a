// tb_burst_fsm: self-checking test of the burst state machine.
//
// Instance A has small thresholds (INIT_END 4, WRITE_END 20, FRAME_END 40,
// RESTART 5) and a tick every third clock; every clock its state, count
// and start are compared with a reference model written from the state
// chart (INIT counts to INIT_END, WRITE_STATE to WRITE_END, IDLE_STATE to
// FRAME_END, then the count reloads RESTART). Instance B keeps the default
// thresholds with a tick on every clock; the test checks that its first
// start comes after 101 ticks, that WRITE_STATE lasts to count 250000,
// and that starts repeat every 499899 ticks.
module tb_burst_fsm;
  import pulse_pkg::*;

  localparam int unsigned IE = 4, WE = 20, FE = 40, RS = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick_a = 1'b0;
  int   checks = 0, failures = 0;

  always #10ns clk = ~clk;

  state_t     st_a, st_b;
  logic [5:0] cnt_a;
  logic [18:0] cnt_b;
  logic       start_a, start_b;

  burst_fsm #(.INIT_END(IE), .WRITE_END(WE), .FRAME_END(FE), .RESTART(RS), .CNT_W(6))
    u_a (.clk(clk), .rst_n(rst_n), .tick(tick_a), .state(st_a), .count(cnt_a), .start(start_a));

  burst_fsm u_b (.clk(clk), .rst_n(rst_n), .tick(1'b1), .state(st_b), .count(cnt_b), .start(start_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Reference model of instance A.
  int     m_cnt;
  state_t m_st;
  bit     m_start;
  int     n_init2write = 0, n_write2idle = 0, n_idle2write = 0;

  task automatic model_step();
    m_start = 0;
    if (m_st == ST_INIT) begin
      if (m_cnt == IE) begin m_st = ST_WRITE; m_start = 1; n_init2write++; end
      m_cnt++;
    end else if (m_st == ST_WRITE) begin
      if (m_cnt == WE) begin m_st = ST_IDLE; n_write2idle++; end
      m_cnt++;
    end else begin
      if (m_cnt == FE) begin m_cnt = RS; m_st = ST_WRITE; m_start = 1; n_idle2write++; end
      else m_cnt++;
    end
  endtask

  // Instance B observations.
  longint clk_no = 0;
  longint b_first_start = -1, b_prev_start = -1;
  int     b_starts = 0;
  longint b_write_ticks = 0;

  initial begin
    m_cnt = 0; m_st = ST_INIT; m_start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);  // first edge with reset released; tick_a still 0
    for (int i = 0; i < 3 * 200; i++) begin
      tick_a <= (i % 3 == 2);
      @(posedge clk);
      if (tick_a) model_step();
      else m_start = 0;
      #1;
      check(st_a == m_st, $sformatf("state %s, expected %s", st_a.name(), m_st.name()));
      check(int'(cnt_a) == m_cnt, $sformatf("count %0d, expected %0d", cnt_a, m_cnt));
      check(start_a == m_start, $sformatf("start %0b, expected %0b", start_a, m_start));
    end
    tick_a <= 1'b0;
    check(n_init2write == 1, "INIT -> WRITE_STATE never taken");
    check(n_write2idle >= 2, "WRITE_STATE -> IDLE_STATE taken too rarely");
    check(n_idle2write >= 2, "IDLE_STATE -> WRITE_STATE taken too rarely");

    // Instance B: wait for three starts at the default thresholds.
    wait (b_starts == 3);
    @(posedge clk);
    check(b_first_start == 101, $sformatf("default: first start after %0d ticks", b_first_start));
    check(b_write_ticks == 2 * (250_000 - 101 + 1),
          $sformatf("default: %0d ticks in WRITE_STATE over two frames", b_write_ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Instance B: its tick is every clock, so clocks since reset == ticks.
  always @(posedge clk) begin
    if (rst_n) begin
      clk_no <= clk_no + 1;
      if (st_b == ST_WRITE && b_starts + int'(start_b) < 3) b_write_ticks <= b_write_ticks + 1;
      if (start_b) begin
        b_starts <= b_starts + 1;
        if (b_first_start < 0) b_first_start <= clk_no;
        if (b_prev_start >= 0) begin
          checks++;
          if (clk_no - b_prev_start != 499_899) begin
            failures++;
            $display("FAIL: default frame length %0d ticks", clk_no - b_prev_start);
          end
        end
        b_prev_start <= clk_no;
        checks++;
        if (st_b != ST_WRITE || cnt_b != 19'd101) begin
          failures++;
          $display("FAIL: default start with state %s count %0d", st_b.name(), cnt_b);
        end
      end
    end
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
