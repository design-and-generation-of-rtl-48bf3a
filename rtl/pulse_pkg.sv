// pulse_pkg: types and default numbers shared by the echo-sounder pulse
// generator.
//
// The board clock is 50 MHz and the burst timing runs on a 5 MHz tick.
// The burst state machine has three states, INIT, WRITE_STATE and
// IDLE_STATE, and its tick counter thresholds (100, 250000, 499999 and the
// restart value 101) are the ones of the published flow chart. At 5 MHz a
// frame of 499899 ticks is 99.98 ms, i.e. the 10 Hz pulse repetition
// frequency that a 75 m maximum depth allows (2 * 75 m / 1500 m/s = 0.1 s).
// The two carriers, 50 kHz and 200 kHz, are sent for 20 and 80 cycles,
// both 0.4 ms long. The state encoding is this design's own choice.
package pulse_pkg;

  typedef enum logic [1:0] {
    ST_INIT  = 2'd0,
    ST_WRITE = 2'd1,
    ST_IDLE  = 2'd2
  } state_t;

  localparam int unsigned CLK_HZ_DEF      = 50_000_000;
  localparam int unsigned TICK_HZ_DEF     = 5_000_000;

  // Tick-counter thresholds of the state machine.
  localparam int unsigned INIT_END_DEF    = 100;     // INIT -> WRITE_STATE
  localparam int unsigned WRITE_END_DEF   = 250_000; // WRITE_STATE -> IDLE_STATE
  localparam int unsigned FRAME_END_DEF   = 499_999; // IDLE_STATE -> WRITE_STATE
  localparam int unsigned RESTART_DEF     = 101;     // count reloaded at FRAME_END

  // Carriers: SW0 = 1 selects 50 kHz x 20 cycles, SW0 = 0 200 kHz x 80 cycles.
  localparam int unsigned F_SW1_HZ_DEF    = 50_000;
  localparam int unsigned F_SW0_HZ_DEF    = 200_000;
  localparam int unsigned CYCLES_SW1_DEF  = 20;
  localparam int unsigned CYCLES_SW0_DEF  = 80;

endpackage
