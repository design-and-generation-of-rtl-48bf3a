// pulse_gen_top: transmit pulse generator of an echo sounder.
//
// Every frame (10 Hz with the default numbers) the generator fires one
// burst of square-wave cycles on the complementary driver inputs INA and
// INB, with OE high for the burst only. Switch SW0 picks the carrier:
// SW0 = 1 gives 20 cycles of 50 kHz, SW0 = 0 gives 80 cycles of 200 kHz,
// both a 0.4 ms pulse. Between bursts OE is low, INA = 0 and INB = 1.
//
// Structure: clk_div turns the 50 MHz board clock into a 5 MHz tick;
// burst_fsm counts ticks through INIT, WRITE_STATE and IDLE_STATE and
// issues a one-clock start on each entry to WRITE_STATE; two pulse_train
// instances, one per carrier, generate the burst. The start goes only to
// the carrier SW0 selects, so the idle generator keeps INA = 0, INB = 1
// and OE = 0 and the outputs are simply combined (OR for OE and INA, AND
// for INB).
//
// The block split, the thresholds and the carrier numbers follow the
// design. Its own choices: SW0 passes through a two-flop synchronizer and
// is only looked at when a burst starts, so moving the switch never cuts
// a burst short; the reset (rst_n, synchronous, active low) and the
// observation ports state and count are additions.
//
// Timing: the first burst starts (INIT_END + 1) ticks after reset, about
// 20 us; OE then rises one clock after the start and stays high for
// 2 * HALF * CYCLES clocks (20000 clocks = 0.4 ms for either carrier).
// Bursts repeat every (FRAME_END - RESTART + 1) ticks.
module pulse_gen_top
  import pulse_pkg::*;
#(
  parameter int unsigned CLK_HZ     = CLK_HZ_DEF,
  parameter int unsigned TICK_HZ    = TICK_HZ_DEF,
  parameter int unsigned F_SW1_HZ   = F_SW1_HZ_DEF,
  parameter int unsigned F_SW0_HZ   = F_SW0_HZ_DEF,
  parameter int unsigned CYCLES_SW1 = CYCLES_SW1_DEF,
  parameter int unsigned CYCLES_SW0 = CYCLES_SW0_DEF,
  parameter int unsigned INIT_END   = INIT_END_DEF,
  parameter int unsigned WRITE_END  = WRITE_END_DEF,
  parameter int unsigned FRAME_END  = FRAME_END_DEF,
  parameter int unsigned RESTART    = RESTART_DEF,
  localparam int unsigned CNT_W     = $clog2(FRAME_END + 1)
) (
  input  logic             clk_50,  // board clock
  input  logic             rst_n,
  input  logic             sw0,     // 1: 50 kHz, 0: 200 kHz
  output logic             oe,      // driver output enable
  output logic             ina,     // driver input A
  output logic             inb,     // driver input B
  output state_t           state,   // burst state machine, for observation
  output logic [CNT_W-1:0] count    // its tick counter, for observation
);

  localparam int unsigned DIV       = CLK_HZ / TICK_HZ;
  localparam int unsigned HALF_SW1  = CLK_HZ / (2 * F_SW1_HZ);
  localparam int unsigned HALF_SW0  = CLK_HZ / (2 * F_SW0_HZ);

  logic tick, start;
  logic [1:0] sw_sync;
  logic start_sw1, start_sw0;
  logic oe_sw1, ina_sw1, inb_sw1;
  logic oe_sw0, ina_sw0, inb_sw0;

  always_ff @(posedge clk_50) begin
    if (!rst_n) sw_sync <= '0;
    else        sw_sync <= {sw_sync[0], sw0};
  end

  clk_div #(.DIV(DIV)) u_clk_div (
    .clk  (clk_50),
    .rst_n(rst_n),
    .tick (tick)
  );

  burst_fsm #(
    .INIT_END (INIT_END),
    .WRITE_END(WRITE_END),
    .FRAME_END(FRAME_END),
    .RESTART  (RESTART),
    .CNT_W    (CNT_W)
  ) u_fsm (
    .clk  (clk_50),
    .rst_n(rst_n),
    .tick (tick),
    .state(state),
    .count(count),
    .start(start)
  );

  assign start_sw1 = start &  sw_sync[1];
  assign start_sw0 = start & ~sw_sync[1];

  pulse_train #(.HALF_PERIOD(HALF_SW1), .N_CYCLES(CYCLES_SW1)) u_train_sw1 (
    .clk  (clk_50),
    .rst_n(rst_n),
    .start(start_sw1),
    .ina  (ina_sw1),
    .inb  (inb_sw1),
    .oe   (oe_sw1)
  );

  pulse_train #(.HALF_PERIOD(HALF_SW0), .N_CYCLES(CYCLES_SW0)) u_train_sw0 (
    .clk  (clk_50),
    .rst_n(rst_n),
    .start(start_sw0),
    .ina  (ina_sw0),
    .inb  (inb_sw0),
    .oe   (oe_sw0)
  );

  assign oe  = oe_sw1  | oe_sw0;
  assign ina = ina_sw1 | ina_sw0;
  assign inb = inb_sw1 & inb_sw0;

  // Only one carrier may be on the air at a time.
  a_one_carrier: assert property (@(posedge clk_50) disable iff (!rst_n)
                                  !(oe_sw1 && oe_sw0));

  initial begin
    assert (CLK_HZ % TICK_HZ == 0 && CLK_HZ % (2 * F_SW1_HZ) == 0 &&
            CLK_HZ % (2 * F_SW0_HZ) == 0)
      else $error("pulse_gen_top: frequencies do not divide the clock");
  end

endmodule
