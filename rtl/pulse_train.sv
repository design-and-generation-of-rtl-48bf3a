// pulse_train: one carrier's burst of square-wave cycles on INA/INB.
//
// A start request begins a burst of N_CYCLES square-wave cycles of
// 2*HALF_PERIOD clocks each. During the first half of every cycle INA = 1
// and INB = 0, during the second half INA = 0 and INB = 1, so the two
// outputs are complementary and can drive the two sides of a bridge
// driver; `oe` is high for the whole burst. When the last cycle ends, INA
// and INB go back to their initial values (INA = 0, INB = 1) and `oe`
// drops. The initial values, the return to them and the cycle counts
// (20 at 50 kHz, 80 at 200 kHz, 0.4 ms either way) follow the design;
// the half-period counter on the full 50 MHz clock is this design's own
// choice (at 5 MHz a 200 kHz half period would be 12.5 ticks, at 50 MHz
// it is exactly 125 clocks, so both carriers get an exact 50 % duty
// cycle).
//
// Interface: clk, rst_n (synchronous, active low), start (one clock wide;
// ignored while a burst is running), ina, inb, oe.
// Timing: oe, ina and inb change on the edge that samples start; the burst
// lasts exactly 2*HALF_PERIOD*N_CYCLES clocks.
module pulse_train #(
  parameter int unsigned HALF_PERIOD = 500,  // 50 MHz / (2 * 50 kHz)
  parameter int unsigned N_CYCLES    = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ina,
  output logic inb,
  output logic oe
);

  localparam int unsigned HW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam int unsigned NW = (N_CYCLES > 1) ? $clog2(N_CYCLES) : 1;

  logic [HW-1:0] half_cnt;  // clocks elapsed in the current half cycle
  logic [NW-1:0] cyc_cnt;   // full cycles completed
  logic          phase;     // 0: first (INA) half, 1: second (INB) half

  wire half_end = (half_cnt == HW'(HALF_PERIOD - 1));
  wire last_cyc = (cyc_cnt  == NW'(N_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      oe       <= 1'b0;
      ina      <= 1'b0;
      inb      <= 1'b1;
      phase    <= 1'b0;
      half_cnt <= '0;
      cyc_cnt  <= '0;
    end else if (!oe) begin
      if (start) begin
        oe       <= 1'b1;
        ina      <= 1'b1;
        inb      <= 1'b0;
        phase    <= 1'b0;
        half_cnt <= '0;
        cyc_cnt  <= '0;
      end
    end else if (!half_end) begin
      half_cnt <= half_cnt + 1'b1;
    end else begin
      half_cnt <= '0;
      if (!phase) begin
        phase <= 1'b1;
        ina   <= 1'b0;
        inb   <= 1'b1;
      end else if (!last_cyc) begin
        phase   <= 1'b0;
        cyc_cnt <= cyc_cnt + 1'b1;
        ina     <= 1'b1;
        inb     <= 1'b0;
      end else begin
        // Burst complete: back to the initial values, outputs disabled.
        oe    <= 1'b0;
        phase <= 1'b0;
        ina   <= 1'b0;
        inb   <= 1'b1;
      end
    end
  end

  // While the burst runs the two driver inputs are never high together.
  a_complementary: assert property (@(posedge clk) disable iff (!rst_n)
                                    oe |-> (ina != inb));

endmodule
