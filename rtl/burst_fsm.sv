// burst_fsm: the burst state machine and its tick counter.
//
// States and thresholds follow the published flow chart. On every 5 MHz
// tick the counter advances by one:
//   INIT         count 0 .. INIT_END; at INIT_END it moves on to
//                WRITE_STATE with count = INIT_END + 1.
//   WRITE_STATE  the burst is fired on entry; the state holds until
//                count = WRITE_END, then moves to IDLE_STATE.
//   IDLE_STATE   holds until count = FRAME_END, then reloads count with
//                RESTART and re-enters WRITE_STATE, which fires the next
//                burst.
// One frame is therefore FRAME_END - RESTART + 1 ticks (499899 ticks =
// 99.98 ms at 5 MHz, a 10 Hz repetition rate with the default numbers).
//
// `start` is a one-clock pulse issued on the clock edge that enters
// WRITE_STATE; the pulse-train generators begin the burst on it. The flow
// chart draws OE = '1' for WRITE_STATE, while the text has OE drop once the
// set number of cycles is out; here OE belongs to the pulse-train
// generators (high for the burst only) and this block only times the
// frame. Reset (synchronous, active low) and the one-clock start pulse
// are this design's choices.
module burst_fsm
  import pulse_pkg::*;
#(
  parameter int unsigned INIT_END  = INIT_END_DEF,
  parameter int unsigned WRITE_END = WRITE_END_DEF,
  parameter int unsigned FRAME_END = FRAME_END_DEF,
  parameter int unsigned RESTART   = RESTART_DEF,
  parameter int unsigned CNT_W     = $clog2(FRAME_END + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,   // 5 MHz clock enable
  output state_t           state,
  output logic [CNT_W-1:0] count,
  output logic             start   // one clock wide, on entry to WRITE_STATE
);

  state_t           state_n;
  logic [CNT_W-1:0] count_n;
  logic             start_n;

  always_comb begin
    state_n = state;
    count_n = count;
    start_n = 1'b0;
    if (tick) begin
      unique case (state)
        ST_INIT: begin
          count_n = count + 1'b1;
          if (count == CNT_W'(INIT_END)) begin
            state_n = ST_WRITE;
            start_n = 1'b1;
          end
        end
        ST_WRITE: begin
          count_n = count + 1'b1;
          if (count == CNT_W'(WRITE_END)) state_n = ST_IDLE;
        end
        ST_IDLE: begin
          if (count == CNT_W'(FRAME_END)) begin
            count_n = CNT_W'(RESTART);
            state_n = ST_WRITE;
            start_n = 1'b1;
          end else begin
            count_n = count + 1'b1;
          end
        end
        default: begin
          state_n = ST_INIT;
          count_n = '0;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_INIT;
      count <= '0;
      start <= 1'b0;
    end else begin
      state <= state_n;
      count <= count_n;
      start <= start_n;
    end
  end

  // The thresholds must be ordered for the frame to be well formed.
  initial begin
    assert (INIT_END < WRITE_END && WRITE_END < FRAME_END &&
            RESTART > INIT_END && RESTART <= WRITE_END)
      else $error("burst_fsm: thresholds out of order");
  end

endmodule
