// ramp_trigger_gen: measurement test pattern for the DAC's static
// characteristic.
//
// Steps a code through 0, 1, ..., 2^N-1 (then wraps to 0), holding each value
// for HOLD clocks, and emits one trigger pulse per held code so that an
// external meter samples the filtered DAC output once per code. With the
// defaults (100 MHz clock, HOLD = 2e8) each code lasts 2 s and the full
// 16-bit sweep takes about 36 hours.
//
// Timing: while enable is high, a hold counter runs 0..HOLD-1; when it is at
// HOLD-1 the code increments on the next edge. The trigger output is high for
// TRIG_WIDTH clocks starting when the hold counter reaches TRIG_DELAY, i.e.
// TRIG_DELAY clocks after the code changed, which leaves the output filter
// time to settle (the default is half the hold time). With enable low
// everything holds. The step and the 2 s trigger period follow the document;
// the trigger position and width, the wrap and the enable are this design's.
module ramp_trigger_gen #(
  parameter int unsigned N          = 16,
  parameter int unsigned HOLD       = 200_000_000,  // clocks per code
  parameter int unsigned TRIG_DELAY = 100_000_000,  // clocks from code change to trigger
  parameter int unsigned TRIG_WIDTH = 100           // trigger pulse length, clocks
) (
  input  logic         clk,
  input  logic         rst_n,    // synchronous, active low: code 0, counter 0
  input  logic         enable,   // run the ramp
  output logic [N-1:0] code,     // current ramp code
  output logic         step,     // code increments at the end of this cycle
  output logic         trigger   // meter trigger pulse
);

  localparam int unsigned HW = $clog2(HOLD + 1);

  logic [HW-1:0] hold_cnt;

  assign step = enable && (hold_cnt == HW'(HOLD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold_cnt <= '0;
      code     <= '0;
    end else if (enable) begin
      if (step) begin
        hold_cnt <= '0;
        code     <= code + 1'b1;
      end else begin
        hold_cnt <= hold_cnt + 1'b1;
      end
    end
  end

  assign trigger = enable && (hold_cnt >= HW'(TRIG_DELAY)) &&
                                   (hold_cnt <  HW'(TRIG_DELAY + TRIG_WIDTH));

  initial begin
    assert (HOLD >= 2) else $error("HOLD must be at least 2");
    assert (TRIG_DELAY + TRIG_WIDTH <= HOLD)
      else $error("trigger pulse must fit inside the hold time");
  end

endmodule
