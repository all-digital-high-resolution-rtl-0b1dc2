// ddpm_dac_top: all-digital DAC based on dyadic digital pulse modulation.
//
// The digital part of the 16-bit DAC prototype: a code source, an optional
// slope pre-correction and the priority-multiplexer DDPM modulator whose
// one-bit output, buffered and low-pass filtered by an external RC network,
// gives a voltage code/2^N * VDD. Data path:
//
//   dac_in ----\
//               mux (src_sel) -> slope_calibration -> ddpm_modulator -> ddpm_out
//   ramp ------/  (ramp_trigger_gen)  (1 clock)        (frame of 2^N clocks)
//
// The ramp generator is the measurement pattern: it steps the code by one
// every RAMP_HOLD clocks (2 s at 100 MHz) and pulses trigger once per code
// for the external meter. slope_calibration maps the wanted value to the code
// that cancels a measured double- or multiple-slope error; with cal_en low it
// is a one-clock delay. The modulator samples its input once per frame.
//
// Alongside, a PISO_N-bit shift-register DDPM modulator (the other
// architecture, practical only for a few bits) converts piso_din on its own
// frame of 2^PISO_N clocks, timed by its own binary counter; it shares only
// the clock and reset.
//
// Latency: a code on dac_in reaches the modulator input one clock later and
// is used from the next frame boundary; ddpm_out lags the slot counter by one
// clock. All registers reset synchronously with rst_n low. The external RC
// filter and the output pad buffer are not part of this RTL.
module ddpm_dac_top
  import ddpm_pkg::*;
#(
  parameter int unsigned N          = DDPM_N,
  parameter int unsigned SEGS       = CAL_SEGS,
  parameter int unsigned RAMP_HOLD  = 200_000_000,  // clocks per ramp code (2 s)
  parameter int unsigned TRIG_DELAY = 100_000_000,  // code change to trigger, clocks
  parameter int unsigned TRIG_WIDTH = 100,          // trigger pulse, clocks
  parameter int unsigned PISO_N     = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // code source
  input  code_src_e                        src_sel,      // external code or ramp
  input  logic [N-1:0]                     dac_in,       // external code
  input  logic                             ramp_en,      // run the ramp
  output logic [N-1:0]                     ramp_code,    // current ramp code
  output logic                             ramp_step,    // ramp code steps at end of cycle
  output logic                             trigger,      // meter trigger
  // slope calibration
  input  logic                             cal_en,
  input  logic                             cal_we,
  input  logic [$clog2(SEGS)-1:0]          cal_addr,
  input  logic [N:0]                       cal_thr,
  input  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs,
  input  logic [CAL_GAIN_W-1:0]            cal_gain,
  output logic [$clog2(SEGS)-1:0]          cal_seg,      // segment of the last code
  // PMUX DDPM modulator
  output logic [N-1:0]                     code_q,       // code in the current frame
  output logic                             sample_tick,  // modulator samples at end of cycle
  output logic                             frame_start,  // ddpm_out is in slot 0
  output logic                             ddpm_out,     // DDPM stream to the pad
  // PISO DDPM modulator
  input  logic [PISO_N-1:0]                piso_din,
  output logic                             piso_frame_start,
  output logic                             piso_out
);

  logic [N-1:0] src_code;
  logic [N-1:0] mod_code;

  ramp_trigger_gen #(
    .N         (N),
    .HOLD      (RAMP_HOLD),
    .TRIG_DELAY(TRIG_DELAY),
    .TRIG_WIDTH(TRIG_WIDTH)
  ) u_ramp (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (ramp_en),
    .code   (ramp_code),
    .step   (ramp_step),
    .trigger(trigger)
  );

  assign src_code = (src_sel == SRC_RAMP) ? ramp_code : dac_in;

  slope_calibration #(
    .N   (N),
    .SEGS(SEGS)
  ) u_cal (
    .clk     (clk),
    .rst_n   (rst_n),
    .enable  (cal_en),
    .n_in    (src_code),
    .n_out   (mod_code),
    .seg_out (cal_seg),
    .cal_we  (cal_we),
    .cal_addr(cal_addr),
    .cal_thr (cal_thr),
    .cal_ofs (cal_ofs),
    .cal_gain(cal_gain)
  );

  ddpm_modulator #(.N(N)) u_mod (
    .clk        (clk),
    .rst_n      (rst_n),
    .dac_in     (mod_code),
    .sample_tick(sample_tick),
    .frame_start(frame_start),
    .code_q     (code_q),
    .ddpm_out   (ddpm_out)
  );

  // Frame timing for the shift-register modulator.
  logic [PISO_N-1:0] piso_cnt;
  logic              piso_load;

  ddpm_counter #(.N(PISO_N)) u_piso_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .count     (piso_cnt),
    .frame_last(piso_load)
  );

  piso_ddpm_modulator #(.N(PISO_N)) u_piso (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (piso_load),
    .din        (piso_din),
    .frame_start(piso_frame_start),
    .sout       (piso_out)
  );

endmodule
