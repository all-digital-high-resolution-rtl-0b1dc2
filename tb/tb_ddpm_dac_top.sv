// tb_ddpm_dac_top: end-to-end test of the DDPM DAC at reduced size.
//
// Size: 6-bit codes (64-slot frames), 4 calibration segments, ramp hold of
// 200 clocks with the trigger 100 clocks after each step, 3-bit shift-register
// modulator. Phases:
//   A. external codes, calibration bypassed;
//   B. calibration table written (4 segments, offsets and gains chosen so
//      that each segment changes the code), external codes, correction on;
//   C. ramp source, with the correction switched on and off, until the ramp
//      has wrapped through all 64 codes.
// The testbench keeps its own model of what the modulator must receive: the
// source code of the previous clock, mapped through a floating-point model of
// the correction table when cal_en was high. A ddpm_stream_checker compares
// every ddpm_out slot with the dyadic pattern of that code and counts the
// ones per frame; a second checker does the same for the shift-register
// modulator. The ramp code, step and trigger are checked against closed-form
// expressions of the number of enabled clocks.
// Each mechanism must happen at least once: frame loads, bypassed and
// corrected frames, every correction segment, table writes, source switches,
// ramp steps, ramp wrap, trigger pulses and shift-register frames.
module tb_ddpm_dac_top;
  import ddpm_pkg::*;

  localparam int N    = 6;
  localparam int SEGS = 4;
  localparam int HOLD = 200;
  localparam int TD   = 100;
  localparam int TW   = 5;
  localparam int PN   = 3;

  int checks   = 0;
  int failures = 0;

  logic                             clk = 0;
  logic                             rst_n = 0;
  code_src_e                        src_sel = SRC_EXTERNAL;
  logic [N-1:0]                     dac_in = '0;
  logic                             ramp_en = 0;
  logic [N-1:0]                     ramp_code;
  logic                             ramp_step;
  logic                             trigger;
  logic                             cal_en = 0;
  logic                             cal_we = 0;
  logic [1:0]                       cal_addr = '0;
  logic [N:0]                       cal_thr = '0;
  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs = '0;
  logic [CAL_GAIN_W-1:0]            cal_gain = '0;
  logic [1:0]                       cal_seg;
  logic [N-1:0]                     code_q;
  logic                             sample_tick, frame_start, ddpm_out;
  logic [PN-1:0]                    piso_din = '0;
  logic                             piso_frame_start, piso_out;

  ddpm_dac_top #(
    .N(N), .SEGS(SEGS), .RAMP_HOLD(HOLD), .TRIG_DELAY(TD), .TRIG_WIDTH(TW), .PISO_N(PN)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ table model
  longint thr_m[SEGS];
  longint ofs_m[SEGS];
  longint gain_m[SEGS];

  function automatic int model_seg(input int n);
    int s;
    s = 0;
    for (int j = 1; j < SEGS; j++) if (longint'(n) >= thr_m[j]) s = j;
    return s;
  endfunction

  function automatic int model_code(input int n);
    real v;
    longint r;
    int s;
    s = model_seg(n);
    v = (real'(n) - real'(ofs_m[s]) / 256.0) * (real'(gain_m[s]) / 65536.0);
    r = longint'($floor(v + 0.5));
    if (r < 0) r = 0;
    if (r > (2 ** N) - 1) r = (2 ** N) - 1;
    return int'(r);
  endfunction

  // Expected modulator input: one clock behind the source.
  logic [N-1:0] exp_mod = '0;
  logic         exp_cal = 0;   // exp_mod came through the correction
  int           exp_seg = 0;
  always @(posedge clk) begin
    int src;
    src = (src_sel == SRC_RAMP) ? int'(ramp_code) : int'(dac_in);
    if (!rst_n) begin
      exp_mod <= '0;
      exp_cal <= 0;
    end else begin
      exp_mod <= cal_en ? N'(model_code(src)) : N'(src);
      exp_cal <= cal_en;
      exp_seg <= model_seg(src);
    end
  end

  // -------------------------------------------------------------- checkers
  int ck_m, fl_m, fr_m, ck_p, fl_p, fr_p;

  ddpm_stream_checker #(.N(N), .TAG("PMUX")) chk_mod (
    .clk(clk), .rst_n(rst_n), .sample_tick(sample_tick), .code_in(exp_mod), .code_q(code_q),
    .frame_start(frame_start), .dout(ddpm_out), .checks(ck_m), .failures(fl_m), .frames(fr_m)
  );

  // The shift-register modulator is loaded on the last count of its own
  // 3-bit counter, which starts at 0 after reset; its first frame is loaded.
  logic          piso_load;
  logic [PN-1:0] piso_cnt_m = '0;
  always @(posedge clk) piso_cnt_m <= rst_n ? piso_cnt_m + 1'b1 : '0;
  assign piso_load = rst_n && (piso_cnt_m == '1);
  ddpm_stream_checker #(.N(PN), .CHECK_CODEQ(0), .RESET_FRAME(0), .TAG("PISO")) chk_piso (
    .clk(clk), .rst_n(rst_n), .sample_tick(piso_load), .code_in(piso_din), .code_q(piso_din),
    .frame_start(piso_frame_start), .dout(piso_out), .checks(ck_p), .failures(fl_p),
    .frames(fr_p)
  );

  // Mechanism counters.
  int n_bypass_frames = 0, n_cal_frames = 0, n_writes = 0, n_switches = 0;
  int n_steps = 0, n_trig = 0, n_wraps = 0;
  int seg_hits[SEGS];

  // The modulator takes a code on each sample_tick: record how it was made.
  always @(negedge clk) begin
    if (rst_n && sample_tick) begin
      if (exp_cal) begin
        n_cal_frames++;
        seg_hits[exp_seg]++;
        checks++;
        if (int'(cal_seg) != exp_seg) begin
          failures++;
          $display("cal_seg=%0d expected %0d", cal_seg, exp_seg);
        end
      end else n_bypass_frames++;
    end
  end

  // Ramp: closed-form check against the number of enabled clocks.
  longint e = 0;
  logic   trig_prev = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (ramp_code !== N'(e / HOLD)) begin
        failures++;
        if (failures < 20) $display("ramp code %0d, expected %0d", ramp_code, N'(e / HOLD));
      end
      checks++;
      if (ramp_step !== (ramp_en && (e % HOLD == HOLD - 1))) begin
        failures++;
        if (failures < 20) $display("ramp step %b at e=%0d", ramp_step, e);
      end
      checks++;
      if (trigger !== (ramp_en && (e % HOLD >= TD) && (e % HOLD < TD + TW))) begin
        failures++;
        if (failures < 20) $display("trigger %b at e=%0d", trigger, e);
      end
      if (ramp_step) n_steps++;
      if (ramp_step && ramp_code == '1) n_wraps++;
      if (trigger && !trig_prev) n_trig++;
      trig_prev = trigger;
      if (ramp_en) e++;
    end
  end

  // Shift-register modulator input: new code after every load.
  always @(posedge clk) if (rst_n && piso_load) piso_din <= PN'($urandom);

  task automatic write_entry(input int a, input longint thr, input longint ofs, input longint gain);
    @(negedge clk);
    cal_we = 1; cal_addr = 2'(a); cal_thr = (N+1)'(thr);
    cal_ofs = (N+CAL_OFS_FRAC+2)'(ofs); cal_gain = CAL_GAIN_W'(gain);
    @(negedge clk);
    cal_we = 0;
    thr_m[a] = thr; ofs_m[a] = ofs; gain_m[a] = gain;
    n_writes++;
  endtask

  // Present a new external code right after each sampling edge, n times.
  task automatic run_frames(input int n);
    for (int f = 0; f < n; f++) begin
      @(negedge clk);
      while (!sample_tick) @(negedge clk);
      @(posedge clk); #1;
      dac_in = N'($urandom);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("%s never happened", what);
    end
  endtask

  initial begin
    for (int j = 0; j < SEGS; j++) begin
      thr_m[j] = j * (2 ** N) / SEGS; ofs_m[j] = 0; gain_m[j] = 65536;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // A. external codes, no correction
    run_frames(20);

    // B. correction table: four segments with distinct offsets and gains
    write_entry(0, 0,  -300, 70000);   // +1.17 code offset, gain 1.068
    write_entry(1, 14,  500, 61000);   // boundaries away from the reset ones
    write_entry(2, 30, -700, 67500);
    write_entry(3, 50,  900, 63000);
    cal_en = 1;
    run_frames(60);

    // C. ramp source, correction toggled every few frames
    @(negedge clk);
    src_sel = SRC_RAMP;
    ramp_en = 1;
    n_switches++;
    for (int f = 0; f < 2 * HOLD; f++) begin
      run_frames(1);
      if (f % 5 == 0) cal_en = ~cal_en;
      if (n_wraps > 0) break;
    end
    run_frames(2);

    // back to the external source
    @(negedge clk);
    src_sel = SRC_EXTERNAL;
    n_switches++;
    run_frames(4);
    repeat (3) @(negedge clk);

    $display("frames: pmux %0d (bypassed %0d, corrected %0d), piso %0d", fr_m, n_bypass_frames,
             n_cal_frames, fr_p);
    $display("ramp steps %0d, wraps %0d, trigger pulses %0d, table writes %0d, switches %0d",
             n_steps, n_wraps, n_trig, n_writes, n_switches);
    for (int j = 0; j < SEGS; j++) $display("segment %0d used in %0d frames", j, seg_hits[j]);

    need(fr_m, "a PMUX modulator frame");
    need(n_bypass_frames, "a frame with the correction bypassed");
    need(n_cal_frames, "a corrected frame");
    for (int j = 0; j < SEGS; j++) need(seg_hits[j], $sformatf("use of correction segment %0d", j));
    need(n_writes, "a table write");
    need(n_switches, "a source switch");
    need(n_steps, "a ramp step");
    need(n_wraps, "a ramp wrap");
    need(n_trig, "a trigger pulse");
    need(fr_p, "a shift-register modulator frame");
    checks++;
    if (n_trig < n_steps) begin failures++; $display("fewer triggers than ramp steps"); end

    checks   += ck_m + ck_p;
    failures += fl_m + fl_p;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
