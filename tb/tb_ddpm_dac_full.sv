// tb_ddpm_dac_full: the DDPM DAC at its full default size.
//
// 16-bit codes (65536-clock frames), 16 correction segments, 2 s ramp hold at
// 100 MHz, 4-bit shift-register modulator; no parameter is overridden.
// Sequence:
//   1. external codes 0x72D6, 0xAAAA, 0xFFFF, 0x0000, correction bypassed;
//   2. a double-slope correction for a pulse-area gain error a = 4.48e-3 is
//      written (segment 0: gain 1/(1+a); segment 1 from 2^15*(1+a): offset
//      2^16*a, gain 1/(1-a); the other 14 entries disabled) and four codes
//      around mid-scale are converted with it;
//   3. the ramp source is selected and run up to its first trigger pulse
//      (1 s = 1e8 clocks), and past its first step to code 1 (2e8 clocks).
// Every slot of every PMUX frame is compared with the dyadic pattern of the
// code the modulator should have received (a floating-point model of the
// correction gives it); the shift-register modulator is checked the same way
// on random 4-bit codes. The ramp code is checked every clock against the
// count of enabled clocks, and the time of the first trigger and of the
// first step is checked to the clock.
module tb_ddpm_dac_full;
  import ddpm_pkg::*;

  localparam int N  = 16;
  localparam int PN = 4;

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
  logic [3:0]                       cal_addr = '0;
  logic [N:0]                       cal_thr = '0;
  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs = '0;
  logic [CAL_GAIN_W-1:0]            cal_gain = '0;
  logic [3:0]                       cal_seg;
  logic [N-1:0]                     code_q;
  logic                             sample_tick, frame_start, ddpm_out;
  logic [PN-1:0]                    piso_din = '0;
  logic                             piso_frame_start, piso_out;

  ddpm_dac_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Correction table model.
  longint thr_m[16];
  longint ofs_m[16];
  longint gain_m[16];

  function automatic int model_code(input int n);
    real v;
    longint r;
    int s;
    s = 0;
    for (int j = 1; j < 16; j++) if (longint'(n) >= thr_m[j]) s = j;
    v = (real'(n) - real'(ofs_m[s]) / 256.0) * (real'(gain_m[s]) / 65536.0);
    r = longint'($floor(v + 0.5));
    if (r < 0) r = 0;
    if (r > 65535) r = 65535;
    return int'(r);
  endfunction

  logic [N-1:0] exp_mod = '0;
  always @(posedge clk) begin
    int src;
    src = (src_sel == SRC_RAMP) ? int'(ramp_code) : int'(dac_in);
    if (!rst_n) exp_mod <= '0;
    else        exp_mod <= cal_en ? N'(model_code(src)) : N'(src);
  end

  int ck_m, fl_m, fr_m, ck_p, fl_p, fr_p;

  ddpm_stream_checker #(.N(N), .TAG("PMUX")) chk_mod (
    .clk(clk), .rst_n(rst_n), .sample_tick(sample_tick), .code_in(exp_mod), .code_q(code_q),
    .frame_start(frame_start), .dout(ddpm_out), .checks(ck_m), .failures(fl_m), .frames(fr_m)
  );

  logic          piso_load;
  logic [PN-1:0] piso_cnt_m = '0;
  always @(posedge clk) piso_cnt_m <= rst_n ? piso_cnt_m + 1'b1 : '0;
  assign piso_load = rst_n && (piso_cnt_m == '1);
  always @(posedge clk) if (rst_n && piso_load) piso_din <= PN'($urandom);

  ddpm_stream_checker #(.N(PN), .CHECK_CODEQ(0), .RESET_FRAME(0), .TAG("PISO")) chk_piso (
    .clk(clk), .rst_n(rst_n), .sample_tick(piso_load), .code_in(piso_din), .code_q(piso_din),
    .frame_start(piso_frame_start), .dout(piso_out), .checks(ck_p), .failures(fl_p),
    .frames(fr_p)
  );

  // Ramp: code, first trigger and first step, against enabled clocks.
  longint e = 0;
  longint first_trig = -1, first_step = -1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (ramp_code !== N'(e / 200_000_000)) begin
        failures++;
        if (failures < 20) $display("ramp code %0d at e=%0d", ramp_code, e);
      end
      if (trigger && first_trig < 0) first_trig = e;
      if (ramp_step && first_step < 0) first_step = e;
      if (ramp_en) e++;
    end
  end

  task automatic write_entry(input int a, input longint thr, input longint ofs, input longint gain);
    @(negedge clk);
    cal_we = 1; cal_addr = 4'(a); cal_thr = (N+1)'(thr);
    cal_ofs = (N+CAL_OFS_FRAC+2)'(ofs); cal_gain = CAL_GAIN_W'(gain);
    @(negedge clk);
    cal_we = 0;
    thr_m[a] = thr; ofs_m[a] = ofs; gain_m[a] = gain;
  endtask

  // Wait for the next sampling edge, then present code c.
  task automatic next_code(input int c);
    @(negedge clk);
    while (!sample_tick) @(negedge clk);
    @(posedge clk); #1;
    dac_in = N'(c);
  endtask

  initial begin
    real a;
    for (int j = 0; j < 16; j++) begin
      thr_m[j] = j * 4096; ofs_m[j] = 0; gain_m[j] = 65536;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // 1. plain conversions
    dac_in = 16'h72D6;
    next_code(16'hAAAA);
    next_code(16'hFFFF);
    next_code(16'h0000);

    // 2. double-slope correction
    a = 4.48e-3;
    write_entry(0, 0, 0, longint'($floor(65536.0 / (1.0 + a) + 0.5)));
    write_entry(1, longint'($floor(32768.0 * (1.0 + a) + 0.5)),
                longint'($floor(65536.0 * a * 256.0 + 0.5)),
                longint'($floor(65536.0 / (1.0 - a) + 0.5)));
    for (int j = 2; j < 16; j++) write_entry(j, 65536, 0, 65536);
    @(negedge clk);
    cal_en = 1;
    next_code(16'h7FF0);
    next_code(16'h8050);
    next_code(16'hC000);
    next_code(16'h0000);

    // 3. ramp up to its first step
    @(negedge clk);
    src_sel = SRC_RAMP;
    ramp_en = 1;
    cal_en  = 0;
    wait (first_step >= 0);
    repeat (3 * 65536) @(negedge clk);

    checks++;
    if (first_trig != 100_000_000) begin
      failures++;
      $display("first trigger after %0d enabled clocks", first_trig);
    end
    checks++;
    if (first_step != 200_000_000 - 1) begin
      failures++;
      $display("first step after %0d enabled clocks", first_step);
    end
    checks++;
    if (ramp_code != 1 || code_q != 1) begin
      failures++;
      $display("after the first step: ramp code %0d, modulator code %0d", ramp_code, code_q);
    end
    $display("frames checked: pmux %0d, piso %0d; first trigger at %0d, first step at %0d",
             fr_m, fr_p, first_trig, first_step);
    checks++;
    if (fr_m < 3000) begin failures++; $display("too few frames"); end
    checks   += ck_m + ck_p;
    failures += fl_m + fl_p;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
