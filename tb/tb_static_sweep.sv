// tb_static_sweep: static-characteristic sweep with the double-slope error
// and its correction, on an 8-bit DAC.
//
// The measurement ramp steps the code 0..255, holding each for three frames
// and triggering once per code, near the end of the hold. Behind the modulator sits a model of the
// analog output in which every isolated "one" pulse carries an extra area
// error a (relative to one clock at full swing): the mean output of a frame
// with w ones and h separate pulses is (w + a*h)/2^N. The sweep is run twice:
//   1. correction off. The DDPM stream must have h = n pulses for n < 2^(N-1)
//      and h = 2^N - n above (every slot of the MSB sequence separates
//      pulses below mid-scale and joins them above), so the characteristic
//      is n/2^N*(1+a) below and n/2^N*(1-a) + a above mid-scale, checked
//      code by code; its deviation from the straight line through the end
//      points must be several LSBs.
//   2. correction on with a two-segment table: [0, T) gain 1/(1+a),
//      [T, 2^N) offset 2^N*a and gain 1/(1-a), T = 2^(N-1)*(1+a). Every
//      code's modelled output must then be within one LSB of n/2^N.
// a = 0.05 exaggerates the effect so that it shows at 8 bits.
module tb_static_sweep;
  import ddpm_pkg::*;

  localparam int  N     = 8;
  localparam int  SLOTS = 2 ** N;
  localparam int  HOLD  = 3 * SLOTS;
  localparam real A     = 0.05;

  int checks   = 0;
  int failures = 0;

  logic                             clk = 0;
  logic                             rst_n = 0;
  code_src_e                        src_sel = SRC_RAMP;
  logic [N-1:0]                     dac_in = '0;
  logic                             ramp_en = 0;
  logic [N-1:0]                     ramp_code;
  logic                             ramp_step;
  logic                             trigger;
  logic                             cal_en = 0;
  logic                             cal_we = 0;
  logic [0:0]                       cal_addr = '0;
  logic [N:0]                       cal_thr = '0;
  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs = '0;
  logic [CAL_GAIN_W-1:0]            cal_gain = '0;
  logic [0:0]                       cal_seg;
  logic [N-1:0]                     code_q;
  logic                             sample_tick, frame_start, ddpm_out;
  logic [3:0]                       piso_din = '0;
  logic                             piso_frame_start, piso_out;

  ddpm_dac_top #(
    .N(N), .SEGS(2), .RAMP_HOLD(HOLD), .TRIG_DELAY(HOLD - 8), .TRIG_WIDTH(2)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frame monitor: ones and separate pulses of the last complete frame.
  int  last_ones = 0, last_pulses = 0;
  bit  have_frame = 0;
  initial begin
    int ones, rises, slot;
    logic first, prev;
    slot = -1; ones = 0; rises = 0; first = 0; prev = 0;
    forever begin
      @(negedge clk);
      if (!rst_n) continue;
      if (frame_start) begin
        if (slot == SLOTS) begin
          // circular count: the frame repeats, so a pulse may wrap around
          if (prev == 1'b0 && first == 1'b1) rises++;
          last_ones   = ones;
          last_pulses = rises;
          have_frame  = 1;
        end
        slot = 0; ones = 0; rises = 0;
      end
      if (slot >= 0) begin
        if (slot == 0) first = ddpm_out;
        else if (ddpm_out && !prev) rises++;
        ones += int'(ddpm_out);
        prev = ddpm_out;
        slot++;
      end
    end
  end

  // Measured value per code, taken at each trigger from the modelled output.
  real v_meas[SLOTS];
  int  w_meas[SLOTS];
  int  h_meas[SLOTS];
  int  n_trig = 0;
  always @(negedge clk) begin
    if (rst_n && trigger && have_frame) begin
      v_meas[ramp_code] = (real'(last_ones) + A * real'(last_pulses)) / real'(SLOTS);
      w_meas[ramp_code] = last_ones;
      h_meas[ramp_code] = last_pulses;
      n_trig++;
      have_frame = 0;  // one measurement per trigger pulse
    end
  end

  task automatic write_entry(input int a, input longint thr, input longint ofs, input longint gain);
    @(negedge clk);
    cal_we = 1; cal_addr = 1'(a); cal_thr = (N+1)'(thr);
    cal_ofs = (N+CAL_OFS_FRAC+2)'(ofs); cal_gain = CAL_GAIN_W'(gain);
    @(negedge clk);
    cal_we = 0;
  endtask

  // Run the ramp until it has triggered once for every code.
  task automatic sweep();
    n_trig = 0;
    ramp_en = 1;
    wait (n_trig == SLOTS);
  endtask

  initial begin
    real v_ideal, dev, max_dev_raw, max_dev_cal, lsb;
    lsb = 1.0 / real'(SLOTS);
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // correction table, used from the second sweep on
    write_entry(0, 0, 0, longint'($floor(65536.0 / (1.0 + A) + 0.5)));
    write_entry(1, longint'($floor(real'(SLOTS / 2) * (1.0 + A) + 0.5)),
                longint'($floor(real'(SLOTS) * A * 256.0 + 0.5)),
                longint'($floor(65536.0 / (1.0 - A) + 0.5)));

    // 1. uncorrected sweep
    sweep();
    max_dev_raw = 0.0;
    for (int n = 0; n < SLOTS; n++) begin
      checks++;
      if (w_meas[n] != n) begin failures++; $display("code %0d: %0d ones", n, w_meas[n]); end
      checks++;
      if (h_meas[n] != ((n < SLOTS / 2) ? n : SLOTS - n)) begin
        failures++;
        $display("code %0d: %0d separate pulses", n, h_meas[n]);
      end
      v_ideal = (n < SLOTS / 2) ? real'(n) / SLOTS * (1.0 + A)
                                : real'(n) / SLOTS * (1.0 - A) + A;
      checks++;
      if ((v_meas[n] - v_ideal) > 1e-9 || (v_ideal - v_meas[n]) > 1e-9) begin
        failures++;
        $display("code %0d: output %f, expected %f", n, v_meas[n], v_ideal);
      end
      // deviation from the line through the end points
      dev = v_meas[n] - (v_meas[0] + (v_meas[SLOTS-1] - v_meas[0]) * n / (SLOTS - 1));
      if (dev < 0) dev = -dev;
      if (dev > max_dev_raw) max_dev_raw = dev;
    end
    $display("uncorrected: peak deviation from end-point line %0.2f LSB", max_dev_raw / lsb);
    checks++;
    if (max_dev_raw / lsb < 2.0) begin failures++; $display("double-slope error not visible"); end

    // 2. corrected sweep: the ramp goes on from code 255 to 0 and up again
    cal_en = 1;
    sweep();
    max_dev_cal = 0.0;
    for (int n = 0; n < SLOTS; n++) begin
      dev = v_meas[n] - real'(n) / SLOTS;
      if (dev < 0) dev = -dev;
      if (dev > max_dev_cal) max_dev_cal = dev;
      checks++;
      if (dev > lsb) begin
        failures++;
        $display("corrected code %0d: output %f, wanted %f", n, v_meas[n], real'(n) / SLOTS);
      end
    end
    $display("corrected: peak error %0.2f LSB", max_dev_cal / lsb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
