// tb_slope_calibration: self-checking test of the slope pre-correction.
//
// Default size (16-bit codes, 16 segments). Expected values are computed in
// floating point, independently of the fixed-point datapath: the segment is
// the highest entry whose threshold is <= n, and the code is
// floor((n - ofs/2^8) * gain/2^16 + 0.5), clipped to [0, 65535].
// Phases:
//   1. after reset the table is the identity: n_out = n;
//   2. bypass (enable low) passes n through with one clock of latency;
//   3. double-slope table for a pulse-area gain error a = 4.48e-3:
//      [0, T) gain 1/(1+a); [T, 2^16) offset 2^16*a, gain 1/(1-a),
//      T = round(2^15*(1+a)); the other 14 entries are disabled;
//   4. 16 equal segments with random offsets and gains near 1.
// Every code of phase 3 and 4 is checked with the one-clock latency, and the
// segment index reported with it. Each segment must be used at least once.
module tb_slope_calibration;
  import ddpm_pkg::*;

  localparam int N    = 16;
  localparam int SEGS = 16;

  int checks   = 0;
  int failures = 0;

  logic                             clk = 0;
  logic                             rst_n = 0;
  logic                             enable = 0;
  logic [N-1:0]                     n_in = '0;
  logic [N-1:0]                     n_out;
  logic [3:0]                       seg_out;
  logic                             cal_we = 0;
  logic [3:0]                       cal_addr = '0;
  logic [N:0]                       cal_thr = '0;
  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs = '0;
  logic [CAL_GAIN_W-1:0]            cal_gain = '0;

  slope_calibration dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Software copy of the table.
  longint thr_m[SEGS];
  longint ofs_m[SEGS];
  longint gain_m[SEGS];
  int     seg_hits[SEGS];

  task automatic write_entry(input int a, input longint thr, input longint ofs, input longint gain);
    @(negedge clk);
    cal_we = 1; cal_addr = 4'(a); cal_thr = (N+1)'(thr);
    cal_ofs = (N+CAL_OFS_FRAC+2)'(ofs); cal_gain = CAL_GAIN_W'(gain);
    @(negedge clk);
    cal_we = 0;
    thr_m[a] = thr; ofs_m[a] = ofs; gain_m[a] = gain;
  endtask

  function automatic int model_seg(input int n);
    int s;
    s = 0;
    for (int j = 1; j < SEGS; j++) if (longint'(n) >= thr_m[j]) s = j;
    return s;
  endfunction

  function automatic int model_code(input int n);
    real v;
    int s;
    longint r;
    s = model_seg(n);
    v = (real'(n) - real'(ofs_m[s]) / 256.0) * (real'(gain_m[s]) / 65536.0);
    r = longint'($floor(v + 0.5));
    if (r < 0) r = 0;
    if (r > 65535) r = 65535;
    return int'(r);
  endfunction

  // Apply n for one clock and check the registered result one clock later.
  task automatic apply_and_check(input int n, input bit en);
    int exp_code;
    int exp_seg;
    @(negedge clk);
    n_in = N'(n);
    enable = en;
    exp_code = en ? model_code(n) : n;
    exp_seg = model_seg(n);
    @(negedge clk);
    checks++;
    if (int'(n_out) != exp_code) begin
      failures++;
      if (failures < 20) $display("n=%0d en=%b out=%0d expected %0d", n, en, n_out, exp_code);
    end
    checks++;
    if (int'(seg_out) != exp_seg) begin
      failures++;
      if (failures < 20) $display("n=%0d seg=%0d expected %0d", n, seg_out, exp_seg);
    end
    if (en) seg_hits[exp_seg]++;
  endtask

  initial begin
    real a;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int j = 0; j < SEGS; j++) begin
      thr_m[j] = j * 4096; ofs_m[j] = 0; gain_m[j] = 65536;
    end

    // 1. identity after reset
    for (int t = 0; t < 500; t++) apply_and_check((t < 2) ? t * 65535 : int'($urandom % 65536), 1);

    // 2. bypass, with a non-identity entry 0 loaded
    write_entry(0, 0, 1000, 60000);
    for (int t = 0; t < 200; t++) apply_and_check(int'($urandom % 65536), 0);

    // 3. double-slope correction
    a = 4.48e-3;
    write_entry(0, 0, 0, longint'($floor(65536.0 / (1.0 + a) + 0.5)));
    write_entry(1, longint'($floor(32768.0 * (1.0 + a) + 0.5)),
                longint'($floor(65536.0 * a * 256.0 + 0.5)),
                longint'($floor(65536.0 / (1.0 - a) + 0.5)));
    for (int j = 2; j < SEGS; j++) write_entry(j, 65536, 0, 65536);
    for (int n = 0; n < 65536; n += 1) apply_and_check(n, 1);

    // 4. sixteen segments, random offsets and gains
    for (int j = 0; j < SEGS; j++)
      write_entry(j, j * 4096, longint'($urandom % 100000) - 50000,
                  65536 + longint'($urandom % 4000) - 2000);
    for (int n = 0; n < 65536; n += 3) apply_and_check(n, 1);
    apply_and_check(65535, 1);

    for (int j = 0; j < SEGS; j++) begin
      checks++;
      if (seg_hits[j] == 0) begin failures++; $display("segment %0d never used", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
