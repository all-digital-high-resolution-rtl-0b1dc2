// tb_sine_workload: a full-swing sine sequence through the 16-bit DAC.
//
// The sample sequence is a full-swing sine quantized to 16 bits,
//     s_k = round( (2^16 - 1)/2 * (1 + sin(2*pi*k/S)) ),
// with S = 16 samples per period for two periods and then S = 64 for one
// period: one sample per frame, i.e. at f_clk/2^16. The DAC runs at its
// default size with the correction bypassed. For every frame the testbench
// checks each slot against the dyadic pattern of the sample and that the
// frame mean (ones / 2^16) equals s_k / 2^16 exactly: the frame-by-frame
// mean of a DDPM stream is the zero-order-hold value of the sequence.
module tb_sine_workload;
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
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The modulator receives dac_in one clock late (correction stage).
  logic [N-1:0] exp_mod = '0;
  always @(posedge clk) exp_mod <= rst_n ? dac_in : '0;

  int ck_m, fl_m, fr_m;
  ddpm_stream_checker #(.N(N), .TAG("SINE")) chk (
    .clk(clk), .rst_n(rst_n), .sample_tick(sample_tick), .code_in(exp_mod), .code_q(code_q),
    .frame_start(frame_start), .dout(ddpm_out), .checks(ck_m), .failures(fl_m), .frames(fr_m)
  );

  function automatic int sine_sample(input int k, input int s);
    real v;
    v = (real'((2 ** N) - 1) / 2.0) * (1.0 + $sin(2.0 * 3.14159265358979 * real'(k) / real'(s)));
    return int'($floor(v + 0.5));
  endfunction

  int seq[$];
  int min_code = 1 << 30, max_code = -1;

  initial begin
    for (int k = 0; k < 32; k++) seq.push_back(sine_sample(k, 16));
    for (int k = 0; k < 64; k++) seq.push_back(sine_sample(k, 64));
    foreach (seq[i]) begin
      if (seq[i] < min_code) min_code = seq[i];
      if (seq[i] > max_code) max_code = seq[i];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    dac_in = N'(seq[0]);
    for (int i = 1; i <= seq.size(); i++) begin
      @(negedge clk);
      while (!sample_tick) @(negedge clk);
      @(posedge clk); #1;
      dac_in = (i < seq.size()) ? N'(seq[i]) : '0;
    end
    // the last sample's frame
    wait (fr_m == seq.size() + 1);
    checks++;
    if (min_code != 0 || max_code != 65535) begin
      failures++;
      $display("sequence is not full swing: %0d..%0d", min_code, max_code);
    end
    $display("sine samples converted: %0d (frames %0d)", seq.size(), fr_m);
    checks   += ck_m;
    failures += fl_m;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
