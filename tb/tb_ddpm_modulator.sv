// tb_ddpm_modulator: self-checking test of the priority-multiplexer DDPM
// modulator.
//
// Two instances share a clock: the 16-bit prototype size and a 4-bit one.
// The driver changes dac_in right after each sampling edge (sample_tick
// high). A ddpm_stream_checker per instance compares every output slot with
// the dyadic-sequence definition, counts the ones of each frame against the
// code and checks that frames last 2^N clocks. The sample rate is checked
// too: sample_tick must come exactly every 2^N clocks.
// 16-bit codes: 0, all ones, mid-scale, 0x72D6, 0xAAAA, 1, 0x7FFF and random
// ones; 4-bit: all 16 codes in turn and then random ones.
module tb_ddpm_modulator;

  int checks   = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NA = 16;
  localparam int NB = 4;

  logic [NA-1:0] din_a = '0;
  logic [NA-1:0] codeq_a;
  logic          tick_a, fs_a, out_a;
  logic [NB-1:0] din_b = '0;
  logic [NB-1:0] codeq_b;
  logic          tick_b, fs_b, out_b;

  ddpm_modulator dut_a (
    .clk(clk), .rst_n(rst_n), .dac_in(din_a), .sample_tick(tick_a),
    .frame_start(fs_a), .code_q(codeq_a), .ddpm_out(out_a)
  );

  ddpm_modulator #(.N(NB)) dut_b (
    .clk(clk), .rst_n(rst_n), .dac_in(din_b), .sample_tick(tick_b),
    .frame_start(fs_b), .code_q(codeq_b), .ddpm_out(out_b)
  );

  int ck_a, fl_a, fr_a, ck_b, fl_b, fr_b;

  ddpm_stream_checker #(.N(NA), .TAG("N16")) chk_a (
    .clk(clk), .rst_n(rst_n), .sample_tick(tick_a), .code_in(din_a), .code_q(codeq_a),
    .frame_start(fs_a), .dout(out_a), .checks(ck_a), .failures(fl_a), .frames(fr_a)
  );

  ddpm_stream_checker #(.N(NB), .TAG("N4")) chk_b (
    .clk(clk), .rst_n(rst_n), .sample_tick(tick_b), .code_in(din_b), .code_q(codeq_b),
    .frame_start(fs_b), .dout(out_b), .checks(ck_b), .failures(fl_b), .frames(fr_b)
  );

  logic [NA-1:0] list_a[8] = '{16'h0000, 16'hFFFF, 16'h8000, 16'h72D6, 16'hAAAA, 16'h0001,
                               16'h7FFF, 16'h0000};

  // Drivers: present the next code right after each sampling edge.
  initial begin
    int ia;
    ia = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    forever begin
      @(negedge clk);
      if (tick_a) begin
        @(posedge clk); #1;
        din_a = (ia < 8) ? list_a[ia] : NA'($urandom);
        ia++;
      end
    end
  end

  initial begin
    int ib;
    ib = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (tick_b) begin
        @(posedge clk); #1;
        din_b = (ib < 16) ? NB'(ib) : NB'($urandom);
        ib++;
      end
    end
  end

  // Sample rate: sample_tick of the 16-bit modulator every 2^16 clocks.
  int tick_gaps = 0;
  initial begin
    longint cyc, last;
    cyc = 0;
    last = -1;
    wait (rst_n);
    forever begin
      @(negedge clk);
      cyc++;
      if (tick_a) begin
        if (last >= 0) begin
          checks++;
          tick_gaps++;
          if (cyc - last != 2 ** NA) begin
            failures++;
            $display("sample_tick spacing %0d", cyc - last);
          end
        end
        last = cyc;
      end
    end
  end

  initial begin
    wait (fr_a == 12);
    checks++;
    if (fr_b < 12 * (2 ** (NA - NB)) - 2) begin
      failures++;
      $display("4-bit modulator finished only %0d frames", fr_b);
    end
    $display("frames checked: 16-bit %0d, 4-bit %0d, tick gaps %0d", fr_a, fr_b, tick_gaps);
    checks   += ck_a + ck_b;
    failures += fl_a + fl_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
