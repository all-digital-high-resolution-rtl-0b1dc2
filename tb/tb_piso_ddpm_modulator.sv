// tb_piso_ddpm_modulator: self-checking test of the shift-register DDPM
// modulator.
//
// The 4-bit default instance gets a load pulse every 16 clocks from a
// testbench counter; the code changes right after each load edge. It goes
// through all 16 codes twice, then random codes. A ddpm_stream_checker
// compares every output slot with the dyadic-sequence definition and counts
// the ones of each frame. A second, 5-bit instance covers a larger pattern.
module tb_piso_ddpm_modulator;

  int checks   = 0;
  int failures = 0;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] din4 = '0;
  logic [4:0] din5 = '0;
  logic       load4, load5, fs4, fs5, out4, out5;
  int         cyc = 0;

  assign load4 = rst_n && (cyc % 16 == 15);
  assign load5 = rst_n && (cyc % 32 == 31);

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  piso_ddpm_modulator dut4 (
    .clk(clk), .rst_n(rst_n), .load(load4), .din(din4), .frame_start(fs4), .sout(out4)
  );
  piso_ddpm_modulator #(.N(5)) dut5 (
    .clk(clk), .rst_n(rst_n), .load(load5), .din(din5), .frame_start(fs5), .sout(out5)
  );

  int ck4, fl4, fr4, ck5, fl5, fr5;

  // The shift register starts its first frame only after the first load, so
  // no frame of the reset code comes out (RESET_FRAME = 0).
  ddpm_stream_checker #(.N(4), .CHECK_CODEQ(0), .RESET_FRAME(0), .TAG("PISO4")) chk4 (
    .clk(clk), .rst_n(rst_n), .sample_tick(load4), .code_in(din4), .code_q(din4),
    .frame_start(fs4), .dout(out4), .checks(ck4), .failures(fl4), .frames(fr4)
  );
  ddpm_stream_checker #(.N(5), .CHECK_CODEQ(0), .RESET_FRAME(0), .TAG("PISO5")) chk5 (
    .clk(clk), .rst_n(rst_n), .sample_tick(load5), .code_in(din5), .code_q(din5),
    .frame_start(fs5), .dout(out5), .checks(ck5), .failures(fl5), .frames(fr5)
  );

  initial begin
    int i;
    i = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    forever begin
      @(negedge clk);
      if (load4) begin
        @(posedge clk); #1;
        din4 = (i < 32) ? 4'(i) : 4'($urandom);
        i++;
      end
    end
  end

  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (load5) begin
        @(posedge clk); #1;
        din5 = 5'($urandom);
      end
    end
  end

  initial begin
    wait (fr4 == 100);
    checks++;
    if (fr5 < 48) begin failures++; $display("5-bit instance finished %0d frames", fr5); end
    $display("frames checked: 4-bit %0d, 5-bit %0d", fr4, fr5);
    checks   += ck4 + ck5;
    failures += fl4 + fl5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
