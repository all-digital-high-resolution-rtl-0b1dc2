// tb_ramp_trigger_gen: self-checking test of the measurement ramp.
//
// A short instance (4-bit code, 20 clocks per code, trigger 8 clocks after
// each step, 3 clocks wide) runs past a full wrap of the code, with enable
// dropped for random stretches. The expected outputs are closed-form
// functions of the number e of enabled clocks since reset:
//     code    = floor(e / HOLD) mod 2^N
//     step    = enable and e mod HOLD == HOLD-1
//     trigger = enable and TRIG_DELAY <= e mod HOLD < TRIG_DELAY+TRIG_WIDTH
// The test also counts steps and triggers: exactly one trigger per held code.
module tb_ramp_trigger_gen;

  localparam int N  = 4;
  localparam int H  = 20;
  localparam int TD = 8;
  localparam int TW = 3;

  int checks   = 0;
  int failures = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         enable = 0;
  logic [N-1:0] code;
  logic         step, trigger;

  ramp_trigger_gen #(.N(N), .HOLD(H), .TRIG_DELAY(TD), .TRIG_WIDTH(TW)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .code(code), .step(step), .trigger(trigger)
  );

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int steps, trig_rises;
    logic trig_prev;
    e = 0; steps = 0; trig_rises = 0; trig_prev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3 * H * (2 ** N); t++) begin
      @(negedge clk);
      enable = ($urandom % 8) != 0;
      #1;
      checks++;
      if (code !== N'(e / H)) begin
        failures++;
        if (failures < 10) $display("t=%0d e=%0d code=%0d", t, e, code);
      end
      checks++;
      if (step !== (enable && (e % H == H - 1))) begin
        failures++;
        if (failures < 10) $display("t=%0d e=%0d step=%b", t, e, step);
      end
      checks++;
      if (trigger !== (enable && (e % H >= TD) && (e % H < TD + TW))) begin
        failures++;
        if (failures < 10) $display("t=%0d e=%0d trigger=%b", t, e, trigger);
      end
      if (step) steps++;
      if (trigger && !trig_prev && (e % H == TD)) trig_rises++;
      trig_prev = trigger;
      if (enable) e++;
    end
    $display("enabled clocks %0d, steps %0d, trigger pulses %0d", e, steps, trig_rises);
    checks++;
    if (steps != e / H) begin failures++; $display("steps %0d, expected %0d", steps, e / H); end
    checks++;
    if (e / H <= 2 ** N) begin failures++; $display("the code never wrapped"); end
    checks++;
    if (trig_rises < e / H) begin failures++; $display("too few trigger pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
