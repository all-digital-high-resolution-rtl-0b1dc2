// tb_ddpm_counter: self-checking test of the free-running slot counter.
//
// Runs the 16-bit counter for two full frames after reset and checks, every
// clock, that it counts up by one from 0, wraps after 2^16 - 1, and that
// frame_last is high exactly in the last slot, so it fires once per 65536
// clocks (the f_clk/2^N sample rate).
module tb_ddpm_counter;

  localparam int N = 16;

  int checks   = 0;
  int failures = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic [N-1:0] count;
  logic         frame_last;

  ddpm_counter dut (.clk(clk), .rst_n(rst_n), .count(count), .frame_last(frame_last));

  always #5 clk = ~clk;

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cyc;
    int last_tick;
    int ticks;
    last_tick = -1;
    ticks = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (cyc = 0; cyc < 2 * (2 ** N) + 10; cyc++) begin
      checks++;
      if (count !== N'(cyc)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d", cyc, count);
      end
      checks++;
      if (frame_last !== ((cyc % (2 ** N)) == (2 ** N) - 1)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: frame_last=%b", cyc, frame_last);
      end
      if (frame_last) begin
        if (last_tick >= 0) begin
          checks++;
          if (int'(cyc) - last_tick != 2 ** N) begin
            failures++;
            $display("frame_last period %0d", int'(cyc) - last_tick);
          end
        end
        last_tick = cyc;
        ticks++;
      end
      @(negedge clk);
    end
    checks++;
    if (ticks != 2) begin failures++; $display("saw %0d frame ends, expected 2", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
