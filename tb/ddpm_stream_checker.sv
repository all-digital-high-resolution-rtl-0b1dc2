// ddpm_stream_checker: testbench monitor for one DDPM modulator output.
//
// Watches the modulator's sampling strobe and records the code it takes from
// its input on each sampling edge (with RESET_FRAME, a first frame of code 0
// comes out before any sample, as after a reset of the data register). Then follows
// the one-bit output frame by frame, using frame_start to find slot 0, and
// checks every slot against a frame built from the dyadic-sequence
// definition, that the frame has exactly `code` ones, that it lasts 2^N
// clocks and, when CHECK_CODEQ is set, that code_q equals the code in use.
// Signals are sampled on the falling clock edge. checks, failures and
// frames are running totals for the enclosing testbench.
module ddpm_stream_checker #(
  parameter int  N           = 16,
  parameter bit  CHECK_CODEQ = 1,
  parameter bit  RESET_FRAME = 1,  // a frame of code 0 precedes the first sample
  parameter string TAG       = "ddpm"
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_tick,  // code is taken on the next rising edge
  input  logic [N-1:0] code_in,      // modulator input
  input  logic [N-1:0] code_q,       // code the modulator reports
  input  logic         frame_start,
  input  logic         dout,
  output int           checks,
  output int           failures,
  output int           frames
);
  import ddpm_ref_pkg::*;

  int unsigned q[$];

  initial begin
    checks   = 0;
    failures = 0;
    frames   = 0;
  end

  // Codes taken by the modulator, oldest first.
  initial begin
    if (RESET_FRAME) q.push_back(0);
    forever begin
      @(negedge clk);
      if (rst_n && sample_tick) q.push_back(int'(code_in));
    end
  end

  initial begin
    bit frame[];
    bit overlap;
    int slot;
    int ones;
    int unsigned code;
    slot = -1;
    ones = 0;
    code = 0;
    forever begin
      @(negedge clk);
      if (!rst_n) continue;
      if (frame_start) begin
        if (slot != -1) begin
          checks++;
          if (slot != (2 ** N)) begin
            failures++;
            $display("%s: frame of %0d slots", TAG, slot);
          end
          checks++;
          if (ones != int'(code)) begin
            failures++;
            $display("%s: frame held %0d ones, code %0d", TAG, ones, code);
          end
          frames++;
        end
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("%s: frame without a sampled code", TAG);
          code = 0;
        end else code = q.pop_front();
        build_frame(code, N, frame, overlap);
        checks++;
        if (overlap) begin failures++; $display("%s: reference overlap", TAG); end
        slot = 0;
        ones = 0;
      end
      if (slot >= 0 && slot < (2 ** N)) begin
        checks++;
        if (dout !== frame[slot]) begin
          failures++;
          if (failures < 20)
            $display("%s: code %0h slot %0d out=%b expected %b", TAG, code, slot, dout, frame[slot]);
        end
        if (CHECK_CODEQ && slot == 1) begin
          checks++;
          if (int'(code_q) != int'(code)) begin
            failures++;
            $display("%s: code_q=%0h expected %0h", TAG, code_q, code);
          end
        end
        ones += int'(dout);
      end
      if (slot >= 0) slot++;
    end
  end

endmodule
