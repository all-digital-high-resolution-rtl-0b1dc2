// ddpm_modulator: priority-multiplexer DDPM modulator.
//
// Converts an N-bit code into a one-bit stream whose mean over each frame of
// 2^N clocks is exactly code/2^N. Four parts:
//   * ddpm_data_register samples dac_in once per frame (at f_clk/2^N);
//   * ddpm_counter counts slots 0..2^N-1 at f_clk;
//   * priority_mux picks, in slot c, the code bit N-1-k where k is the index
//     of the lowest set bit of c (0 for c = 0);
//   * a DDPM output register retimes the mux output, so the pin is glitch
//     free and the mux is the only logic between two flip-flops.
// Bit i of the code is therefore sent in the 2^i slots c = 2^(N-i)*h +
// 2^(N-i-1), h = 0..2^i-1: the dyadic sequences of all bits interleave
// without overlap.
//
// Timing: dac_in is sampled on the edge that ends slot 2^N-1 (the cycle in
// which sample_tick is high) and governs the next frame. ddpm_out shows slot c
// one clock after the counter holds c, so a frame on ddpm_out begins one
// clock after the edge that loaded its code; frame_start is high in the
// first clock of every frame on ddpm_out.
// The structure follows the document; the single clock with a load enable,
// the reset and the frame_start flag are this design's.
module ddpm_modulator #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,        // synchronous, active low
  input  logic [N-1:0] dac_in,       // code to convert
  output logic         sample_tick,  // dac_in is sampled at the end of this cycle
  output logic         frame_start,  // ddpm_out is in slot 0 of a frame
  output logic [N-1:0] code_q,       // code being converted now
  output logic         ddpm_out      // DDPM stream
);

  logic [N-1:0] cnt;
  logic         frame_last;
  logic         pmux_x;

  ddpm_counter #(.N(N)) u_counter (
    .clk       (clk),
    .rst_n     (rst_n),
    .count     (cnt),
    .frame_last(frame_last)
  );

  ddpm_data_register #(.N(N)) u_data_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (frame_last),
    .din  (dac_in),
    .q    (code_q)
  );

  priority_mux #(.N(N)) u_pmux (
    .d(code_q),
    .s(cnt),
    .x(pmux_x)
  );

  // DDPM output register, and a flag that marks slot 0 on its output.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ddpm_out    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      ddpm_out    <= pmux_x;
      frame_start <= (cnt == '0);
    end
  end

  assign sample_tick = frame_last;

endmodule
