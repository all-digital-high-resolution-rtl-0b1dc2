// ddpm_counter: free-running N-bit binary counter of the DDPM modulator.
//
// The count advances by one on every clock and wraps from 2^N-1 to 0, so one
// full count is one DDPM frame of 2^N slots. Its bits drive the selection
// inputs of the priority multiplexer (bit 0 = highest priority). frame_last
// is high while the count is 2^N-1, the last slot of the frame; the input
// data register uses it to sample the next code so that the new code takes
// effect exactly at slot 0. The counter itself follows the document; the
// synchronous active-low reset to 0 and the frame_last flag are this design's.
module ddpm_counter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,       // synchronous, active low: count <= 0
  output logic [N-1:0] count,       // current slot index within the frame
  output logic         frame_last   // count == 2^N-1
);

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign frame_last = &count;

endmodule
