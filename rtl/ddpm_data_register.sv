// ddpm_data_register: input data register of the DDPM DAC.
//
// Holds the N-bit code being converted. It captures din on a clock edge where
// load is high and keeps it otherwise; in the modulator load is the counter's
// last-slot flag, so the register is written once per frame, at the sample
// rate f_clk/2^N, and the code stays constant for all 2^N slots of a frame.
// The register and its sample rate follow the document; the load enable (in
// place of a separate f_clk/2^N data clock) and the synchronous reset to 0
// are this design's.
module ddpm_data_register #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,  // synchronous, active low: q <= 0
  input  logic         load,   // capture din on this edge
  input  logic [N-1:0] din,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
  end

endmodule
