// priority_mux: the combinational core of the DDPM modulator.
//
// It has N data inputs d[N-1:0], N selection inputs s[N-1:0] and one output x.
// The lowest set selection bit wins: if s[k] is the first one counting up
// from s[0], x = d[N-1-k]. With every selection bit at zero the output is 0.
// In Boolean form
//     x = OR_i ( d[N-1-i] & s[i] & ~s[i-1] & ... & ~s[0] ),
// which is a two-level network of N AND terms and one OR.
//
// Driven by a free-running binary counter on s, s[0] is set on every other
// count, so the data MSB appears on half the slots, the next bit on a quarter
// of them, and so on down to the LSB on one slot per 2^N; this is the dyadic
// slot pattern. The function is the document's; the loop form is this
// design's. Purely combinational, no clock.
module priority_mux #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] d,  // data inputs, d[N-1] is the code MSB
  input  logic [N-1:0] s,  // selection inputs, s[0] has the highest priority
  output logic         x   // selected data bit
);

  always_comb begin
    logic none_below;  // no selection bit below position i is set
    x = 1'b0;
    none_below = 1'b1;
    for (int unsigned i = 0; i < N; i++) begin
      x = x | (d[N-1-i] & s[i] & none_below);
      none_below = none_below & ~s[i];
    end
  end

endmodule
