// piso_ddpm_modulator: DDPM modulator built from a parallel-in serial-out
// (PISO) shift register.
//
// The 2^N-bit shift register is parallel-loaded once per frame and shifted
// out one bit per clock. Its parallel inputs are plain wires from the input
// data register laid out in the DDPM slot pattern: slot 0 holds a constant 0
// and slot c > 0 holds code bit N-1-k, k being the index of the lowest set bit
// of c. So the MSB fills every odd slot, bit N-2 the slots 2, 6, 10, ...,
// and the LSB the single slot 2^(N-1). There is no logic between the data
// register and the serial output, only wiring and flip-flops, which suits a
// very fast clock; the cost is 2^N flip-flops, so this form only makes sense
// for a few bits. The default N = 4 is the size drawn for this architecture.
//
// Interface and timing: din is captured on an edge where load is high; the
// shift register takes the pattern on the next edge, and from then on sout
// gives slots 0, 1, ..., 2^N-1, one per clock, with frame_start high during
// slot 0. load must be pulsed once every 2^N clocks for a gap-free stream:
// if it is late, zeros are shifted in; an assertion reports one that comes
// early. The structure follows the document; the load strobe timing, the
// shift direction, the reset and the assertion are this design's.
module piso_ddpm_modulator #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,        // synchronous, active low
  input  logic         load,         // sample din and start a frame next cycle
  input  logic [N-1:0] din,          // code to convert
  output logic         frame_start,  // sout is in slot 0
  output logic         sout          // DDPM stream
);

  localparam int unsigned SLOTS = 2 ** N;

  // Index of the lowest set bit of a non-zero slot number.
  function automatic int unsigned lowest_one(input int unsigned c);
    for (int unsigned k = 0; k < 32; k++)
      if (c[k]) return k;
    return 0;
  endfunction

  logic [N-1:0]     data_q;
  logic [SLOTS-1:0] pattern;  // hard-wired parallel inputs
  logic [SLOTS-1:0] shreg;    // shreg[0] is the bit on sout
  logic             load_d;

  ddpm_data_register #(.N(N)) u_data_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .din  (din),
    .q    (data_q)
  );

  assign pattern[0] = 1'b0;
  for (genvar c = 1; c < SLOTS; c++) begin : g_wire
    assign pattern[c] = data_q[N-1-lowest_one(c)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load_d      <= 1'b0;
      shreg       <= '0;
      frame_start <= 1'b0;
    end else begin
      load_d      <= load;
      frame_start <= load_d;
      if (load_d) shreg <= pattern;
      else        shreg <= {1'b0, shreg[SLOTS-1:1]};
    end
  end

  assign sout = shreg[0];

  // Usage rule: after a load, the next one may not come before the frame
  // has been shifted out. The counter only serves this check.
  logic [N:0] since_load;
  always_ff @(posedge clk) begin
    if (!rst_n)                    since_load <= (N+1)'(SLOTS);
    else if (load)                 since_load <= '0;
    else if (since_load != (N+1)'(SLOTS)) since_load <= since_load + 1'b1;
  end

  always_ff @(posedge clk)
    if (rst_n && load)
      assert (since_load >= (N+1)'(SLOTS - 1))
        else $error("piso_ddpm_modulator: load %0d clocks after the previous one", since_load + 1);

endmodule
