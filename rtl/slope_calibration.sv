// slope_calibration: digital pre-correction of the DAC's slope errors.
//
// Real output edges make each isolated pulse slightly larger or smaller than
// ideal. In a DDPM stream the number of isolated pulses grows with the code
// up to mid-scale and falls after it, so the static characteristic becomes
// piecewise linear: two slopes (double-slope error), or, with supply drops
// that follow the DDPM pattern, several (multiple-slope error). Both are
// removed by mapping the wanted value n to a corrected code
//     n' = round( (n - OFS_j) * GAIN_j )        for n in segment j,
// clipped to [0, 2^N-1]. For the double-slope case two segments are used:
// [0, T) with OFS = 0, GAIN = 1/(1+a) and [T, 2^N) with OFS = 2^N*a,
// GAIN = 1/(1-a), where T = 2^(N-1)*(1+a) and a is the measured pulse-area
// gain error (this offset is the one that makes the corrected characteristic
// continuous at T, given the upper slope n/2^N*(1-a) + a). For the multiple-slope case the range is cut into SEGS equal
// parts with a per-segment offset and gain from a best linear fit.
//
// Table: SEGS entries of {threshold, offset, gain}. The segment of n is the
// highest index j whose threshold is <= n (entry 0 is used when none is), so
// thresholds must rise with the index; a threshold of 2^N disables an entry.
// offset is signed with CAL_OFS_FRAC fraction bits, gain unsigned with
// CAL_GAIN_FRAC fraction bits; rounding is to nearest, ties upward. After
// reset the table holds SEGS equal segments with offset 0 and gain 1, i.e.
// the identity. Entries are written one per clock through cal_we/cal_addr.
//
// Timing: one clock of latency from n_in to n_out. With enable low n_out is
// n_in delayed by one clock (no correction). The correction formulas follow
// the document; the table layout, the number formats, the programmable
// thresholds, the write port and the saturation are this design's.
module slope_calibration
  import ddpm_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned SEGS = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,     // synchronous, active low
  input  logic                             enable,    // apply the correction
  input  logic [N-1:0]                     n_in,      // value to be converted
  output logic [N-1:0]                     n_out,     // code for the modulator
  output logic [$clog2(SEGS)-1:0]          seg_out,   // segment used for n_out
  // calibration table write port
  input  logic                             cal_we,
  input  logic [$clog2(SEGS)-1:0]          cal_addr,
  input  logic [N:0]                       cal_thr,   // segment lower bound
  input  logic signed [N+CAL_OFS_FRAC+1:0] cal_ofs,   // offset, CAL_OFS_FRAC fraction bits
  input  logic [CAL_GAIN_W-1:0]            cal_gain   // gain, CAL_GAIN_FRAC fraction bits
);

  localparam int unsigned AW   = $clog2(SEGS);
  localparam int unsigned OW   = N + CAL_OFS_FRAC + 2;  // offset width
  localparam int unsigned DW   = OW + 1;                // difference width
  localparam int unsigned PW   = DW + CAL_GAIN_W + 1;   // product width
  localparam int unsigned FRAC = CAL_OFS_FRAC + CAL_GAIN_FRAC;

  logic [N:0]             thr_q  [SEGS];
  logic signed [OW-1:0]   ofs_q  [SEGS];
  logic [CAL_GAIN_W-1:0]  gain_q [SEGS];

  // Table registers; reset to the identity mapping.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < SEGS; j++) begin
        thr_q[j]  <= (N+1)'((j * (2 ** N)) / SEGS);
        ofs_q[j]  <= '0;
        gain_q[j] <= CAL_GAIN_W'(1) << CAL_GAIN_FRAC;
      end
    end else if (cal_we) begin
      thr_q[cal_addr]  <= cal_thr;
      ofs_q[cal_addr]  <= cal_ofs;
      gain_q[cal_addr] <= cal_gain;
    end
  end

  // Segment search: the highest entry whose threshold does not exceed n_in.
  logic [AW-1:0] seg;
  always_comb begin
    seg = '0;
    for (int unsigned j = 1; j < SEGS; j++)
      if ({1'b0, n_in} >= thr_q[j]) seg = AW'(j);
  end

  // (n - ofs) * gain, rounded to nearest and clipped to the code range.
  logic signed [DW-1:0] diff;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rounded;
  logic [N-1:0]         corrected;

  always_comb begin
    diff    = DW'(signed'({2'b00, n_in, {CAL_OFS_FRAC{1'b0}}})) - DW'(ofs_q[seg]);
    prod    = PW'(diff) * PW'(signed'({1'b0, gain_q[seg]}));
    rounded = (prod + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    if (rounded < 0)
      corrected = '0;
    else if (rounded > PW'((2 ** N) - 1))
      corrected = '1;
    else
      corrected = rounded[N-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_out   <= '0;
      seg_out <= '0;
    end else begin
      n_out   <= enable ? corrected : n_in;
      seg_out <= seg;
    end
  end

endmodule
