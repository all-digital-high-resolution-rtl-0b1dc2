// ddpm_pkg: constants and types shared by the dyadic digital pulse modulation
// (DDPM) DAC.
//
// DDPM turns an N-bit code n into a frame of 2^N one-bit slots holding exactly
// n ones. Bit i of n owns 2^i slots spaced 2^(N-i) apart, so the MSB toggles
// every other slot and the LSB owns a single slot; slot 0 is always zero.
// The constants below are the 16-bit FPGA prototype's numbers: 16-bit code,
// 100 MHz clock, a test ramp that holds each code for 2 s, and 16 calibration
// segments. The fixed-point formats of the calibration table are this
// design's own choice.
package ddpm_pkg;

  // Resolution of the prototype DAC (bits per code, 2^N slots per frame).
  localparam int unsigned DDPM_N = 16;

  // Modulator clock of the prototype, in Hz.
  localparam longint unsigned F_CLK_HZ = 64'd100_000_000;

  // Hold time of each code of the measurement ramp: 2 s at F_CLK_HZ.
  localparam longint unsigned RAMP_HOLD_CYCLES = 64'd200_000_000;

  // Number of linear segments of the slope calibration (multiple-slope case).
  localparam int unsigned CAL_SEGS = 16;

  // Calibration table formats: offset is a signed code with CAL_OFS_FRAC
  // fraction bits, gain an unsigned factor with CAL_GAIN_FRAC fraction bits
  // (integer part 2 bits, range [0, 4)).
  localparam int unsigned CAL_OFS_FRAC  = 8;
  localparam int unsigned CAL_GAIN_FRAC = 16;
  localparam int unsigned CAL_GAIN_W    = CAL_GAIN_FRAC + 2;

  // Source of the code fed to the modulator.
  typedef enum logic {
    SRC_EXTERNAL = 1'b0,  // code from the dac_in port
    SRC_RAMP     = 1'b1   // code from the measurement ramp generator
  } code_src_e;

endpackage
