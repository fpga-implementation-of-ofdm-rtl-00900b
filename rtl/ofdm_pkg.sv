// ofdm_pkg: types and constants shared by the OFDM / sigma-delta transmitter.
//
// All baseband values use a signed 16-bit two's-complement format with 15
// fractional bits (range -1 .. 1-2^-15), written fix16_t here; a complex
// baseband sample is a pair of them. The constants are the numbers the
// transmitter is built around: a 64-point IFFT with a 16-sample cyclic prefix,
// four comb pilots at subcarriers 15, 25, 39 and 49, a null at subcarrier 0,
// QPSK levels of +-1/sqrt(2), 16-QAM levels of +-1/sqrt(10) and
// +-3/sqrt(10) (equal average power) and a pilot value equal to the largest positive
// fix16_t.
package ofdm_pkg;

  typedef logic signed [15:0] fix16_t;

  typedef struct packed {
    fix16_t re;
    fix16_t im;
  } cplx_t;

  localparam int     N_FFT      = 64;
  localparam int     CP_LEN     = 16;
  localparam fix16_t QPSK_POS   = 16'sd23170;   // 0.70709228515625
  localparam fix16_t QPSK_NEG   = -16'sd23170;  // -0.70709228515625
  localparam fix16_t QAM16_IN_POS  = 16'sd10362;   // 0.31622314453125
  localparam fix16_t QAM16_IN_NEG  = -16'sd10362;
  localparam fix16_t QAM16_OUT_POS = 16'sd31086;   // 0.94866943359375
  localparam fix16_t QAM16_OUT_NEG = -16'sd31086;
  localparam fix16_t PILOT_VAL  = 16'sd32767;   // 0.99997, largest fix16_t
  localparam int     PILOT_IDX0 = 15;
  localparam int     PILOT_IDX1 = 25;
  localparam int     PILOT_IDX2 = 39;
  localparam int     PILOT_IDX3 = 49;
  localparam int     NULL_IDX   = 0;

  // True when subcarrier k carries a pilot.
  function automatic logic is_pilot(input logic [5:0] k);
    return (k == 6'(PILOT_IDX0)) || (k == 6'(PILOT_IDX1)) ||
           (k == 6'(PILOT_IDX2)) || (k == 6'(PILOT_IDX3));
  endfunction

endpackage
