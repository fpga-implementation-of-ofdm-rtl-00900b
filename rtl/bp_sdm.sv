// bp_sdm: second-order band-pass sigma-delta modulator with its noise
// transfer zeros at fs/4, turning the up-converted signal into a 1-bit
// stream.
//
// It is the first-order low-pass modulator (integrator, 1-bit quantizer,
// 1-bit DAC in the feedback) after the substitution z^-1 -> -z^-2, which moves
// the noise-shaping zero from DC to fs/4. Per clock, with x the input sample:
//     w[n] = x[n] + d[n-2] - w[n-2]        (17-bit, 15 fraction bits)
//     q[n] = sign bit of w[n]              (1 = negative)
//     d[n] = q[n] ? -DAC_LEVEL : +DAC_LEVEL
// The feedback DAC is a two-way multiplexer between +DAC_LEVEL and -DAC_LEVEL;
// DAC_LEVEL = 98 (0.00299072265625 in the 16-bit format); the structure and
// the constant follow the original block diagram, where the level was taken
// as the largest up-converter output. Writing the quantizer as d = w + e,
// the loop gives d = x + (1 + z^-2) e: the signal passes unchanged (STF = 1)
// and the quantization noise is shaped by NTF = 1 + z^-2, which is zero at
// +-fs/4.
//
// The output bit is the quantizer's sign bit, so a 1 marks a negative sample;
// the polarity does not matter once the stream is band-pass filtered. The
// loop only advances on clocks with `en` high. Arithmetic wraps in 17 bits.
// Like any 1-bit loop it tracks inputs up to about DAC_LEVEL; with this
// design's up-converter scaling (gain 1/100) OFDM peaks reach roughly 180,
// so the loop is briefly overloaded on peaks. Its state then grows by a few
// hundred LSB, far from the 17-bit limit, and recovers within a few samples;
// the data remain recoverable from the bit stream.
//
// Timing: `bit_o` is registered, one clock after the input sample.
module bp_sdm
  import ofdm_pkg::*;
#(
  parameter fix16_t DAC_LEVEL = 16'sd98
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  fix16_t x,
  output logic   bit_o,
  output logic   valid_o
);

  typedef logic signed [16:0] fix17_t;

  fix17_t w, w1, w2;
  fix16_t d, d1, d2;

  always_comb begin
    w = 17'(x) + 17'(d2) - w2;
    d = w[16] ? -DAC_LEVEL : DAC_LEVEL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0;  w2 <= '0;
      d1 <= '0;  d2 <= '0;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en;
      if (en) begin
        w1 <= w;  w2 <= w1;
        d1 <= d;  d2 <= d1;
        bit_o <= w[16];
      end
    end
  end

endmodule
