// carrier_mixer: moves the complex baseband up to a carrier at a quarter of
// the sample rate.
//
// At fs/4 the carrier samples are cos = 1, 0, -1, 0 and sin = 0, 1, 0, -1, so
// no multiplier is needed: a 2-bit counter (0..3) advances with every sample
// and drives two multiplexers, one choosing I, 0 or -I (the cosine branch)
// and one choosing Q, 0 or -Q (the sine branch); their outputs are added.
// The sign convention y = I*cos - Q*sin (the real part of (I + jQ) times
// exp(+j*pi*n/2)) is this design's choice. The result sequence is therefore
// I, -Q, -I, Q, I, ... Negation saturates so that -(-1) gives the largest
// positive value.
//
// Timing: one registered output per input sample; `m_valid` follows
// `s_valid` by one clock. The counter is reset to 0 and only moves on valid
// samples.
module carrier_mixer
  import ofdm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  input  fix16_t s_i,
  input  fix16_t s_q,
  output logic   m_valid,
  output fix16_t m_data,
  output logic [1:0] phase     // counter value of the sample now on m_data
);

  logic [1:0] cnt;
  fix16_t     cos_br, sin_br;

  function automatic fix16_t neg_sat(input fix16_t v);
    return (v == 16'sh8000) ? 16'sh7FFF : -v;
  endfunction

  always_comb begin
    unique case (cnt)
      2'd0:    begin cos_br = s_i;          sin_br = '0;          end
      2'd1:    begin cos_br = '0;           sin_br = neg_sat(s_q); end
      2'd2:    begin cos_br = neg_sat(s_i); sin_br = '0;          end
      default: begin cos_br = '0;           sin_br = s_q;          end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      phase   <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= s_valid;
      if (s_valid) begin
        m_data <= cos_br + sin_br;   // one branch is always zero
        phase  <= cnt;
        cnt    <= cnt + 1'b1;
      end
    end
  end

endmodule
