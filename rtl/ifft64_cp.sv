// ifft64_cp: 64-point inverse FFT with cyclic-prefix insertion and
// ready/valid (AXI-Stream style) handshakes on both sides.
//
// Function: for every 64 frequency-domain samples X[k] accepted in natural
// order, it outputs 80 time-domain samples: x[48..63] (the 16-sample cyclic
// prefix) followed by x[0..63], where
//     x[n] = (1/64) * sum_k X[k] * exp(+j*2*pi*k*n/64).
// The 1/64 comes from scaling every radix-2 stage by 1/2, the same as a
// scaling schedule that shifts by 2 bits for each pair of stages ("10" per
// group, three groups). `xk_index` gives n for the sample on `m_data`, so it
// runs 48..63, 0..63 within a symbol.
//
// Inside: the design this transmitter was derived from used a vendor
// pipelined-streaming FFT core. Here the same function is built as the
// simplest engine that keeps up with the rest of the chain: one memory of 64
// complex words and one radix-2 butterfly, run in place, decimation in time.
//   LOAD : accept 64 inputs (s_ready high), stored at bit-reversed addresses.
//   CALC : 6 stages x 32 butterflies, one butterfly per clock (192 clocks).
//          Each butterfly computes (a + w*b)/2 and (a - w*b)/2 with rounding
//          and saturation to the 16-bit format; w = exp(+j*2*pi*t/64).
//   OUT  : 80 outputs with m_valid high; a sample is held while m_ready is
//          low.
// No input is accepted during CALC and OUT, so the core inserts gaps at its
// input, as the streaming core with cyclic prefix does (there, a gap of the
// prefix length). Downstream the chain consumes one sample per 100 clocks, so
// this engine is far faster than needed.
//
// Timing: first output 192 clocks after the 64th input is accepted;
// the inverse direction, the cyclic-prefix length and the scaling are fixed
// by parameters rather than by a run-time configuration channel (this
// design's simplification).
module ifft64_cp
  import ofdm_pkg::*;
#(
  parameter int unsigned CP = CP_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  // frequency-domain input
  input  logic       s_valid,
  output logic       s_ready,
  input  cplx_t      s_data,
  // time-domain output
  output logic       m_valid,
  input  logic       m_ready,
  output cplx_t      m_data,
  output logic [5:0] xk_index,
  output logic       m_last       // last sample of a symbol
);

  localparam int unsigned N      = 64;
  localparam int unsigned OUT_N  = N + CP;
  localparam int          TW_ONE = 32767;   // 1.0 is not representable

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  state_t state;

  cplx_t      ram [N];
  logic [5:0] in_cnt;
  logic [2:0] stage;       // 0..5
  logic [4:0] bfly;        // 0..31
  logic [6:0] out_cnt;     // 0..OUT_N-1

  // ---------------- twiddle table: exp(+j*2*pi*t/64), t = 0..31 ----------
  function automatic int tw_cos(int t);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * t / 64.0) * 32768.0;
    if (v >= 32767.0) return TW_ONE;
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic int tw_sin(int t);
    real v;
    v = $sin(2.0 * 3.14159265358979323846 * t / 64.0) * 32768.0;
    if (v >= 32767.0) return TW_ONE;
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  fix16_t tw_re [32];
  fix16_t tw_im [32];
  for (genvar t = 0; t < 32; t++) begin : g_tw
    localparam int C = tw_cos(t);
    localparam int S = tw_sin(t);
    assign tw_re[t] = 16'(C);
    assign tw_im[t] = 16'(S);
  end

  function automatic logic [5:0] bitrev6(input logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

  // round a Q30+1 value (sum of a<<15 and a Q30 product) to Q15 and halve,
  // then saturate to 16 bits
  function automatic fix16_t half_sat(input logic signed [33:0] v);
    logic signed [33:0] r;
    r = (v + 34'sd32768) >>> 16;
    if (r > 34'sd32767)       return 16'sh7FFF;
    else if (r < -34'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

  // ---------------- butterfly ----------------
  logic [5:0] idx_a, idx_b;
  logic [4:0] tw_idx;
  logic [5:0] span, b6, pos;
  cplx_t      a, b, ya, yb;
  fix16_t     wr, wi;
  logic signed [32:0] prod_re, prod_im;   // w*b in Q30
  logic signed [33:0] a_re_q30, a_im_q30;

  always_comb begin
    span   = 6'd1 << stage;
    b6     = {1'b0, bfly};
    pos    = b6 & (span - 6'd1);                 // position inside a group
    idx_a  = ((b6 >> stage) << (stage + 3'd1)) | pos;
    idx_b  = idx_a + span;
    tw_idx = 5'(pos << (3'd5 - stage));
    a      = ram[idx_a];
    b      = ram[idx_b];
    wr     = tw_re[tw_idx];
    wi     = tw_im[tw_idx];
    prod_re  = 33'(wr * b.re) - 33'(wi * b.im);
    prod_im  = 33'(wr * b.im) + 33'(wi * b.re);
    a_re_q30 = 34'(a.re) <<< 15;
    a_im_q30 = 34'(a.im) <<< 15;
    ya.re  = half_sat(a_re_q30 + 34'(prod_re));
    ya.im  = half_sat(a_im_q30 + 34'(prod_im));
    yb.re  = half_sat(a_re_q30 - 34'(prod_re));
    yb.im  = half_sat(a_im_q30 - 34'(prod_im));
  end

  // ---------------- output indexing ----------------
  logic [5:0] out_idx;
  assign out_idx  = (out_cnt < 7'(CP)) ? 6'(N - CP + out_cnt) : 6'(out_cnt - 7'(CP));
  assign xk_index = out_idx;
  assign m_data   = ram[out_idx];
  assign m_valid  = (state == S_OUT);
  assign m_last   = (state == S_OUT) && (out_cnt == 7'(OUT_N - 1));
  assign s_ready  = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && s_valid) ram[bitrev6(in_cnt)] <= s_data;
    else if (state == S_CALC) begin
      ram[idx_a] <= ya;
      ram[idx_b] <= yb;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      in_cnt  <= '0;
      stage   <= '0;
      bfly    <= '0;
      out_cnt <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (s_valid) begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == 6'd63) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == 5'd31) begin
            if (stage == 3'd5) begin
              state   <= S_OUT;
              out_cnt <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: if (m_ready) begin
          if (out_cnt == 7'(OUT_N - 1)) state <= S_LOAD;
          else out_cnt <= out_cnt + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // An output sample must stay put while the consumer is not ready.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
