// interp_fir: interpolate-by-L low-pass FIR filter (L = 100, order 5060).
//
// What it does: every L clocks it takes one input sample (s_ready is high for
// one clock in L) and every clock it delivers one output sample, so the
// output rate is L times the input rate. The result equals inserting L-1
// zeros after each input and filtering with a 5061-tap low-pass h[n] whose
// pass band ends at 0.01 and stop band starts at 0.011 (frequencies
// normalized to the Nyquist rate of the output), removing the L-1 spectral
// images.
//
// How: the filter is split into L polyphase branches of ceil(5061/L) = 51
// taps. A 51-deep history holds the latest inputs, x_hist[0] being the
// newest. On output phase p (0..L-1 after each new input) the filter forms
//     y = sum_j h[j*L + p] * x_hist[j]
// with 51 multipliers in parallel and registers the rounded sum. The earlier
// design used a vendor FIR core with a systolic multiply-accumulate chain; a
// polyphase dot product gives the same output sequence and is this design's
// own structure.
//
// Coefficients: the original taps came from an equiripple design tool and are
// not available, so h[n] is computed at elaboration time as a
// Kaiser-windowed sinc with the same order, a cut-off midway between the two
// band edges and beta = 0.1102*(80-8.7) for 80 dB stop-band attenuation:
//     h[n] = fc * sinc(fc * (n - ORDER/2)) * I0(beta*sqrt(1-r^2)) / I0(beta),
//     r = 2n/ORDER - 1,  fc = (F_PASS + F_STOP)/2,  sinc(u) = sin(pi u)/(pi u),
// stored as COEF_W-bit signed integers with COEF_FRAC fraction bits. The DC
// gain of the zero-stuffed filter is 1, so the output is about 1/L of the
// input amplitude.
//
// Flow control: the filter starts with the first input it accepts. After
// that it needs a new input every L clocks; if none is offered then, a zero
// is taken instead and `underflow` pulses for one clock.
//
// Timing: the output for phase 0 of an input appears one clock after that
// input was accepted; m_valid then stays high every clock.
module interp_fir
  import ofdm_pkg::*;
#(
  parameter int unsigned L         = 100,
  parameter int unsigned ORDER     = 5060,
  parameter int unsigned COEF_W    = 18,
  parameter int unsigned COEF_FRAC = 23,
  parameter real         F_PASS    = 0.01,
  parameter real         F_STOP    = 0.011,
  parameter real         ATTEN_DB  = 80.0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  output logic   s_ready,
  input  fix16_t s_data,
  output logic   m_valid,
  output fix16_t m_data,
  output logic   underflow
);

  localparam int unsigned TAPS  = ORDER + 1;
  localparam int unsigned TPP   = (TAPS + L - 1) / L;          // taps per phase
  localparam int unsigned PH_W  = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned ACC_W = 16 + COEF_W + $clog2(TPP) + 1;

  // ---------------- coefficient design ----------------
  function automatic real bessel_i0(real x);
    real term, sum;
    sum  = 1.0;
    term = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic int coef_at(int n);
    real pi, fc, beta, m, r, s, w, h, scaled;
    if (n >= int'(TAPS)) return 0;
    pi   = 3.14159265358979323846;
    fc   = (F_PASS + F_STOP) / 2.0;
    beta = (ATTEN_DB > 50.0) ? 0.1102 * (ATTEN_DB - 8.7) : 0.0;
    m    = n - ORDER / 2.0;
    s    = (m == 0.0) ? 1.0 : $sin(pi * fc * m) / (pi * fc * m);
    r    = 2.0 * n / ORDER - 1.0;
    w    = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
    h    = fc * s * w;
    scaled = h * (2.0 ** COEF_FRAC);
    return $rtoi(scaled + ((scaled >= 0.0) ? 0.5 : -0.5));
  endfunction

  logic signed [COEF_W-1:0] coef [L][TPP];
  for (genvar p = 0; p < int'(L); p++) begin : g_ph
    for (genvar j = 0; j < int'(TPP); j++) begin : g_tap
      localparam int C = coef_at(j * int'(L) + p);
      assign coef[p][j] = COEF_W'(C);
    end
  end

  // ---------------- datapath ----------------
  fix16_t            x_hist [TPP];
  logic [PH_W-1:0]   ph;
  logic              running;
  logic              take;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rnd;

  assign s_ready = !running || (ph == PH_W'(L - 1));
  assign take    = s_ready && (s_valid || running);

  always_comb begin
    acc = '0;
    for (int j = 0; j < int'(TPP); j++)
      acc += ACC_W'(x_hist[j] * coef[ph][j]);
    rnd = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(TPP); j++) x_hist[j] <= '0;
      ph        <= '0;
      running   <= 1'b0;
      m_valid   <= 1'b0;
      m_data    <= '0;
      underflow <= 1'b0;
    end else begin
      underflow <= 1'b0;
      if (take) begin
        x_hist[0] <= s_valid ? s_data : '0;
        for (int j = 1; j < int'(TPP); j++) x_hist[j] <= x_hist[j-1];
        ph        <= '0;
        running   <= 1'b1;
        underflow <= running && !s_valid;
      end else if (running) begin
        ph <= ph + 1'b1;
      end
      if (running) begin
        m_valid <= 1'b1;
        if (rnd > ACC_W'(32767))       m_data <= 16'sh7FFF;
        else if (rnd < -ACC_W'(32768)) m_data <= 16'sh8000;
        else                           m_data <= rnd[15:0];
      end
    end
  end

endmodule
