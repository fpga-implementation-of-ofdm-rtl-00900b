// fir_ref_pkg: reference model of the interpolation filter's taps for the
// testbenches: a Kaiser-windowed sinc of order 5060, cut-off 0.0105 of the
// Nyquist rate, beta for 80 dB, quantized to 23 fraction bits.
package fir_ref_pkg;

  localparam int ORDER = 5060;

  function automatic real i0(real x);
    real s, t;
    s = 1.0; t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x * x) / (4.0 * k * k);
      s += t;
    end
    return s;
  endfunction

  // quantized tap n (0..ORDER), zero outside
  function automatic int tap(int n);
    real pi, fc, beta, m, h, r;
    if (n < 0 || n > ORDER) return 0;
    pi = 3.14159265358979323846;
    fc = 0.0105;
    beta = 0.1102 * (80.0 - 8.7);
    m = n - ORDER / 2.0;
    h = (m == 0.0) ? fc : $sin(pi * fc * m) / (pi * m);
    r = (2.0 * n - ORDER) / ORDER;
    h = h * i0(beta * $sqrt(1.0 - r * r)) / i0(beta);
    return $rtoi(h * 8388608.0 + (h >= 0 ? 0.5 : -0.5));
  endfunction

endpackage
