// ofdm_chain_monitor: end-to-end checker for the OFDM / sigma-delta chain,
// shared by the generator-level and top-level testbenches. It watches
// internal points of the signal-processing clock domain and checks:
//  1. The up-converter output, demodulated by the testbench: for baseband
//     sample s the interpolated signal is centred on output m = 100*s + 2530
//     (filter delay); there the mixer phase is 2 (y = -I) and at m+1 it is 3
//     (y = Q). After removing the 16-sample cyclic prefix, a 64-point DFT of
//     each OFDM symbol must give, per subcarrier, the symbol expected from
//     the PRBS-15 sequence (seed 7FFF, first bit to I): for QPSK the signs
//     of a bit pair; for 16-QAM (input `qam16`) the signs and the inner or
//     outer level of a group of four bits, the decision threshold lying
//     half-way between the levels after the filter's gain at that
//     subcarrier. Pilots must be positive at 15/25/39/49
//     and the null at 0 near zero.
//  2. The sigma-delta bits equal a model of the loop fed with the recorded
//     up-converter samples.
//  3. The played-back words equal the recorded bits, first bit in bit 0,
//     repeating with period MEM_DEPTH.
//  4. The IFFT output index runs 48..63, 0..63 per symbol.
//  5. The data signs can also be recovered from the sigma-delta bit stream
//     alone (mixed down and boxcar-filtered over 100 bits per sample), with
//     a symbol error rate below 1e-3.
// It counts how often each mechanism happened (mapper paused by the clock-
// crossing FIFO, IFFT output held by back-pressure, cyclic-prefix samples,
// pilot and null insertions, filter input reads, capture-to-playback switch,
// playback wrap) and counts a failure for any that never happened. `finish`
// runs the final checks once and sets `done`.
module ofdm_chain_monitor #(
  parameter int unsigned MEM_DEPTH = 450000,
  parameter int unsigned WORD_W    = 16
) (
  input logic              clk,
  input logic              rst_n,
  input logic              qam16,
  input logic              map_pause,
  input logic              ifft_valid,
  input logic              ifft_ready,
  input logic [5:0]        ifft_index,
  input logic              alloc_push,
  input logic [5:0]        alloc_index,
  input logic              fir_read,
  input logic              duc_valid,
  input logic signed [15:0] duc_data,
  input logic              duc_underflow,
  input logic              sdm_valid,
  input logic              sdm_bit,
  input logic              mem_full,
  input logic              mem_wrap,
  input logic              tx_valid,
  input logic [WORD_W-1:0] tx_data
);
  import ofdm_pkg::*;

  int checks = 0, failures = 0;
  int n_pause = 0, n_ifft_stall = 0, n_cp = 0, n_pilot = 0, n_null = 0;
  int n_fir_read = 0, n_switch = 0, n_wrap = 0, n_underflow = 0;
  int n_frames = 0, n_played = 0;
  int n_bit_err = 0, n_bit_sym = 0, n_bit_frames = 0, duc_peak = 0;
  bit done = 0;

  int duc_q [$];
  bit sdm_q [$];
  int ifft_pos = 0;
  int w1 = 0, w2 = 0, d1 = 0, d2 = 0;
  bit full_q = 0;

  always @(posedge clk) if (rst_n && !done) begin
    if (map_pause) n_pause++;
    if (ifft_valid && !ifft_ready) n_ifft_stall++;
    if (ifft_valid && ifft_ready) begin
      int exp_idx;
      exp_idx = (ifft_pos < 16) ? 48 + ifft_pos : ifft_pos - 16;
      checks++;
      if (ifft_index != 6'(exp_idx)) failures++;
      if (ifft_pos < 16) n_cp++;
      ifft_pos = (ifft_pos == 79) ? 0 : ifft_pos + 1;
    end
    if (alloc_push && is_pilot(alloc_index)) n_pilot++;
    if (alloc_push && alloc_index == 0) n_null++;
    if (fir_read) n_fir_read++;
    if (duc_underflow) n_underflow++;
    if (duc_valid && !mem_full) begin
      duc_q.push_back(int'(duc_data));
      if (int'(duc_data) > duc_peak) duc_peak = int'(duc_data);
      if (-int'(duc_data) > duc_peak) duc_peak = -int'(duc_data);
    end
    // sigma-delta model: the modulator sees the sample present this clock
    if (sdm_valid && !full_q) sdm_q.push_back(sdm_bit);
    if (mem_full && !full_q) n_switch++;
    full_q <= mem_full;
    if (mem_wrap) n_wrap++;
    if (tx_valid) begin
      logic [WORD_W-1:0] exp_w;
      int base;
      base = (n_played % MEM_DEPTH) * WORD_W;
      for (int b = 0; b < WORD_W; b++) exp_w[b] = sdm_q[base + b];
      checks++;
      if (tx_data != exp_w) begin
        failures++;
        if (failures < 5) $display("playback word %0d: got %h exp %h", n_played, tx_data, exp_w);
      end
      n_played++;
    end
  end

  // PRBS-15 symbol k of the mapper: (bit 2k, bit 2k+1)
  bit prbs [$];
  function automatic void prbs_extend(int n);
    if (prbs.size() == 0) for (int i = 0; i < 15; i++) prbs.push_back(1'b1);
    while (prbs.size() < n) prbs.push_back(prbs[prbs.size()-15] ^ prbs[prbs.size()-14]);
  endfunction

  task automatic finish();
    int n_bits, frames, bad_sign, worst_null;
    real pi, ct [64], st [64], gain [64];
    pi = 3.14159265358979323846;
    for (int i = 0; i < 64; i++) begin
      ct[i] = $cos(2.0 * pi * i / 64.0);
      st[i] = $sin(2.0 * pi * i / 64.0);
    end
    // Per-subcarrier gain of the interpolation filter as seen by this
    // demodulator: sampling the output at 100*s + 2530 leaves polyphase
    // branch 30 (taps 100*j + 30, centred at j = 25) acting on the baseband
    // samples. 16-QAM decisions scale their threshold by it, as a receiver's
    // equalizer would; subcarriers near 32 sit on the filter's band edge.
    begin
      real g0;
      g0 = 0;
      for (int j = 0; j < 51; j++) g0 += fir_ref_pkg::tap(100 * j + 30);
      for (int k = 0; k < 64; k++) begin
        real g;
        g = 0;
        for (int j = 0; j < 51; j++)
          g += fir_ref_pkg::tap(100 * j + 30) * $cos(2.0 * pi * k * (j - 25) / 64.0);
        gain[k] = g / g0;
      end
    end
    // 2. sigma-delta model over the recorded up-converter samples
    n_bits = sdm_q.size();
    if (n_bits > duc_q.size()) n_bits = duc_q.size();
    for (int n = 0; n < n_bits; n++) begin
      int w, d;
      w = duc_q[n] + d2 - w2;
      d = (w < 0) ? -98 : 98;
      w2 = w1; w1 = w; d2 = d1; d1 = d;
      if (sdm_q[n] != (w < 0)) begin
        failures++;
        if (failures < 5) $display("sdm bit %0d differs", n);
        break;
      end
    end
    checks++;
    // 1. demodulate and decode whole OFDM symbols
    frames = (duc_q.size() - 2532) / 8000;
    prbs_extend(frames * 256 + 16);
    bad_sign = 0; worst_null = 0;
    for (int f = 0; f < frames; f++) begin
      real xr [64], xi [64];
      for (int n = 0; n < 64; n++) begin
        int m;
        m = (f * 80 + 16 + n) * 100 + 2530;
        xr[n] = -duc_q[m];
        xi[n] = duc_q[m + 1];
      end
      for (int k = 0; k < 64; k++) begin
        real Xr, Xi;
        Xr = 0; Xi = 0;
        for (int n = 0; n < 64; n++) begin
          int t;
          t = (k * n) % 64;
          Xr += xr[n] * ct[t] + xi[n] * st[t];
          Xi += xi[n] * ct[t] - xr[n] * st[t];
        end
        checks++;
        if (k == 0) begin
          int mag;
          mag = $rtoi((Xr < 0 ? -Xr : Xr) + (Xi < 0 ? -Xi : Xi));
          if (mag > worst_null) worst_null = mag;
          if (mag > 60) failures++;
        end else if (is_pilot(6'(k))) begin
          if (Xr < 100 || Xi < 100) begin
            failures++;
            if (failures < 8) $display("frame %0d pilot %0d: %f %f", f, k, Xr, Xi);
          end
        end else begin
          int sym;
          bit ok;
          sym = f * 64 + k;
          // a full-scale value on one axis decodes to about 327.67 here
          // (IFFT 1/64, up-converter 1/100, DFT gain 64)
          if (qam16)
            ok = (Xr > 0) == prbs[4*sym]   && ((Xr < 0 ? -Xr : Xr) < 207.2 * gain[k]) == prbs[4*sym+1] &&
                 (Xi > 0) == prbs[4*sym+2] && ((Xi < 0 ? -Xi : Xi) < 207.2 * gain[k]) == prbs[4*sym+3];
          else
            ok = (Xr > 0) == prbs[2*sym] && (Xi > 0) == prbs[2*sym+1];
          if (!ok) begin
            bad_sign++;
            failures++;
            if (failures < 8) $display("frame %0d subcarrier %0d: %f %f", f, k, Xr, Xi);
          end
        end
      end
    end
    // 5. the same symbols decoded from the sigma-delta bits themselves: each
    //    bit is +-1 (1 = negative); per baseband sample the 100 bits around
    //    its centre are mixed down (phases -I, Q, I, -Q from the centre) and
    //    summed, a boxcar low-pass that also averages away the noise the
    //    modulator has pushed to either side of the carrier. Only the signs
    //    are compared; the symbol error rate must stay below 1e-3.
    begin
      int nb;
      nb = (sdm_q.size() - 2600) / 8000;
      for (int f = 0; f < nb; f++) begin
        real br [64], bi [64];
        for (int n = 0; n < 64; n++) begin
          int m;
          m = (f * 80 + 16 + n) * 100 + 2530;
          br[n] = 0; bi[n] = 0;
          for (int j = -48; j < 52; j++) begin
            real v;
            v = sdm_q[m + j] ? -1.0 : 1.0;
            case ((j + 48) % 4)
              0: br[n] -= v;
              1: bi[n] += v;
              2: br[n] += v;
              default: bi[n] -= v;
            endcase
          end
        end
        for (int k = 1; k < 64; k++) if (!is_pilot(6'(k))) begin
          real Xr, Xi;
          int sym;
          bit er, ei;
          Xr = 0; Xi = 0;
          for (int n = 0; n < 64; n++) begin
            int t;
            t = (k * n) % 64;
            Xr += br[n] * ct[t] + bi[n] * st[t];
            Xi += bi[n] * ct[t] - br[n] * st[t];
          end
          sym = f * 64 + k;
          er = qam16 ? prbs[4*sym]   : prbs[2*sym];
          ei = qam16 ? prbs[4*sym+2] : prbs[2*sym+1];
          n_bit_sym++;
          if ((Xr > 0) != er || (Xi > 0) != ei) n_bit_err++;
        end
      end
      n_bit_frames = nb;
      // this crude receiver is no match for a proper band-pass filter, so
      // allow a symbol error rate of up to 1e-3
      checks++;
      if (n_bit_sym == 0 || n_bit_err * 1000 > n_bit_sym) failures++;
    end
    n_frames = frames;
    // mechanisms
    checks++;
    if (n_pause == 0 || n_ifft_stall == 0 || n_cp == 0 || n_pilot == 0 || n_null == 0 ||
        n_fir_read == 0 || n_switch != 1 || n_wrap == 0 || frames == 0 || n_played == 0)
      failures++;
    checks++;
    if (n_underflow != 0) failures++;
    $display("%s: decoded %0d OFDM symbols, symbol errors %0d, worst null %0d", qam16 ? "16-QAM" : "QPSK", frames, bad_sign, worst_null);
    $display("  from the sigma-delta bits: %0d OFDM symbols, sign errors %0d of %0d; up-converter peak %0d (DAC level 98)",
             n_bit_frames, n_bit_err, n_bit_sym, duc_peak);
    $display("events: mapper pauses %0d, IFFT output stalls %0d, CP samples %0d, pilots %0d, nulls %0d",
             n_pause, n_ifft_stall, n_cp, n_pilot, n_null);
    $display("events: filter reads %0d, capture->playback %0d, playback wraps %0d, words played %0d, underflows %0d",
             n_fir_read, n_switch, n_wrap, n_played, n_underflow);
    done = 1;
  endtask

endmodule
