// tb_ifft64_cp: feeds frames of random complex values (QPSK-like levels plus
// some random full-scale values) and compares the 80 outputs of each frame
// with a floating-point IDFT, x[n] = (1/64) sum X[k] exp(+j2pi kn/64), taken
// in the order 48..63, 0..63. Checks xk_index, m_last, a tolerance of 6 LSB,
// the 192-clock compute latency, and that outputs hold while m_ready is low.
module tb_ifft64_cp;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, m_ready = 0, m_last;
  cplx_t s_data = '0, m_data;
  logic [5:0] xk_index;
  int checks = 0, failures = 0, stalls_seen = 0, maxerr = 0;
  real xr [64], xi [64];
  int  last_in_cycle, first_out_cycle, cyc = 0;

  ifft64_cp dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;   // read after an edge: edges before it

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi;
    pi = 3.14159265358979323846;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      real Xr [64], Xi [64];
      for (int k = 0; k < 64; k++) begin
        if (f % 2) begin
          Xr[k] = $itor($signed($urandom_range(0, 46340)) - 23170);
          Xi[k] = $itor($signed($urandom_range(0, 46340)) - 23170);
        end else begin
          Xr[k] = $urandom_range(0, 1) ? 23170.0 : -23170.0;
          Xi[k] = $urandom_range(0, 1) ? 23170.0 : -23170.0;
        end
      end
      if (f == 0) begin Xr[0] = 0; Xi[0] = 0; Xr[15] = 32767; Xi[15] = 32767; end
      for (int n = 0; n < 64; n++) begin
        xr[n] = 0; xi[n] = 0;
        for (int k = 0; k < 64; k++) begin
          real c, s;
          c = $cos(2.0 * pi * k * n / 64.0);
          s = $sin(2.0 * pi * k * n / 64.0);
          xr[n] += (Xr[k] * c - Xi[k] * s) / 64.0;
          xi[n] += (Xr[k] * s + Xi[k] * c) / 64.0;
        end
      end
      // load with random gaps
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
        s_valid = 1;
        s_data.re = 16'($rtoi(Xr[k]));
        s_data.im = 16'($rtoi(Xi[k]));
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        last_in_cycle = cyc + 1;               // index of the accepting edge
      end
      @(negedge clk) s_valid = 0;
      // unload with random back-pressure
      first_out_cycle = -1;
      for (int o = 0; o < 80; ) begin
        @(negedge clk);
        m_ready = $urandom_range(0, 2) != 0;
        if (m_valid && first_out_cycle < 0) begin
          first_out_cycle = cyc;
          checks++;
          if (first_out_cycle - last_in_cycle != 192) begin
            failures++;
            $display("latency %0d", first_out_cycle - last_in_cycle);
          end
        end
        if (m_valid && m_ready) begin
          int n, er, ei;
          n = (o < 16) ? 48 + o : o - 16;
          er = $rtoi(xr[n] - $itor(m_data.re)); if (er < 0) er = -er;
          ei = $rtoi(xi[n] - $itor(m_data.im)); if (ei < 0) ei = -ei;
          if (er > maxerr) maxerr = er;
          if (ei > maxerr) maxerr = ei;
          checks++;
          if (xk_index != 6'(n) || er > 6 || ei > 6 || m_last != (o == 79)) begin
            failures++;
            if (failures < 6) $display("frame %0d out %0d idx %0d: got %0d,%0d exp %f,%f",
                                       f, o, xk_index, m_data.re, m_data.im, xr[n], xi[n]);
          end
          o++;
        end else if (m_valid) stalls_seen++;
        @(posedge clk);
      end
      @(negedge clk) m_ready = 0;
    end
    checks++;
    if (stalls_seen == 0) failures++;
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
