// tb_duc: the complex up-converter at full size (L = 100, order 5060).
//  - A constant complex input I = 10000, Q = -6000 is offered continuously.
//    The FIFO fills (back-pressure: s_ready low), one sample leaves every 100
//    clocks, and the settled output must repeat I/100, -Q/100, -I/100, Q/100
//    = 100, 60, -100, -60 (+-3).
//  - m_valid stays high once started.
//  - Then the input stops; once the FIFO has drained, `underflow` pulses.
module tb_duc;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, underflow;
  cplx_t s_data = '0;
  fix16_t m_data;
  int checks = 0, failures = 0, pops = 0, backpressure = 0, uf = 0;

  duc dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (s_valid && !s_ready) backpressure++;
    if (underflow) uf++;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, expv [4];
    expv = '{100, 60, -100, -60};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s_valid = 1; s_data = '{re: 16'sd10000, im: -16'sd6000};
    repeat (6000) @(negedge clk);
    // find the phase: the mixer counter is 0 on the first output sample
    ph = -1;
    for (int m = 0; m < 400; m++) begin
      @(negedge clk);
      if (ph < 0 && m_data > 90) ph = 0;
      if (ph >= 0) begin
        int e;
        e = m_data - expv[ph % 4]; if (e < 0) e = -e;
        checks++;
        if (e > 3 || !m_valid) begin
          failures++;
          if (failures < 6) $display("m=%0d got %0d exp %0d", m, m_data, expv[ph % 4]);
        end
        ph++;
      end
    end
    checks++;
    if (backpressure == 0) failures++;
    // starve it
    s_valid = 0;
    repeat (2500) @(negedge clk);
    checks++;
    if (uf == 0 || !m_valid) failures++;
    $display("backpressure cycles %0d, underflow pulses %0d", backpressure, uf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
