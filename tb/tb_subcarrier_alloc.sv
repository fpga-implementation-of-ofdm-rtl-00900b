// tb_subcarrier_alloc: pushes four 64-pair frames of random QPSK symbols
// with random input gaps and random back-pressure on the output, and checks
// every output against the allocation rule: index 0 -> 0, indices 15, 25, 39,
// 49 -> 32767 + j32767, others -> the input pair of that index.
module tb_subcarrier_alloc;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, m_ready = 0;
  cplx_t s_data = '0, m_data;
  logic [5:0] sc_index;
  int checks = 0, failures = 0, stalls = 0, pilots = 0, nulls = 0;
  cplx_t exp_q [$];

  subcarrier_alloc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    int k;
    k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (k < 256) begin
      @(negedge clk);
      s_valid = $urandom_range(0, 3) != 0;
      s_data.re = $urandom_range(0, 1) ? QPSK_POS : QPSK_NEG;
      s_data.im = $urandom_range(0, 1) ? QPSK_POS : QPSK_NEG;
      @(posedge clk);
      if (s_valid && s_ready) begin
        if (k % 64 == 0)                 exp_q.push_back('{re: 0, im: 0});
        else if (is_pilot(6'(k % 64)))   exp_q.push_back('{re: PILOT_VAL, im: PILOT_VAL});
        else                             exp_q.push_back(s_data);
        k++;
      end else if (s_valid) stalls++;
    end
    @(negedge clk) s_valid = 0;
  end

  // sink
  initial begin
    int n;
    n = 0;
    wait (rst_n);
    while (n < 256) begin
      @(negedge clk);
      m_ready = $urandom_range(0, 99) < ((n / 32) % 2 ? 90 : 20);
      @(posedge clk);
      if (m_valid && m_ready) begin
        checks++;
        if (exp_q.size() == 0 || m_data != exp_q[0]) begin
          failures++;
          if (failures < 5) $display("out %0d: got %0d,%0d", n, m_data.re, m_data.im);
        end else void'(exp_q.pop_front());
        if (n % 64 == 0) nulls++;
        if (is_pilot(6'(n % 64))) pilots++;
        n++;
      end
    end
    checks++;
    if (stalls == 0 || pilots != 16 || nulls != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
