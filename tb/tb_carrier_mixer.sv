// tb_carrier_mixer: random I/Q with random valid gaps; checks the output
// sequence I, -Q, -I, Q (counter advancing only on valid samples), the
// saturating negation of -32768, and the one-clock latency.
module tb_carrier_mixer;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_valid = 0, m_valid;
  fix16_t s_i = 0, s_q = 0, m_data;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  carrier_mixer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int negs(int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  initial begin
    int n, exp_v;
    bit due;
    n = 0; due = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      checks++;
      if (m_valid !== due) failures++;
      if (due && (m_data != fix16_t'(exp_v) || phase != 2'((n - 1) % 4))) begin
        failures++;
        if (failures < 5) $display("n=%0d got %0d exp %0d", n, m_data, exp_v);
      end
      s_valid = $urandom_range(0, 3) != 0;
      s_i = (i % 97 == 0) ? -16'sd32768 : fix16_t'($urandom);
      s_q = (i % 89 == 0) ? -16'sd32768 : fix16_t'($urandom);
      due = s_valid;
      if (s_valid) begin
        case (n % 4)
          0: exp_v = s_i;
          1: exp_v = negs(s_q);
          2: exp_v = negs(s_i);
          default: exp_v = s_q;
        endcase
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
