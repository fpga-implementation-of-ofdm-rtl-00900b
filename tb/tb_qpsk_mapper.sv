// tb_qpsk_mapper: sends random bits with random gaps and checks each output
// symbol against the Gray table 11->(+,+) 01->(-,+) 00->(-,-) 10->(+,-) with
// levels +-23170, the first bit of each pair being the MSB (I). Also checks
// that a symbol appears exactly one clock after its second bit.
module tb_qpsk_mapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_data = 0, s_valid = 0, m_valid;
  cplx_t m_data;
  int checks = 0, failures = 0;

  qpsk_mapper dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit first, have, exp_due;
    int exp_re, exp_im;
    have = 0; exp_due = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // check the output of the previous edge
      checks++;
      if (m_valid !== exp_due) failures++;
      if (exp_due && (m_data.re != exp_re || m_data.im != exp_im)) begin
        failures++;
        if (failures < 5) $display("sym: got %0d,%0d exp %0d,%0d", m_data.re, m_data.im, exp_re, exp_im);
      end
      exp_due = 0;
      s_valid = $urandom_range(0, 3) != 0;
      s_data  = $urandom_range(0, 1);
      if (s_valid) begin
        if (!have) begin first = s_data; have = 1; end
        else begin
          have = 0; exp_due = 1;
          exp_re = first  ? 23170 : -23170;
          exp_im = s_data ? 23170 : -23170;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
