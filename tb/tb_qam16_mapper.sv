// tb_qam16_mapper: feeds random bits with random gaps into the 16-QAM mapper
// and checks every symbol against levels computed here from 1/sqrt(10) and
// 3/sqrt(10): per group of four bits, the first two give I (sign, then 1 =
// inner level) and the last two give Q. Also checks that a symbol appears
// exactly one clock after its fourth bit and at no other time.
module tb_qam16_mapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, s_data = 0, s_valid = 0, m_valid;
  cplx_t m_data;
  int checks = 0, failures = 0;

  qam16_mapper dut (.*);
  always #5 clk = ~clk;

  function automatic fix16_t lvl(bit s, bit inner);
    real v;
    v = (inner ? 1.0 : 3.0) / $sqrt(10.0);
    return fix16_t'($rtoi(v * 32768.0)) * (s ? 16'sd1 : -16'sd1);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [3:0] grp;
    int nb;
    bit due;
    cplx_t exp_d;
    int hist [16];
    repeat (3) @(posedge clk);
    rst_n = 1;
    nb = 0; due = 0;
    for (int cyc = 0; cyc < 80000; cyc++) begin
      @(negedge clk);
      // output check for the bit accepted at the previous edge
      checks++;
      if (m_valid != due) failures++;
      if (due) begin
        checks++;
        if (m_data != exp_d) begin
          failures++;
          if (failures < 5) $display("symbol %b: got %0d %0d exp %0d %0d", grp,
                                     m_data.re, m_data.im, exp_d.re, exp_d.im);
        end
      end
      due = 0;
      s_valid = ($urandom_range(0, 3) != 0);
      s_data  = 1'($urandom);
      if (s_valid) begin
        grp = {grp[2:0], s_data};
        nb++;
        if (nb == 4) begin
          nb = 0;
          due = 1;
          hist[grp]++;
          exp_d.re = lvl(grp[3], grp[2]);
          exp_d.im = lvl(grp[1], grp[0]);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (m_valid != due) failures++;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (hist[i] == 0) failures++;     // every constellation point seen
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
