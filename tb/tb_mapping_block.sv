// tb_mapping_block: runs the source and mapper together with random pauses,
// first in QPSK mode and then, after a reset, in 16-QAM mode. It checks that
// the symbols follow the PRBS-15 bit sequence (default seed, first bit to
// I): pairs of bits per QPSK symbol, groups of four per 16-QAM symbol (sign
// then inner/outer per axis), and that no symbol is produced more than two
// clocks after a pause begins.
module tb_mapping_block;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, space_ok = 0, m_valid, qam16 = 0;
  cplx_t m_data;
  int checks = 0, failures = 0;
  bit seq [$];

  mapping_block dut (.*);
  always #5 clk = ~clk;

  function automatic fix16_t lvl(bit s, bit inner);
    real v;
    v = (inner ? 1.0 : 3.0) / $sqrt(10.0);
    return fix16_t'($rtoi(v * 32768.0)) * (s ? 16'sd1 : -16'sd1);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit mode, int nsym);
    int n, off_for;
    qam16 = mode;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0; off_for = 0;
    while (n < nsym) begin
      @(negedge clk);
      if (m_valid) begin
        fix16_t er, ei;
        if (mode) begin
          er = lvl(seq[4*n], seq[4*n+1]);
          ei = lvl(seq[4*n+2], seq[4*n+3]);
        end else begin
          er = seq[2*n]   ? 16'sd23170 : -16'sd23170;
          ei = seq[2*n+1] ? 16'sd23170 : -16'sd23170;
        end
        checks++;
        if (m_data.re != er || m_data.im != ei) begin
          failures++;
          if (failures < 5) $display("mode %0d symbol %0d: %0d %0d exp %0d %0d",
                                     mode, n, m_data.re, m_data.im, er, ei);
        end
        if (off_for > 3) failures++;
        n++;
      end
      space_ok = ($urandom_range(0, 7) != 0);
      off_for  = space_ok ? 0 : off_for + 1;
    end
  endtask

  initial begin
    for (int i = 0; i < 15; i++) seq.push_back(1'b1);        // seed 7FFF
    for (int i = 15; i < 100000; i++) seq.push_back(seq[i-15] ^ seq[i-14]);
    run(1'b0, 30000);
    run(1'b1, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
