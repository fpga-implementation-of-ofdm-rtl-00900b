// tb_signal_processing: drives the single-clock signal-processing chain
// directly with the QPSK symbols of the PRBS-15 sequence (seed 7FFF, pairs,
// first bit to I), offered with random gaps, and a bitstream memory cut to
// 2500 words. ofdm_chain_monitor decodes the OFDM symbols from the
// up-converter output and checks the sigma-delta bits and the playback;
// here the "mapper pause" it counts is the chain refusing an offered symbol.
module tb_signal_processing;
  import ofdm_pkg::*;
  localparam int DEPTH = 2500;
  logic clk = 0, rst_n = 1, s_valid = 0, s_ready;
  cplx_t s_data = '0;
  logic [15:0] tx_data;
  logic tx_valid, duc_active, duc_underflow, sdm_bit, mem_full, mem_wrap;
  int wraps = 0;
  bit prbs [$];

  signal_processing #(.MEM_DEPTH(DEPTH)) dut (.*);
  always #8 clk = ~clk;
  always @(posedge clk) if (rst_n && mem_wrap) wraps++;

  ofdm_chain_monitor #(.MEM_DEPTH(DEPTH)) mon (
    .clk           (clk),
    .rst_n         (rst_n),
    .qam16         (1'b0),
    .map_pause     (s_valid && !s_ready),
    .ifft_valid    (dut.f_valid),
    .ifft_ready    (dut.f_ready),
    .ifft_index    (dut.xk_index),
    .alloc_push    (dut.u_alloc.push),
    .alloc_index   (dut.u_alloc.cnt),
    .fir_read      (dut.u_duc.f_valid && dut.u_duc.f_ready),
    .duc_valid     (duc_active),
    .duc_data      (dut.duc_data),
    .duc_underflow (duc_underflow),
    .sdm_valid     (dut.sdm_valid),
    .sdm_bit       (sdm_bit),
    .mem_full      (mem_full),
    .mem_wrap      (mem_wrap),
    .tx_valid      (tx_valid),
    .tx_data       (tx_data)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures + 1);
    $finish;
  end

  // symbol source
  initial begin
    int k;
    for (int i = 0; i < 15; i++) prbs.push_back(1'b1);
    for (int i = 15; i < 4000; i++) prbs.push_back(prbs[i-15] ^ prbs[i-14]);
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    k = 0;
    while (k < 1900) begin
      @(negedge clk);
      if (!(s_valid && !s_ready)) begin    // hold an offered symbol until taken
        s_valid = $urandom_range(0, 4) != 0;
        s_data.re = prbs[2*k]   ? QPSK_POS : QPSK_NEG;
        s_data.im = prbs[2*k+1] ? QPSK_POS : QPSK_NEG;
      end
      @(posedge clk);
      if (s_valid && s_ready) k++;
    end
  end

  initial begin
    wait (wraps == 2);
    @(negedge clk);
    mon.finish();
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end
endmodule
