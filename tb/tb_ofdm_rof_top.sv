// tb_ofdm_rof_top: full-size run of the top level with every parameter at
// its default. Two copies of the top run side by side on the same clocks,
// one strapped for QPSK and one for 16-QAM. Each bitstream memory records
// 450000 words (7.2 million sigma-delta bits, 900 OFDM symbols) and then
// plays the recording once through and into a second pass. One
// ofdm_chain_monitor per copy decodes every complete OFDM symbol from the
// up-converter output, checks the sigma-delta bits and every played-back
// word, and counts the chain's mechanisms.
// Clocks: tx_usr_clk 62.5 MHz, mapping_clk 125 MHz, edges aligned.
module tb_ofdm_rof_top;
  logic tx_usr_clk = 0, mapping_clk = 0, arst_n = 1;
  logic [15:0] txdata_a, txdata_b;
  logic txdata_valid_a, txdata_valid_b, mem_full_a, mem_full_b;

  ofdm_rof_top dut_qpsk (
    .tx_usr_clk   (tx_usr_clk),
    .mapping_clk  (mapping_clk),
    .arst_n       (arst_n),
    .qam16        (1'b0),
    .txdata       (txdata_a),
    .txdata_valid (txdata_valid_a),
    .mem_full     (mem_full_a)
  );

  ofdm_rof_top dut_qam16 (
    .tx_usr_clk   (tx_usr_clk),
    .mapping_clk  (mapping_clk),
    .arst_n       (arst_n),
    .qam16        (1'b1),
    .txdata       (txdata_b),
    .txdata_valid (txdata_valid_b),
    .mem_full     (mem_full_b)
  );

  always #4 mapping_clk = ~mapping_clk;
  always #8 tx_usr_clk  = ~tx_usr_clk;

  ofdm_chain_monitor mon_a (
    .clk           (tx_usr_clk),
    .rst_n         (dut_qpsk.u_ofdm.sp_rst_n),
    .qam16         (1'b0),
    .map_pause     (!dut_qpsk.u_ofdm.space_ok),
    .ifft_valid    (dut_qpsk.u_ofdm.u_sp.f_valid),
    .ifft_ready    (dut_qpsk.u_ofdm.u_sp.f_ready),
    .ifft_index    (dut_qpsk.u_ofdm.u_sp.xk_index),
    .alloc_push    (dut_qpsk.u_ofdm.u_sp.u_alloc.push),
    .alloc_index   (dut_qpsk.u_ofdm.u_sp.u_alloc.cnt),
    .fir_read      (dut_qpsk.u_ofdm.u_sp.u_duc.f_valid && dut_qpsk.u_ofdm.u_sp.u_duc.f_ready),
    .duc_valid     (dut_qpsk.u_ofdm.u_sp.duc_active),
    .duc_data      (dut_qpsk.u_ofdm.u_sp.duc_data),
    .duc_underflow (dut_qpsk.u_ofdm.u_sp.duc_underflow),
    .sdm_valid     (dut_qpsk.u_ofdm.u_sp.sdm_valid),
    .sdm_bit       (dut_qpsk.u_ofdm.u_sp.sdm_bit),
    .mem_full      (mem_full_a),
    .mem_wrap      (dut_qpsk.u_ofdm.u_sp.mem_wrap),
    .tx_valid      (txdata_valid_a),
    .tx_data       (txdata_a)
  );

  ofdm_chain_monitor mon_b (
    .clk           (tx_usr_clk),
    .rst_n         (dut_qam16.u_ofdm.sp_rst_n),
    .qam16         (1'b1),
    .map_pause     (!dut_qam16.u_ofdm.space_ok),
    .ifft_valid    (dut_qam16.u_ofdm.u_sp.f_valid),
    .ifft_ready    (dut_qam16.u_ofdm.u_sp.f_ready),
    .ifft_index    (dut_qam16.u_ofdm.u_sp.xk_index),
    .alloc_push    (dut_qam16.u_ofdm.u_sp.u_alloc.push),
    .alloc_index   (dut_qam16.u_ofdm.u_sp.u_alloc.cnt),
    .fir_read      (dut_qam16.u_ofdm.u_sp.u_duc.f_valid && dut_qam16.u_ofdm.u_sp.u_duc.f_ready),
    .duc_valid     (dut_qam16.u_ofdm.u_sp.duc_active),
    .duc_data      (dut_qam16.u_ofdm.u_sp.duc_data),
    .duc_underflow (dut_qam16.u_ofdm.u_sp.duc_underflow),
    .sdm_valid     (dut_qam16.u_ofdm.u_sp.sdm_valid),
    .sdm_bit       (dut_qam16.u_ofdm.u_sp.sdm_bit),
    .mem_full      (mem_full_b),
    .mem_wrap      (dut_qam16.u_ofdm.u_sp.mem_wrap),
    .tx_valid      (txdata_valid_b),
    .tx_data       (txdata_b)
  );

  int wraps = 0;
  always @(posedge tx_usr_clk) if (dut_qpsk.u_ofdm.sp_rst_n && dut_qpsk.u_ofdm.u_sp.mem_wrap) wraps++;

  initial begin
    repeat (8000000) @(posedge tx_usr_clk);
    $display("TB_RESULT checks=%0d failures=%0d", mon_a.checks + mon_b.checks,
             mon_a.failures + mon_b.failures + 1);
    $finish;
  end

  initial begin
    #1 arst_n = 0;                 // an edge, so every asynchronous reset fires
    repeat (4) @(posedge mapping_clk);
    arst_n = 1;
    wait (wraps == 1);
    repeat (1000) @(posedge tx_usr_clk);
    @(negedge tx_usr_clk);
    mon_a.finish();
    mon_b.finish();
    $display("TB_RESULT checks=%0d failures=%0d", mon_a.checks + mon_b.checks,
             mon_a.failures + mon_b.failures);
    $finish;
  end
endmodule
