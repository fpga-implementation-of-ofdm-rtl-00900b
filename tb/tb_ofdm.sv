// tb_ofdm: runs the whole generator (both clock domains) with the bitstream
// memory cut to 2500 words (40000 sigma-delta bits, about four OFDM symbols)
// so the run is short. Two copies run side by side, one in QPSK and one in
// 16-QAM mode, and one ofdm_chain_monitor per copy checks the chain end to
// end and counts its mechanisms. Mapping clock 125 MHz, signal-processing
// clock 62.5 MHz, edges aligned. Ends after the playback has wrapped twice.
module tb_ofdm;
  localparam int DEPTH = 2500;
  logic map_clk = 0, sp_clk = 0, arst_n = 1;
  logic [15:0] txdata_a, txdata_b;
  logic txdata_valid_a, txdata_valid_b, mem_full_a, mem_full_b;

  ofdm #(.MEM_DEPTH(DEPTH)) dut_qpsk (
    .mapping_clk           (map_clk),
    .signal_processing_clk (sp_clk),
    .arst_n                (arst_n),
    .qam16                 (1'b0),
    .bitstream             (txdata_a),
    .bitstream_valid       (txdata_valid_a),
    .mem_full              (mem_full_a)
  );

  ofdm #(.MEM_DEPTH(DEPTH)) dut_qam16 (
    .mapping_clk           (map_clk),
    .signal_processing_clk (sp_clk),
    .arst_n                (arst_n),
    .qam16                 (1'b1),
    .bitstream             (txdata_b),
    .bitstream_valid       (txdata_valid_b),
    .mem_full              (mem_full_b)
  );

  always #4 map_clk = ~map_clk;
  always #8 sp_clk  = ~sp_clk;

  ofdm_chain_monitor #(.MEM_DEPTH(DEPTH)) mon_a (
    .clk           (sp_clk),
    .rst_n         (dut_qpsk.sp_rst_n),
    .qam16         (1'b0),
    .map_pause     (!dut_qpsk.space_ok),
    .ifft_valid    (dut_qpsk.u_sp.f_valid),
    .ifft_ready    (dut_qpsk.u_sp.f_ready),
    .ifft_index    (dut_qpsk.u_sp.xk_index),
    .alloc_push    (dut_qpsk.u_sp.u_alloc.push),
    .alloc_index   (dut_qpsk.u_sp.u_alloc.cnt),
    .fir_read      (dut_qpsk.u_sp.u_duc.f_valid && dut_qpsk.u_sp.u_duc.f_ready),
    .duc_valid     (dut_qpsk.u_sp.duc_active),
    .duc_data      (dut_qpsk.u_sp.duc_data),
    .duc_underflow (dut_qpsk.u_sp.duc_underflow),
    .sdm_valid     (dut_qpsk.u_sp.sdm_valid),
    .sdm_bit       (dut_qpsk.u_sp.sdm_bit),
    .mem_full      (mem_full_a),
    .mem_wrap      (dut_qpsk.u_sp.mem_wrap),
    .tx_valid      (txdata_valid_a),
    .tx_data       (txdata_a)
  );

  ofdm_chain_monitor #(.MEM_DEPTH(DEPTH)) mon_b (
    .clk           (sp_clk),
    .rst_n         (dut_qam16.sp_rst_n),
    .qam16         (1'b1),
    .map_pause     (!dut_qam16.space_ok),
    .ifft_valid    (dut_qam16.u_sp.f_valid),
    .ifft_ready    (dut_qam16.u_sp.f_ready),
    .ifft_index    (dut_qam16.u_sp.xk_index),
    .alloc_push    (dut_qam16.u_sp.u_alloc.push),
    .alloc_index   (dut_qam16.u_sp.u_alloc.cnt),
    .fir_read      (dut_qam16.u_sp.u_duc.f_valid && dut_qam16.u_sp.u_duc.f_ready),
    .duc_valid     (dut_qam16.u_sp.duc_active),
    .duc_data      (dut_qam16.u_sp.duc_data),
    .duc_underflow (dut_qam16.u_sp.duc_underflow),
    .sdm_valid     (dut_qam16.u_sp.sdm_valid),
    .sdm_bit       (dut_qam16.u_sp.sdm_bit),
    .mem_full      (mem_full_b),
    .mem_wrap      (dut_qam16.u_sp.mem_wrap),
    .tx_valid      (txdata_valid_b),
    .tx_data       (txdata_b)
  );

  int wraps = 0;
  always @(posedge sp_clk) if (dut_qpsk.sp_rst_n && dut_qpsk.u_sp.mem_wrap) wraps++;

  initial begin
    repeat (200000) @(posedge sp_clk);
    $display("TB_RESULT checks=%0d failures=%0d", mon_a.checks + mon_b.checks,
             mon_a.failures + mon_b.failures + 1);
    $finish;
  end

  initial begin
    #1 arst_n = 0;                 // an edge, so every asynchronous reset fires
    repeat (4) @(posedge map_clk);
    arst_n = 1;
    wait (wraps == 2);
    repeat (100) @(posedge sp_clk);
    @(negedge sp_clk);
    mon_a.finish();
    mon_b.finish();
    $display("TB_RESULT checks=%0d failures=%0d", mon_a.checks + mon_b.checks,
             mon_a.failures + mon_b.failures);
    $finish;
  end
endmodule
