// ofdm_rof_top: FPGA top level of the sigma-delta radio-over-fiber
// transmitter.
//
// The OFDM generator produces a band-pass sigma-delta bit stream (QPSK or
// 16-QAM OFDM,
// 64 subcarriers, carrier at a quarter of the bit rate) and hands it out as
// 16-bit words, one per clock of the serial transceiver's user clock. A
// multi-gigabit transceiver serializes the words (62.5 MHz x 16 = 1 Gbit/s,
// putting the carrier at 250 MHz) and drives the optical transmitter.
//
// The transceiver and the two clock managers are vendor blocks and are not
// part of this RTL, so their connections are ports here:
//   tx_usr_clk  in  : the transceiver's parallel user clock (62.5 MHz); it
//                     clocks the signal-processing chain
//   mapping_clk in  : twice tx_usr_clk (125 MHz), made from tx_usr_clk by a
//                     clock manager; it clocks the mapping side
//   arst_n      in  : asynchronous active-low reset, e.g. the clock
//                     managers' "locked" signal
//   qam16       in  : 0 = QPSK, 1 = 16-QAM subcarriers; static, change
//                     only in reset (a board switch or a constant)
//   txdata      out : 16-bit word for the transceiver's TX data input
//   txdata_valid out: high once playback from the bitstream memory runs
//   mem_full    out : capture of the bit stream is complete
module ofdm_rof_top #(
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned MEM_DEPTH = 450000
) (
  input  logic              tx_usr_clk,
  input  logic              mapping_clk,
  input  logic              arst_n,
  input  logic              qam16,
  output logic [WORD_W-1:0] txdata,
  output logic              txdata_valid,
  output logic              mem_full
);

  ofdm #(.WORD_W(WORD_W), .MEM_DEPTH(MEM_DEPTH)) u_ofdm (
    .mapping_clk           (mapping_clk),
    .signal_processing_clk (tx_usr_clk),
    .arst_n                (arst_n),
    .qam16                 (qam16),
    .bitstream             (txdata),
    .bitstream_valid       (txdata_valid),
    .mem_full              (mem_full)
  );

endmodule
