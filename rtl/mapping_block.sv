// mapping_block: the transmitter's data source and constellation mapper.
//
// A PRBS generator provides one payload bit per clock. With `qam16` low the
// QPSK mapper turns each pair into an I/Q symbol, so one symbol leaves every
// second clock; that is why this block runs at twice the clock of the
// signal-processing chain (125 MHz against 62.5 MHz in the 1 Gbit/s
// configuration): both sides then move one symbol per signal-processing
// clock. With `qam16` high the 16-QAM mapper takes four bits per symbol
// instead; the chain downstream needs far fewer symbols than either rate, so
// the lower symbol rate costs nothing. `qam16` selects the scheme for a whole
// run: change it only while the block is held in reset.
//
// The downstream FIFO cannot absorb an unlimited stream, so the source is
// paused while `space_ok` is low; up to one symbol may still be in flight
// after that, which the FIFO margin covers. The pause input and the mode pin
// are this design's own; the original describes the free-running rates and
// says that QPSK and 16-QAM signals are produced.
module mapping_block
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  qam16,
  input  logic  space_ok,
  output cplx_t m_data,
  output logic  m_valid
);

  logic  bit_d, bit_v;
  cplx_t qpsk_data, qam_data;
  logic  qpsk_valid, qam_valid;

  prbs_source u_src (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (space_ok),
    .bit_o   (bit_d),
    .valid_o (bit_v)
  );

  qpsk_mapper u_qpsk (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_data  (bit_d),
    .s_valid (bit_v && !qam16),
    .m_data  (qpsk_data),
    .m_valid (qpsk_valid)
  );

  qam16_mapper u_qam16 (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_data  (bit_d),
    .s_valid (bit_v && qam16),
    .m_data  (qam_data),
    .m_valid (qam_valid)
  );

  assign m_data  = qam16 ? qam_data  : qpsk_data;
  assign m_valid = qam16 ? qam_valid : qpsk_valid;

endmodule
