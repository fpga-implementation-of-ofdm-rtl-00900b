// signal_processing: the signal-processing half of the transmitter, from
// QPSK symbols to the parallel words handed to the serializer.
//
// Chain, all on one clock (62.5 MHz in the 1 Gbit/s configuration):
//   subcarrier_alloc : null at subcarrier 0, pilots at 15/25/39/49, FIFO
//   ifft64_cp        : 64-point IFFT, 16-sample cyclic prefix, 80 outputs
//   duc              : FIFO, two interpolate-by-100 FIRs, fs/4 mixer
//   bp_sdm           : band-pass sigma-delta modulator, 1 bit per clock
//   bitstream_memory : records the bits as 16-bit words, then replays them
// Each link uses ready/valid, so the rate is set by the FIRs, which take one
// complex sample every 100 clocks; everything upstream waits on them. One
// OFDM symbol (80 samples) becomes 8000 sigma-delta bits, i.e. 500 words.
//
// Status outputs expose events used for monitoring: the DUC's enable
// (`duc_active`), the memory's capture-complete flag (`mem_full`) and a
// playback wrap pulse.
module signal_processing
  import ofdm_pkg::*;
#(
  parameter int unsigned L         = 100,
  parameter int unsigned ORDER     = 5060,
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned MEM_DEPTH = 450000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  cplx_t             s_data,
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_valid,
  output logic              duc_active,
  output logic              duc_underflow,
  output logic              sdm_bit,
  output logic              mem_full,
  output logic              mem_wrap
);

  logic  a_valid, a_ready;
  cplx_t a_data;
  logic  f_valid, f_ready, f_last;
  cplx_t f_data;
  logic [5:0] xk_index;
  fix16_t duc_data;
  logic   sdm_valid;

  subcarrier_alloc u_alloc (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (s_valid),
    .s_ready  (s_ready),
    .s_data   (s_data),
    .m_valid  (a_valid),
    .m_ready  (a_ready),
    .m_data   (a_data),
    .sc_index ()
  );

  ifft64_cp u_ifft (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (a_valid),
    .s_ready  (a_ready),
    .s_data   (a_data),
    .m_valid  (f_valid),
    .m_ready  (f_ready),
    .m_data   (f_data),
    .xk_index (xk_index),
    .m_last   (f_last)
  );

  duc #(.L(L), .ORDER(ORDER)) u_duc (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (f_valid),
    .s_ready   (f_ready),
    .s_data    (f_data),
    .m_valid   (duc_active),
    .m_data    (duc_data),
    .underflow (duc_underflow)
  );

  bp_sdm u_sdm (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (duc_active),
    .x       (duc_data),
    .bit_o   (sdm_bit),
    .valid_o (sdm_valid)
  );

  bitstream_memory #(.WORD_W(WORD_W), .DEPTH(MEM_DEPTH)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sdm_valid),
    .bit_i    (sdm_bit),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .full     (mem_full),
    .wrap     (mem_wrap)
  );

endmodule
