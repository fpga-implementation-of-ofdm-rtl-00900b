// duc: complex digital up-converter, baseband OFDM samples to a real signal
// centred on a quarter of the output sample rate.
//
// Incoming complex samples (the IFFT output with cyclic prefix) wait in a
// 16-entry FIFO. Two identical interpolate-by-100 FIR filters, one for I and
// one for Q, read it together one sample every 100 clocks and each deliver one
// sample per clock. The carrier mixer then combines them into the real
// passband sequence I, -Q, -I, Q, ...
//
// `m_valid` rises with the first filtered sample and stays high; it is the
// enable for the sigma-delta modulator and the bitstream memory. `underflow`
// pulses if the FIFO was empty when the filters needed a sample (a zero is
// used then). `s_ready` is the FIFO's free-space signal and is the
// back-pressure seen by the IFFT.
module duc
  import ofdm_pkg::*;
#(
  parameter int unsigned L          = 100,
  parameter int unsigned ORDER      = 5060,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_valid,
  output logic   s_ready,
  input  cplx_t  s_data,
  output logic   m_valid,
  output fix16_t m_data,
  output logic   underflow
);

  logic   f_valid, f_ready, q_ready;
  cplx_t  f_data;
  logic   i_valid, q_valid, i_uf, q_uf;
  fix16_t i_out, q_out;

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_valid (s_valid),
    .s_ready (s_ready),
    .s_data  (s_data),
    .m_valid (f_valid),
    .m_ready (f_ready),
    .m_data  (f_data),
    .level   ()
  );

  // Both filters see the same input stream and so run in lock step; the
  // I filter's ready pops the FIFO.
  interp_fir #(.L(L), .ORDER(ORDER)) u_fir_i (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (f_valid),
    .s_ready   (f_ready),
    .s_data    (f_data.re),
    .m_valid   (i_valid),
    .m_data    (i_out),
    .underflow (i_uf)
  );

  interp_fir #(.L(L), .ORDER(ORDER)) u_fir_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .s_valid   (f_valid),
    .s_ready   (q_ready),
    .s_data    (f_data.im),
    .m_valid   (q_valid),
    .m_data    (q_out),
    .underflow (q_uf)
  );

  assign underflow = i_uf;

  carrier_mixer u_mix (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_valid (i_valid && q_valid),
    .s_i     (i_out),
    .s_q     (q_out),
    .m_valid (m_valid),
    .m_data  (m_data),
    .phase   ()
  );

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (f_ready == q_ready) && (i_uf == q_uf));

endmodule
