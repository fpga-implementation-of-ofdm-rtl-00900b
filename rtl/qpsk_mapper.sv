// qpsk_mapper: Gray-coded QPSK mapping of a serial bit stream.
//
// Bits arrive one per valid cycle. A 2-bit serial-to-parallel register pairs
// them, the first bit of a pair becoming the most significant. The two bits
// then select between two constants in two multiplexers: the most significant
// bit drives the in-phase multiplexer and the least significant bit the
// quadrature one, a 1 selecting +1/sqrt(2) and a 0 selecting -1/sqrt(2)
// (0.70709228515625 in the signed 16-bit, 15-fraction-bit format). This gives
// 11 -> (+,+), 01 -> (-,+), 00 -> (-,-), 10 -> (+,-), the Gray mapping of the
// design. The choice that the earlier bit is the MSB is this design's own.
//
// Timing: a symbol is output, registered, on the clock after its second bit
// was accepted; `m_valid` is a one-cycle pulse, so the symbol rate is half the
// bit rate.
module qpsk_mapper
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_data,
  input  logic  s_valid,
  output cplx_t m_data,
  output logic  m_valid
);

  logic msb_q;     // first bit of the pair, waiting for its partner
  logic have_msb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb_q    <= 1'b0;
      have_msb <= 1'b0;
      m_valid  <= 1'b0;
      m_data   <= '0;
    end else begin
      m_valid <= 1'b0;
      if (s_valid) begin
        if (!have_msb) begin
          msb_q    <= s_data;
          have_msb <= 1'b1;
        end else begin
          have_msb    <= 1'b0;
          m_valid     <= 1'b1;
          m_data.re   <= msb_q  ? QPSK_POS : QPSK_NEG;  // I multiplexer
          m_data.im   <= s_data ? QPSK_POS : QPSK_NEG;  // Q multiplexer
        end
      end
    end
  end

endmodule
