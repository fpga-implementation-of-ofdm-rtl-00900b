// qam16_mapper: Gray-coded 16-QAM mapping of a serial bit stream.
//
// Bits arrive one per valid cycle and are gathered four at a time, the
// first becoming b3 (the most significant). As in the QPSK mapper, the upper
// half of the symbol drives the in-phase axis and the lower half the
// quadrature axis. Per axis the two bits pick one of four levels through a
// multiplexer: the first bit is the sign (1 = positive, the same rule as the
// QPSK mapper) and the second the magnitude (1 = inner level 1/sqrt(10),
// 0 = outer level 3/sqrt(10)), so the levels -3,-1,+1,+3 carry 00,01,11,10
// and neighbours differ in one bit. The 1/sqrt(10) scale gives the
// constellation the same average power as the QPSK one. Which bit is sign
// and which magnitude, and the bit order, are this design's own choices;
// the original only states that 16-QAM is produced with equal average power.
//
// Timing: a symbol is output, registered, on the clock after its fourth bit
// was accepted; `m_valid` is a one-cycle pulse.
module qam16_mapper
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_data,
  input  logic  s_valid,
  output cplx_t m_data,
  output logic  m_valid
);

  logic [2:0] sr;    // first three bits of the symbol, first bit in sr[2]
  logic [1:0] nbit;  // bits held so far

  function automatic fix16_t level(logic sgn, logic inner);
    if (inner) return sgn ? QAM16_IN_POS  : QAM16_IN_NEG;
    else       return sgn ? QAM16_OUT_POS : QAM16_OUT_NEG;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      nbit    <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= 1'b0;
      if (s_valid) begin
        nbit <= nbit + 2'd1;
        if (nbit != 2'd3) begin
          sr <= {sr[1:0], s_data};
        end else begin
          m_valid   <= 1'b1;
          m_data.re <= level(sr[2], sr[1]);   // I multiplexer
          m_data.im <= level(sr[0], s_data);  // Q multiplexer
        end
      end
    end
  end

endmodule
