// subcarrier_alloc: places pilots and the null subcarrier into the 64-entry
// frequency-domain frame that feeds the IFFT.
//
// A 6-bit counter counts the I/Q pairs accepted at the input, 0..63, and
// starts with the first pair that arrives. The counter value is the
// subcarrier index of the pair (natural order, index 0 = DC). A multiplexer
// on the counter chooses the output:
//   index 0                -> 0 + j0 (null; keeps DC out of the signal)
//   index 15, 25, 39, 49   -> 0.99997 + j0.99997 (comb pilots, largest
//                             positive value of the 16-bit format)
//   any other index        -> the mapped data pair
// so 59 subcarriers carry data. At the pilot and null positions the input pair
// is consumed and replaced, as a counter-driven multiplexer does; the data
// symbol that arrived there is not transmitted (this is how this design reads
// the description, which counts every input pair).
//
// The result passes through a 16-entry FIFO whose ready/valid output side
// connects to the IFFT; `s_ready` reflects free space in it, so the block
// applies the IFFT's back-pressure to its source.
module subcarrier_alloc
  import ofdm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  cplx_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output cplx_t m_data,
  output logic [5:0] sc_index      // subcarrier index of the next input pair
);

  logic [5:0] cnt;
  cplx_t      alloc;
  logic       push;

  always_comb begin
    if (cnt == 6'(NULL_IDX))  alloc = '{re: '0, im: '0};
    else if (is_pilot(cnt))   alloc = '{re: PILOT_VAL, im: PILOT_VAL};
    else                      alloc = s_data;
  end

  assign push     = s_valid && s_ready;
  assign sc_index = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (push) cnt <= cnt + 1'b1;   // wraps 63 -> 0
  end

  sync_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_valid (s_valid),
    .s_ready (s_ready),
    .s_data  (alloc),
    .m_valid (m_valid),
    .m_ready (m_ready),
    .m_data  (m_data),
    .level   ()
  );

endmodule
