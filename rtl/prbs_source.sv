// prbs_source: pseudo-random binary source standing in for user data.
//
// The transmitter generates its own payload bits so that it can run without
// an external data feed. A Fibonacci linear-feedback shift register produces
// one bit per clock while `en` is high and holds its state while `en` is low,
// so a downstream block can pause it without losing bits. The generator type
// and its polynomial are this design's choice (PRBS-15, x^15 + x^14 + 1, a
// common test sequence); the seed is a parameter.
//
// Timing: `bit_o`/`valid_o` are registered; a bit appears one clock after the
// `en` cycle that produced it.
module prbs_source #(
  parameter logic [14:0] SEED = 15'h7FFF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_o,
  output logic valid_o
);

  logic [14:0] lfsr;
  logic              fb;

  assign fb = lfsr[14] ^ lfsr[13];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr    <= SEED;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en;
      if (en) begin
        bit_o <= lfsr[14];
        lfsr  <= {lfsr[13:0], fb};
      end
    end
  end

endmodule
