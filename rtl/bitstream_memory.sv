// bitstream_memory: records the sigma-delta bit stream and plays it back as
// parallel words for the serial transmitter.
//
// The modulator produces one bit per signal-processing clock, but the line
// needs WORD_W bits per clock (16 bits at 62.5 MHz = 1 Gbit/s). So the stream
// is captured first and replayed afterwards:
//   capture : while `en` is high, a serial-to-parallel register collects
//             WORD_W bits (the first bit lands in bit 0, the bit a serializer
//             sends first); every WORD_W accepted bits the word is written to
//             a single-port RAM at the address of a write counter.
//   playback: once DEPTH words are stored, writing stops and a read counter
//             walks the RAM one word per clock, wrapping around, so the
//             recorded segment repeats on `tx_data` without end.
// DEPTH defaults to 450000 words. The two-phase scheme and the depth follow
// the design; the bit order within a word and the endless repetition are this
// design's choices.
//
// Timing: the RAM read is registered; `tx_valid` rises on the clock after
// the last word is written, with word 0 on `tx_data`, and stays high. Word k
// of the recording is on `tx_data` k clocks later. `tx_data` is zero before.
module bitstream_memory #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned DEPTH  = 450000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              bit_i,
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_valid,
  output logic              full,        // capture finished, playing back
  output logic              wrap         // high while tx_data shows word 0 again
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned BW = $clog2(WORD_W);

  logic [WORD_W-1:0] ram [DEPTH];
  logic [WORD_W-1:0] sp;           // serial-to-parallel register
  logic [BW-1:0]     bit_cnt;
  logic [AW-1:0]     wr_addr;      // capture counter
  logic [AW-1:0]     rd_addr;      // playback counter
  logic              we;
  logic [WORD_W-1:0] word;
  logic [WORD_W-1:0] tx_data_q;    // registered RAM read

  always_comb begin
    word          = sp;
    word[bit_cnt] = bit_i;
  end

  assign we = !full && en && (bit_cnt == BW'(WORD_W - 1));

  always_ff @(posedge clk) begin
    if (we) ram[wr_addr] <= word;
    tx_data_q <= ram[rd_addr];
  end

  assign tx_data = tx_valid ? tx_data_q : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp         <= '0;
      bit_cnt    <= '0;
      wr_addr    <= '0;
      rd_addr    <= '0;
      full       <= 1'b0;
      tx_valid   <= 1'b0;
      wrap       <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (!full) begin
        if (en) begin
          sp      <= word;
          bit_cnt <= (bit_cnt == BW'(WORD_W - 1)) ? '0 : bit_cnt + 1'b1;
          if (we) begin
            if (wr_addr == AW'(DEPTH - 1)) full <= 1'b1;
            else wr_addr <= wr_addr + 1'b1;
          end
        end
      end else begin
        tx_valid <= 1'b1;
        wrap     <= (rd_addr == '0) && tx_valid;
        if (rd_addr == AW'(DEPTH - 1)) begin
          rd_addr <= '0;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end
    end
  end

endmodule
