// tb_bitstream_memory: with a 20-word memory, sends random bits with random
// enable gaps, then checks that playback starts on the clock after the last
// write, shows the recorded words (first bit in bit 0) one per clock, repeats
// the recording three times and pulses `wrap` at each restart. Also checks
// that bits sent after the memory is full are ignored.
module tb_bitstream_memory;
  localparam int W = 16, D = 20;
  logic clk = 0, rst_n = 0, en = 0, bit_i = 0;
  logic [W-1:0] tx_data;
  logic tx_valid, full, wrap;
  int checks = 0, failures = 0;
  logic [W-1:0] words [D];

  bitstream_memory #(.WORD_W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, wraps;
    nb = 0; wraps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nb < W * D) begin
      @(negedge clk);
      checks++;
      if (tx_valid || full || tx_data != 0) failures++;
      en = $urandom_range(0, 3) != 0;
      bit_i = $urandom_range(0, 1);
      if (en) begin words[nb / W][nb % W] = bit_i; nb++; end
    end
    @(negedge clk);                  // the edge that writes the last word
    en = 1;                          // keeps sending: must be ignored
    checks++;
    if (!full || tx_valid) failures++;
    @(negedge clk);                  // first playback edge
    checks++;
    if (!full || !tx_valid || tx_data != words[0]) begin
      failures++;
      $display("playback did not start with word 0");
    end
    for (int r = 0; r < 3 * D; r++) begin
      checks++;
      if (tx_data != words[r % D] || !tx_valid || wrap != (r % D == 0 && r > 0)) begin
        failures++;
        if (failures < 5) $display("r=%0d got %h exp %h wrap %0b", r, tx_data, words[r % D], wrap);
      end
      if (wrap) wraps++;
      @(negedge clk);
      bit_i = $urandom_range(0, 1);
    end
    checks++;
    if (wraps != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
