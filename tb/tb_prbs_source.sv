// tb_prbs_source: checks the PRBS-15 generator against the recurrence
// s[n] = s[n-15] xor s[n-14], seeded by the register value sent MSB first,
// with random pauses of the enable; also checks the 32767-bit period.
module tb_prbs_source;
  logic clk = 0, rst_n = 0, en = 0, bit_o, valid_o;
  int checks = 0, failures = 0;
  bit seq [$];
  localparam logic [14:0] SEED = 15'h1234;

  prbs_source #(.SEED(SEED)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int i = 14; i >= 0; i--) seq.push_back(SEED[i]);
    for (int i = 15; i < 70000; i++) seq.push_back(seq[i-15] ^ seq[i-14]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < 66000) begin
      @(negedge clk);
      if (valid_o) begin
        checks++;
        if (bit_o !== seq[n]) begin
          failures++;
          if (failures < 5) $display("bit %0d: got %0b exp %0b", n, bit_o, seq[n]);
        end
        n++;
      end
      en = ($urandom_range(0, 9) != 0);
    end
    // period of a maximal-length 15-bit sequence
    checks++;
    for (int i = 0; i < 100; i++) if (seq[i] != seq[i + 32767]) begin failures++; break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
