// tb_bp_sdm: (1) compares the output bits with a behavioural model of the
// loop w[n] = x[n] + d[n-2] - w[n-2], d = -98 if w < 0 else +98, bit = (w < 0),
// for a random band-limited input with enable gaps; (2) drives a tone at a
// quarter of the sample rate and checks that the feedback stream d, read back
// through a correlator, reproduces the tone's amplitude (STF = 1) within 5 %; (3) checks that in-band noise
// is low by correlating a zero input against the carrier.
module tb_bp_sdm;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, bit_o, valid_o;
  fix16_t x = 0;
  int checks = 0, failures = 0;

  bp_sdm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1, w2, d1, d2, w, d, n;
    real corr_i, corr_q, amp;
    w1 = 0; w2 = 0; d1 = 0; d2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // (1) bit-exact model, random slowly varying input
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 7) != 0;
      x  = fix16_t'($rtoi(60.0 * $sin(i * 0.0314) * $cos(i * 1.5708 + 0.2)));
      if (en) begin
        w = x + d2 - w2;
        d = (w < 0) ? -98 : 98;
        w2 = w1; w1 = w; d2 = d1; d1 = d;
      end
      @(posedge clk); #1;
      if (en) begin
        checks++;
        if (bit_o != (w < 0) || !valid_o) begin
          failures++;
          if (failures < 5) $display("i=%0d bit %0b exp %0b", i, bit_o, w < 0);
        end
      end
    end
    // (2) tone at fs/4, amplitude 50
    en = 1;
    corr_i = 0; corr_q = 0; n = 0;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      x = (i % 4 == 0) ? 16'sd50 : (i % 4 == 2) ? -16'sd50 : 16'sd0;
      @(posedge clk); #1;
      if (i > 100) begin
        // bit_o now belongs to input i; d = bit ? -98 : 98
        d = bit_o ? -98 : 98;
        corr_i += d * ((i % 4 == 0) ? 1.0 : (i % 4 == 2) ? -1.0 : 0.0);
        n++;
      end
    end
    amp = 2.0 * corr_i / n;     // feedback stream = input + shaped noise
    checks++;
    $display("recovered fs/4 amplitude %f (input 50)", amp);
    if (amp < 47.5 || amp > 52.5) failures++;
    // (3) zero input: in-band content near zero
    corr_i = 0; n = 0;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      x = 0;
      @(posedge clk); #1;
      if (i > 100) begin
        d = bit_o ? -98 : 98;
        corr_i += d * ((i % 4 == 0) ? 1.0 : (i % 4 == 2) ? -1.0 : 0.0);
        n++;
      end
    end
    amp = 2.0 * corr_i / n;
    checks++;
    $display("idle in-band amplitude %f", amp);
    if (amp < -2.5 || amp > 2.5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
