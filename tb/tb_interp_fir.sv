// tb_interp_fir: checks the interpolate-by-100 filter at its full size.
//  - impulse: one input of 32767 then zeros; the 5100 outputs must equal
//    round(32767 * h[m] / 2^23) within 1 LSB, h from the reference taps;
//  - input rate: inputs are taken exactly every 100 clocks;
//  - DC: a constant 10000 settles to 10000/100 = 100 (+-3) on every phase;
//  - underflow: skipping one input slot pulses `underflow` once.
module tb_interp_fir;
  import ofdm_pkg::*;
  import fir_ref_pkg::*;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, underflow;
  fix16_t s_data = 0, m_data;
  int checks = 0, failures = 0;
  int cyc = 0, last_take = -1, takes = 0, uf = 0;
  int ref_imp [5100];

  interp_fir dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // watch the input handshake spacing
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      if (last_take >= 0) begin
        checks++;
        if ((cyc - last_take) % 100 != 0) failures++;   // 200 across the skipped slot
      end
      last_take = cyc;
      takes++;
    end
    if (underflow) uf++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxerr;
    for (int m = 0; m < 5100; m++) begin
      real v;
      v = 32767.0 * tap(m) / 8388608.0;
      ref_imp[m] = $rtoi(v + (v >= 0 ? 0.5 : -0.5));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s_valid = 1; s_data = 32767;
    @(posedge clk);                          // first input taken here
    @(negedge clk) s_data = 0;               // zeros from now on
    maxerr = 0;
    for (int m = 0; m < 5100; m++) begin
      int e;
      @(negedge clk);
      e = m_data - ref_imp[m]; if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      checks++;
      if (!m_valid || e > 1) begin
        failures++;
        if (failures < 5) $display("impulse m=%0d got %0d exp %0d", m, m_data, ref_imp[m]);
      end
    end
    $display("impulse max error %0d LSB, peak %0d", maxerr, ref_imp[2530]);
    // DC response
    s_data = 10000;
    repeat (6000) @(negedge clk);
    for (int m = 0; m < 200; m++) begin
      @(negedge clk);
      checks++;
      if (m_data < 97 || m_data > 103) begin
        failures++;
        if (failures < 8) $display("dc m=%0d got %0d", m, m_data);
      end
    end
    // skip one input slot
    wait (s_ready);
    @(posedge clk);                          // an input is taken here
    @(negedge clk) s_valid = 0;
    repeat (150) @(negedge clk);
    s_valid = 1;
    repeat (300) @(negedge clk);
    checks++;
    if (uf != 1) begin failures++; $display("underflow pulses %0d", uf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
