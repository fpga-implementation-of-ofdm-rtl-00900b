// tb_async_fifo: writes random words at 125 MHz-like and reads at an
// unrelated slower clock, both with random gaps; checks order and
// completeness, that full stops the writer at 16 words and that w_level never
// exceeds the depth.
module tb_async_fifo;
  logic w_clk = 0, r_clk = 0, w_rst_n = 0, r_rst_n = 0;
  logic w_valid = 0, w_full, r_valid, r_ready = 0;
  logic [31:0] w_data = 0, r_data;
  logic [4:0] w_level;
  int checks = 0, failures = 0, written = 0, read_n = 0, saw_full = 0;
  logic [31:0] q [$];

  async_fifo #(.WIDTH(32), .DEPTH(16)) dut (.*);
  always #4 w_clk = ~w_clk;
  always #7 r_clk = ~r_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge w_clk);
    w_rst_n = 1; r_rst_n = 1;
  end

  // writer
  initial begin
    wait (w_rst_n);
    while (written < 5000) begin
      @(negedge w_clk);
      if (w_level > 16) failures++;
      if (w_full) saw_full++;
      w_valid = $urandom_range(0, 99) < ((written / 500) % 2 ? 90 : 30);
      w_data  = $urandom;
      @(posedge w_clk);
      if (w_valid && !w_full) begin q.push_back(w_data); written++; end
    end
    @(negedge w_clk) w_valid = 0;
  end

  // reader
  initial begin
    wait (r_rst_n);
    while (read_n < 5000) begin
      @(negedge r_clk);
      r_ready = $urandom_range(0, 99) < ((read_n / 700) % 2 ? 95 : 40);
      @(posedge r_clk);
      if (r_valid && r_ready) begin
        checks++;
        if (q.size() == 0 || r_data != q[0]) failures++;
        else void'(q.pop_front());
        read_n++;
      end
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
