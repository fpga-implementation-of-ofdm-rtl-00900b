// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the ready/valid flags and the level count, and that 16 words fit.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [31:0] s_data = 0, m_data;
  logic [4:0] level;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int max_level = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (level != q.size()) failures++;
      if (s_ready != (q.size() < 16)) failures++;
      if (m_valid != (q.size() > 0)) failures++;
      if (m_valid && m_data != q[0]) failures++;
      if (q.size() > max_level) max_level = q.size();
      // phases biased toward filling then draining
      s_valid = $urandom_range(0, 99) < ((i / 2000) % 2 ? 30 : 80);
      m_ready = $urandom_range(0, 99) < ((i / 2000) % 2 ? 80 : 30);
      s_data  = $urandom;
      @(posedge clk);
      if (s_valid && s_ready && m_valid && m_ready) begin void'(q.pop_front()); q.push_back(s_data); end
      else if (s_valid && s_ready) q.push_back(s_data);
      else if (m_valid && m_ready) void'(q.pop_front());
    end
    checks++;
    if (max_level != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
