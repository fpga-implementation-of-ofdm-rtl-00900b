// async_fifo: dual-clock FIFO for crossing from the mapping clock to the
// signal-processing clock.
//
// The two halves of the transmitter run on different clocks, and this FIFO
// (16 entries deep, as in the design) carries the I/Q symbols between them.
// It is the usual Gray-code pointer FIFO: each side keeps a binary and a Gray
// pointer one bit wider than the address, the Gray pointer is passed through
// a two-flop synchronizer to the other side, and full/empty are decided by
// comparing a local pointer with the synchronized remote one. The read side is
// first-word-fall-through: `r_data` shows the head entry while `r_valid` is
// high and a cycle with `r_valid && r_ready` pops it.
//
// `w_level` is the write side's (pessimistic) count of stored words, used by
// the writer to pause early. Pointer scheme and level output are this
// design's choices; the original design only states the depth and purpose.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             w_clk,
  input  logic             w_rst_n,
  input  logic             w_valid,
  input  logic [WIDTH-1:0] w_data,
  output logic             w_full,
  output logic [$clog2(DEPTH):0] w_level,
  input  logic             r_clk,
  input  logic             r_rst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] w_bin, w_gray, r_bin, r_gray;
  logic [AW:0] r_gray_s1, r_gray_s2;   // read pointer seen in write domain
  logic [AW:0] w_gray_s1, w_gray_s2;   // write pointer seen in read domain
  logic [AW:0] r_bin_w;                // r_gray_s2 converted back to binary

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic w_push;
  assign w_push  = w_valid && !w_full;
  assign w_full  = (w_gray == {~r_gray_s2[AW:AW-1], r_gray_s2[AW-2:0]});
  assign r_bin_w = gray2bin(r_gray_s2);
  assign w_level = w_bin - r_bin_w;

  always_ff @(posedge w_clk) begin
    if (w_push) mem[w_bin[AW-1:0]] <= w_data;
  end

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      w_bin     <= '0;
      w_gray    <= '0;
      r_gray_s1 <= '0;
      r_gray_s2 <= '0;
    end else begin
      r_gray_s1 <= r_gray;
      r_gray_s2 <= r_gray_s1;
      if (w_push) begin
        w_bin  <= w_bin + 1'b1;
        w_gray <= bin2gray(w_bin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic r_pop;
  assign r_valid = (r_gray != w_gray_s2);
  assign r_pop   = r_valid && r_ready;
  assign r_data  = mem[r_bin[AW-1:0]];

  always_ff @(posedge r_clk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      r_bin     <= '0;
      r_gray    <= '0;
      w_gray_s1 <= '0;
      w_gray_s2 <= '0;
    end else begin
      w_gray_s1 <= w_gray;
      w_gray_s2 <= w_gray_s1;
      if (r_pop) begin
        r_bin  <= r_bin + 1'b1;
        r_gray <= bin2gray(r_bin + 1'b1);
      end
    end
  end

  // The write side never counts more words than the FIFO holds.
  a_no_overflow: assert property (@(posedge w_clk) disable iff (!w_rst_n)
                                  w_level <= (AW+1)'(DEPTH));

endmodule
