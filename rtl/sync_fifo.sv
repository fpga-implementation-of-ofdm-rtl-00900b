// sync_fifo: single-clock first-word-fall-through FIFO with ready/valid on
// both sides.
//
// Used where the design buffers a stream inside the signal-processing clock
// domain: between the subcarrier allocation and the IFFT, and in front of the
// interpolation filters. Depth defaults to 16, the depth the design uses for
// its FIFOs. A word is written on a cycle with `s_valid && s_ready` and leaves
// on a cycle with `m_valid && m_ready`; both may happen in the same cycle. The
// head word is visible on `m_data` without a read latency. `level` is the
// current number of stored words.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [WIDTH-1:0] s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [WIDTH-1:0] m_data,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign s_ready = (level != (AW+1)'(DEPTH));
  assign m_valid = (level != '0);
  assign m_data  = mem[rp];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  level <= (AW+1)'(DEPTH));

endmodule
