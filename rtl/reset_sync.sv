// reset_sync: turns an asynchronous active-low reset into one that asserts at
// once and releases synchronously to `clk`, two flops after the input rises.
// Each clock domain of the transmitter gets its own copy.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic r1;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      r1    <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      r1    <= 1'b1;
      rst_n <= r1;
    end
  end

endmodule
