// ofdm: the complete OFDM / sigma-delta signal generator.
//
// Two clock domains. The mapping clock (125 MHz) runs the PRBS source and the
// constellation mapper (QPSK, or 16-QAM when the static `qam16` pin is
// high), which produce one symbol every two (four) of its clocks; the
// signal-processing clock (62.5 MHz, the serializer's user clock) runs
// everything else. A 16-deep dual-clock FIFO joins them. With the mapping
// clock at twice the other, both sides move one symbol per signal-processing
// clock; in practice the up-converter is the bottleneck and the mapper is
// paused whenever the FIFO has fewer than two free places.
//
// Each domain has its own reset synchronizer fed by the common asynchronous
// reset `arst_n`. The output is a WORD_W-bit word per signal-processing clock
// for the serializer (16 bits -> 1 Gbit/s at 62.5 MHz). `qam16` is read
// by the mapping domain without synchronization: it is a configuration pin
// and must only change while `arst_n` is low.
module ofdm
  import ofdm_pkg::*;
#(
  parameter int unsigned L          = 100,
  parameter int unsigned ORDER      = 5060,
  parameter int unsigned WORD_W     = 16,
  parameter int unsigned MEM_DEPTH  = 450000,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              mapping_clk,
  input  logic              signal_processing_clk,
  input  logic              arst_n,
  input  logic              qam16,
  output logic [WORD_W-1:0] bitstream,
  output logic              bitstream_valid,
  output logic              mem_full
);

  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  logic  map_rst_n, sp_rst_n;
  cplx_t map_data, x_data;
  logic  map_valid, x_valid, x_ready, w_full;
  logic [LW-1:0] w_level;
  logic  space_ok;
  logic  duc_active, duc_underflow, sdm_bit, mem_wrap;

  reset_sync u_rs_map (.clk(mapping_clk),           .arst_n(arst_n), .rst_n(map_rst_n));
  reset_sync u_rs_sp  (.clk(signal_processing_clk), .arst_n(arst_n), .rst_n(sp_rst_n));

  assign space_ok = (w_level <= LW'(FIFO_DEPTH - 3));

  mapping_block u_mapping (
    .clk      (mapping_clk),
    .rst_n    (map_rst_n),
    .qam16    (qam16),
    .space_ok (space_ok),
    .m_data   (map_data),
    .m_valid  (map_valid)
  );

  async_fifo #(.WIDTH($bits(cplx_t)), .DEPTH(FIFO_DEPTH)) u_cdc (
    .w_clk   (mapping_clk),
    .w_rst_n (map_rst_n),
    .w_valid (map_valid),
    .w_data  (map_data),
    .w_full  (w_full),
    .w_level (w_level),
    .r_clk   (signal_processing_clk),
    .r_rst_n (sp_rst_n),
    .r_valid (x_valid),
    .r_ready (x_ready),
    .r_data  (x_data)
  );

  signal_processing #(.L(L), .ORDER(ORDER), .WORD_W(WORD_W), .MEM_DEPTH(MEM_DEPTH)) u_sp (
    .clk           (signal_processing_clk),
    .rst_n         (sp_rst_n),
    .s_valid       (x_valid),
    .s_ready       (x_ready),
    .s_data        (x_data),
    .tx_data       (bitstream),
    .tx_valid      (bitstream_valid),
    .duc_active    (duc_active),
    .duc_underflow (duc_underflow),
    .sdm_bit       (sdm_bit),
    .mem_full      (mem_full),
    .mem_wrap      (mem_wrap)
  );

  // A symbol must never be offered to a full FIFO.
  a_no_drop: assert property (@(posedge mapping_clk) disable iff (!map_rst_n)
                              map_valid |-> !w_full);

endmodule
