// layer_interface: adapter between one layer's clock domain and the bus.
//
// Each layer of the stack may run on its own clock, so the datagrams it sends
// and receives cross a clock boundary here. "Bus clock" below is the clock of
// the layer's transfer stage. The interface holds two queues:
// a transmit FIFO written by the layer's router (tx, layer clock) and read by
// the transfer stage (inj, bus clock), and a receive FIFO written by the
// transfer stage (ej, bus clock) and read by the router (rx, layer clock).
// Both are mode_fifo queues. Set async_mode when the layer clock is not the
// bus clock (different frequency, or the same frequency with skew): the
// pointers then cross through synchronizers. Clear it when the layer runs on
// the bus clock itself: the crossing is then bypassed and a datagram passes
// each queue in one cycle.
//
// That the interface is the layer's synchronizer and holds a FIFO on each
// side follows the architecture; the depth, the valid/ready handshake on the
// router side and the mode mechanism are this design's choices.
//
// Timing: tx/rx on layer_clk, inj/ej on bus_clk, all first-word-fall-through
// valid/ready. Latency through a queue is one cycle in synchronous mode and
// about SYNC_STAGES+1 reader-clock cycles in asynchronous mode. async_mode
// may only change while both resets are asserted.
module layer_interface
  import tsv_bus_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  async_mode,
  input  logic  layer_clk,
  input  logic  layer_rst_n,
  input  logic  bus_clk,
  input  logic  bus_rst_n,
  // router side (layer clock)
  input  logic  tx_valid,
  output logic  tx_ready,
  input  flit_t tx_flit,
  output logic  rx_valid,
  input  logic  rx_ready,
  output flit_t rx_flit,
  // transfer-stage side (bus clock)
  output logic  inj_valid,
  input  logic  inj_ready,
  output flit_t inj_flit,
  input  logic  ej_valid,
  output logic  ej_ready,
  input  flit_t ej_flit
);

  mode_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_tx_fifo (
    .async_mode,
    .wclk(layer_clk), .wrst_n(layer_rst_n),
    .s_valid(tx_valid), .s_ready(tx_ready), .s_data(tx_flit),
    .rclk(bus_clk), .rrst_n(bus_rst_n),
    .m_valid(inj_valid), .m_ready(inj_ready), .m_data(inj_flit)
  );

  mode_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_rx_fifo (
    .async_mode,
    .wclk(bus_clk), .wrst_n(bus_rst_n),
    .s_valid(ej_valid), .s_ready(ej_ready), .s_data(ej_flit),
    .rclk(layer_clk), .rrst_n(layer_rst_n),
    .m_valid(rx_valid), .m_ready(rx_ready), .m_data(rx_flit)
  );

endmodule
