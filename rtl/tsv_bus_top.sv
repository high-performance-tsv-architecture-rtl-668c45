// tsv_bus_top: the interlayer pipeline bus of an N_LAYERS-high 3-D stack.
//
// Instead of a shared vertical bus with a central arbiter, the vertical wires
// are cut into segments by one transfer stage per layer. Each segment carries
// two unidirectional links, one down and one up, and every stage buffers what
// passes through it, so all segments and both directions carry datagrams at
// the same time and a layer injects without asking for a grant. Each stage
// reads the destination layer of a datagram, keeps it for its own layer or
// passes it on.
//
// The bus is globally asynchronous, locally synchronous. Every transfer stage
// runs on its own clock ts_clk[i] (it may be the layer's clock, or one clock
// shared by all stages). Every segment between stages i and i+1 is programmed
// by seg_async[i]: synchronous when both stages share a clock, asynchronous
// when their clocks differ in frequency or phase. Every layer interface,
// between the layer's router on layer_clk[i] and its stage on ts_clk[i], is
// programmed by if_async[i] in the same way.
//
// Structure (layer 0 at the top):
//
//     layer i router <-> layer_interface[i] <-> transfer_stage[i]
//     transfer_stage[i].m_dn -> transfer_stage[i+1].s_dn
//     transfer_stage[i+1].m_up -> transfer_stage[i].s_up
//
// The ends of the chain are closed: nothing enters above stage 0 or below
// stage N_LAYERS-1, and their outward links are always ready (no datagram can
// legally reach them). The per-layer routers and network interfaces are not
// part of this design; their side of each interface is a port of this module.
//
// Ports are arrays indexed by layer (segments for seg_async). tx_* (into the
// bus) and rx_* (out of the bus) belong to layer_clk[i]; drop[i] to ts_clk[i].
// drop[i] pulses when layer i injected a datagram addressed to itself or to a
// layer that does not exist; such a datagram is discarded. Mode bits may only
// change while the resets are asserted. N_LAYERS must be at least 2.
//
// Latency with everything synchronous on one clock and no contention:
// rx_valid rises |dst-src|+1 cycles after the edge that writes a datagram into
// the transmit queue: one cycle in each of the |dst-src| direction FIFOs it
// passes (the source stage's included; the destination stage ejects
// combinationally) and one to be written into the receive queue. Each
// asynchronous crossing adds its synchronizer delay.
module tsv_bus_top
  import tsv_bus_pkg::*;
#(
  parameter int unsigned N_LAYERS = N_LAYERS_DEF,
  parameter int unsigned TS_DEPTH = 4,
  parameter int unsigned IF_DEPTH = 4
) (
  input  logic [N_LAYERS-1:0] ts_clk,
  input  logic [N_LAYERS-1:0] ts_rst_n,
  input  logic [N_LAYERS-2:0] seg_async,
  input  logic [N_LAYERS-1:0] layer_clk,
  input  logic [N_LAYERS-1:0] layer_rst_n,
  input  logic [N_LAYERS-1:0] if_async,
  input  logic [N_LAYERS-1:0] tx_valid,
  output logic [N_LAYERS-1:0] tx_ready,
  input  flit_t               tx_flit [N_LAYERS],
  output logic [N_LAYERS-1:0] rx_valid,
  input  logic [N_LAYERS-1:0] rx_ready,
  output flit_t               rx_flit [N_LAYERS],
  output logic [N_LAYERS-1:0] drop
);

  // Links of the chain. dn_*[i] enters stage i from above, dn_*[i+1] leaves
  // it below; up_*[i+1] enters stage i from below, up_*[i] leaves it above.
  logic  [N_LAYERS:0] dn_valid, dn_ready, up_valid, up_ready;
  flit_t              dn_flit [N_LAYERS+1];
  flit_t              up_flit [N_LAYERS+1];

  // Closed ends of the chain.
  assign dn_valid[0]        = 1'b0;
  assign dn_flit[0]         = '0;
  assign up_ready[0]        = 1'b1;
  assign up_valid[N_LAYERS] = 1'b0;
  assign up_flit[N_LAYERS]  = '0;
  assign dn_ready[N_LAYERS] = 1'b1;

  for (genvar i = 0; i < N_LAYERS; i++) begin : g_layer
    logic  inj_valid, inj_ready, ej_valid, ej_ready;
    flit_t inj_flit, ej_flit;
    // Neighbours' clocks; an end stage's outward FIFO is read on its own clock.
    localparam int unsigned BELOW = (i + 1 < N_LAYERS) ? i + 1 : i;
    localparam int unsigned ABOVE = (i > 0) ? i - 1 : i;
    logic dn_async, up_async;
    assign dn_async = (i + 1 < N_LAYERS) ? seg_async[BELOW - 1] : 1'b0;
    assign up_async = (i > 0)            ? seg_async[ABOVE]     : 1'b0;

    layer_interface #(.DEPTH(IF_DEPTH)) u_if (
      .async_mode  (if_async[i]),
      .layer_clk   (layer_clk[i]),
      .layer_rst_n (layer_rst_n[i]),
      .bus_clk     (ts_clk[i]),
      .bus_rst_n   (ts_rst_n[i]),
      .tx_valid (tx_valid[i]), .tx_ready (tx_ready[i]), .tx_flit (tx_flit[i]),
      .rx_valid (rx_valid[i]), .rx_ready (rx_ready[i]), .rx_flit (rx_flit[i]),
      .inj_valid, .inj_ready, .inj_flit,
      .ej_valid,  .ej_ready,  .ej_flit
    );

    transfer_stage #(.LAYER_ID(i), .N_LAYERS(N_LAYERS), .DEPTH(TS_DEPTH)) u_ts (
      .clk          (ts_clk[i]),
      .rst_n        (ts_rst_n[i]),
      .dn_nbr_clk   (ts_clk[BELOW]),
      .dn_nbr_rst_n (ts_rst_n[BELOW]),
      .dn_async,
      .up_nbr_clk   (ts_clk[ABOVE]),
      .up_nbr_rst_n (ts_rst_n[ABOVE]),
      .up_async,
      .s_dn_valid (dn_valid[i]),   .s_dn_ready (dn_ready[i]),   .s_dn_flit (dn_flit[i]),
      .m_dn_valid (dn_valid[i+1]), .m_dn_ready (dn_ready[i+1]), .m_dn_flit (dn_flit[i+1]),
      .s_up_valid (up_valid[i+1]), .s_up_ready (up_ready[i+1]), .s_up_flit (up_flit[i+1]),
      .m_up_valid (up_valid[i]),   .m_up_ready (up_ready[i]),   .m_up_flit (up_flit[i]),
      .s_inj_valid (inj_valid), .s_inj_ready (inj_ready), .s_inj_flit (inj_flit),
      .m_ej_valid  (ej_valid),  .m_ej_ready  (ej_ready),  .m_ej_flit  (ej_flit),
      .drop (drop[i])
    );
  end

endmodule
