// transfer_stage: one stop of the bidirectional pipelined interlayer bus.
//
// Every layer of the stack owns one transfer stage. The bus runs through the
// stages as two opposite unidirectional links per segment: downward traffic
// enters on s_dn from the stage above and leaves on m_dn to the stage below;
// upward traffic enters on s_up from below and leaves on m_up to the stage
// above. Both directions and all segments move data in the same cycle, and no
// central arbiter or grant wire exists: each stage decides locally.
//
// The stage has the three duties the architecture gives it:
//   1. Forward. A datagram whose destination layer is not LAYER_ID is written
//      into the FIFO of its direction and continues to the next stage.
//   2. Eject. A datagram whose destination layer is LAYER_ID is handed to the
//      layer interface (m_ej), whose receive FIFO buffers it.
//   3. Inject. A datagram from the layer interface (s_inj) goes into the down
//      FIFO when its destination layer is below (larger index) and into the up
//      FIFO when it is above.
// The comparison of the header's layer address with LAYER_ID is the "Ctrl"
// of the stage. Where two sources want one target in the same cycle (through
// traffic and injection at a direction FIFO, or both directions at the eject
// port), a one-bit round-robin pointer alternates the priority so neither
// starves; this arbitration, the FIFO depth and the discard of misaddressed
// injections are choices of this design.
//
// Timing domains. Each stage is a timing domain of its own, clocked by clk.
// Its two direction FIFOs are the bus segments' crossings: the down FIFO is
// written on clk and read on dn_nbr_clk, the clock of the stage below; the up
// FIFO is written on clk and read on up_nbr_clk, the clock of the stage above.
// dn_async / up_async program each segment: 1 when the neighbour runs on an
// unrelated or skewed clock (pointers pass synchronizers), 0 when it shares
// clk (no synchronizer, one cycle per stage). That a segment can run either
// way follows the architecture; doing it with mode_fifo is this design's
// choice. Change a mode bit only while the resets are asserted.
//
// Layer index 0 is the top of the stack. An injected datagram addressed to the
// own layer or to a layer >= N_LAYERS has no path; it is consumed and the
// drop output pulses for one cycle.
//
// Ports: s_dn, s_up, s_inj, m_ej and drop are on clk; m_dn is on dn_nbr_clk
// and m_up on up_nbr_clk. All are valid/ready. With a synchronous segment a
// datagram spends one cycle per stage when not stalled. m_ej is combinational
// from s_dn/s_up, so ejection adds no cycle. Ready outputs depend on the valid
// inputs, never the other way round.
module transfer_stage
  import tsv_bus_pkg::*;
#(
  parameter int unsigned LAYER_ID = 0,
  parameter int unsigned N_LAYERS = N_LAYERS_DEF,
  parameter int unsigned DEPTH    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // neighbours' clocks (readers of m_dn and m_up) and segment modes
  input  logic  dn_nbr_clk,
  input  logic  dn_nbr_rst_n,
  input  logic  dn_async,
  input  logic  up_nbr_clk,
  input  logic  up_nbr_rst_n,
  input  logic  up_async,
  // downward traffic from the stage above (clk) / to the stage below (dn_nbr_clk)
  input  logic  s_dn_valid,
  output logic  s_dn_ready,
  input  flit_t s_dn_flit,
  output logic  m_dn_valid,
  input  logic  m_dn_ready,
  output flit_t m_dn_flit,
  // upward traffic from the stage below (clk) / to the stage above (up_nbr_clk)
  input  logic  s_up_valid,
  output logic  s_up_ready,
  input  flit_t s_up_flit,
  output logic  m_up_valid,
  input  logic  m_up_ready,
  output flit_t m_up_flit,
  // from / to the layer interface
  input  logic  s_inj_valid,
  output logic  s_inj_ready,
  input  flit_t s_inj_flit,
  output logic  m_ej_valid,
  input  logic  m_ej_ready,
  output flit_t m_ej_flit,
  output logic  drop
);

  localparam layer_addr_t MY_ID = layer_addr_t'(LAYER_ID);

  // ---------------- Ctrl: header decode ----------------
  logic dn_local, up_local;          // arriving datagram is for this layer
  logic inj_dn, inj_up, inj_bad;     // where an injected datagram goes

  assign dn_local = (s_dn_flit.dst_layer == MY_ID);
  assign up_local = (s_up_flit.dst_layer == MY_ID);
  assign inj_dn   = (s_inj_flit.dst_layer > MY_ID) &&
                    (32'(s_inj_flit.dst_layer) < N_LAYERS);
  assign inj_up   = (s_inj_flit.dst_layer < MY_ID);
  assign inj_bad  = !inj_dn && !inj_up;

  // requests to the three merge points
  logic dn_pass_req, dn_inj_req;     // into the down FIFO
  logic up_pass_req, up_inj_req;     // into the up FIFO
  logic ej_dn_req, ej_up_req;        // into the interface

  assign dn_pass_req = s_dn_valid && !dn_local;
  assign dn_inj_req  = s_inj_valid && inj_dn;
  assign up_pass_req = s_up_valid && !up_local;
  assign up_inj_req  = s_inj_valid && inj_up;
  assign ej_dn_req   = s_dn_valid && dn_local;
  assign ej_up_req   = s_up_valid && up_local;

  // ---------------- round-robin priorities ----------------
  // rr_* = 1 gives the second request (injection / upward) priority.
  logic rr_dn, rr_up, rr_ej;
  logic dn_pass_gnt, dn_inj_gnt, up_pass_gnt, up_inj_gnt, ej_dn_gnt, ej_up_gnt;

  assign dn_pass_gnt = dn_pass_req && (!dn_inj_req || !rr_dn);
  assign dn_inj_gnt  = dn_inj_req  && (!dn_pass_req || rr_dn);
  assign up_pass_gnt = up_pass_req && (!up_inj_req || !rr_up);
  assign up_inj_gnt  = up_inj_req  && (!up_pass_req || rr_up);
  assign ej_dn_gnt   = ej_dn_req   && (!ej_up_req || !rr_ej);
  assign ej_up_gnt   = ej_up_req   && (!ej_dn_req || rr_ej);

  // ---------------- direction FIFOs ----------------
  logic  dn_fifo_valid, dn_fifo_ready, up_fifo_valid, up_fifo_ready;
  flit_t dn_fifo_flit, up_fifo_flit;

  assign dn_fifo_valid = dn_pass_gnt || dn_inj_gnt;
  assign dn_fifo_flit  = dn_inj_gnt ? s_inj_flit : s_dn_flit;
  assign up_fifo_valid = up_pass_gnt || up_inj_gnt;
  assign up_fifo_flit  = up_inj_gnt ? s_inj_flit : s_up_flit;

  mode_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_dn_fifo (
    .async_mode(dn_async),
    .wclk(clk), .wrst_n(rst_n),
    .s_valid(dn_fifo_valid), .s_ready(dn_fifo_ready), .s_data(dn_fifo_flit),
    .rclk(dn_nbr_clk), .rrst_n(dn_nbr_rst_n),
    .m_valid(m_dn_valid), .m_ready(m_dn_ready), .m_data(m_dn_flit)
  );

  mode_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_up_fifo (
    .async_mode(up_async),
    .wclk(clk), .wrst_n(rst_n),
    .s_valid(up_fifo_valid), .s_ready(up_fifo_ready), .s_data(up_fifo_flit),
    .rclk(up_nbr_clk), .rrst_n(up_nbr_rst_n),
    .m_valid(m_up_valid), .m_ready(m_up_ready), .m_data(m_up_flit)
  );

  // ---------------- eject multiplexer ----------------
  assign m_ej_valid = ej_dn_gnt || ej_up_gnt;
  assign m_ej_flit  = ej_up_gnt ? s_up_flit : s_dn_flit;

  // ---------------- handshake back to the sources ----------------
  assign s_dn_ready  = dn_local ? (ej_dn_gnt && m_ej_ready)
                                : (dn_pass_gnt && dn_fifo_ready);
  assign s_up_ready  = up_local ? (ej_up_gnt && m_ej_ready)
                                : (up_pass_gnt && up_fifo_ready);
  assign s_inj_ready = inj_bad ? 1'b1
                     : inj_dn  ? (dn_inj_gnt && dn_fifo_ready)
                               : (up_inj_gnt && up_fifo_ready);
  assign drop        = s_inj_valid && inj_bad;

  // Priority flips after every contested cycle in which the target accepted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_dn <= 1'b0;
      rr_up <= 1'b0;
      rr_ej <= 1'b0;
    end else begin
      if (dn_pass_req && dn_inj_req && dn_fifo_ready) rr_dn <= !rr_dn;
      if (up_pass_req && up_inj_req && up_fifo_ready) rr_up <= !rr_up;
      if (ej_dn_req && ej_up_req && m_ej_ready)       rr_ej <= !rr_ej;
    end
  end

  // ---------------- handshake and routing rules ----------------
  // A datagram travelling down can only be for this layer or one below it,
  // and one travelling up only for this layer or one above it. A source that
  // is not accepted must keep its datagram until it is.
  logic  dn_stalled_q, up_stalled_q;
  flit_t dn_flit_q, up_flit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_stalled_q <= 1'b0;
      up_stalled_q <= 1'b0;
      dn_flit_q    <= '0;
      up_flit_q    <= '0;
    end else begin
      dn_stalled_q <= s_dn_valid && !s_dn_ready;
      up_stalled_q <= s_up_valid && !s_up_ready;
      dn_flit_q    <= s_dn_flit;
      up_flit_q    <= s_up_flit;
      if (s_dn_valid)
        a_dn_addr: assert (s_dn_flit.dst_layer >= MY_ID)
          else $error("transfer_stage %0d: downward datagram for a layer above", LAYER_ID);
      if (s_up_valid)
        a_up_addr: assert (s_up_flit.dst_layer <= MY_ID)
          else $error("transfer_stage %0d: upward datagram for a layer below", LAYER_ID);
      if (dn_stalled_q)
        a_dn_hold: assert (s_dn_valid && s_dn_flit == dn_flit_q)
          else $error("transfer_stage %0d: s_dn changed while stalled", LAYER_ID);
      if (up_stalled_q)
        a_up_hold: assert (s_up_valid && s_up_flit == up_flit_q)
          else $error("transfer_stage %0d: s_up changed while stalled", LAYER_ID);
    end
  end

endmodule
