// mode_fifo: dual-clock FIFO with a programmable synchronous/asynchronous
// pointer crossing.
//
// This is every queue of the bus: the two direction FIFOs of each transfer
// stage, which carry a bus segment from one stage's clock domain into the
// next, and the two queues of each layer interface, between the layer's clock
// and its stage's clock. Read and write pointers are DEPTH-wrapping binary
// counters with one extra lap bit, each also kept in Gray code. Each side sees
// the other side's Gray pointer either
//   * async_mode = 1: through SYNC_STAGES flip-flops clocked by its own clock,
//     the usual safe crossing between unrelated or skewed (mesochronous)
//     clocks, or
//   * async_mode = 0: directly, which is only legal when wclk and rclk are the
//     same clock; it removes the synchronizer latency so a word written in one
//     cycle can be read in the next.
// That the bus can be programmed to either mode comes from the architecture;
// realising the mode as a synchronizer bypass on a Gray-pointer FIFO is this
// design's choice, as are the depth and the synchronizer length.
//
// Interface: s_valid/s_ready/s_data on wclk, m_valid/m_ready/m_data on rclk,
// first-word-fall-through. async_mode must be static while either side runs;
// change it only while both resets are asserted. DEPTH must be a power of two.
module mode_fifo #(
  parameter int unsigned WIDTH       = tsv_bus_pkg::FLIT_W,
  parameter int unsigned DEPTH       = 4,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             async_mode,
  // write side
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [WIDTH-1:0] s_data,
  // read side
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [WIDTH-1:0] m_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  if (DEPTH < 2 || (DEPTH & (DEPTH - 1)) != 0) begin : g_bad_depth
    $error("mode_fifo: DEPTH must be a power of two and at least 2");
  end

  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t wgray_sync [SYNC_STAGES];   // write pointer seen on rclk
  ptr_t rgray_sync [SYNC_STAGES];   // read pointer seen on wclk
  ptr_t wgray_seen, rgray_seen;     // after the mode selection
  ptr_t wbin_seen, rbin_seen;
  logic do_wr, do_rd;

  // ---------------- write side ----------------
  assign rgray_seen = async_mode ? rgray_sync[SYNC_STAGES-1] : rgray;
  assign rbin_seen  = gray2bin(rgray_seen);
  assign s_ready    = !((wbin[AW] != rbin_seen[AW]) &&
                        (wbin[AW-1:0] == rbin_seen[AW-1:0]));
  assign do_wr      = s_valid && s_ready;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      for (int i = 0; i < int'(SYNC_STAGES); i++) rgray_sync[i] <= '0;
    end else begin
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
      rgray_sync[0] <= rgray;
      for (int i = 1; i < int'(SYNC_STAGES); i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= s_data;
  end

  // ---------------- read side ----------------
  assign wgray_seen = async_mode ? wgray_sync[SYNC_STAGES-1] : wgray;
  assign wbin_seen  = gray2bin(wgray_seen);
  assign m_valid    = (rbin != wbin_seen);
  assign m_data     = mem[rbin[AW-1:0]];
  assign do_rd      = m_valid && m_ready;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      for (int i = 0; i < int'(SYNC_STAGES); i++) wgray_sync[i] <= '0;
    end else begin
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
      wgray_sync[0] <= wgray;
      for (int i = 1; i < int'(SYNC_STAGES); i++) wgray_sync[i] <= wgray_sync[i-1];
    end
  end

endmodule
