// tb_tsv_bus_top: end-to-end test of the 4-layer pipelined bus at its default
// parameters.
//
// 1. Idle-bus latency: everything on one clock and synchronous; every layer
//    sends one datagram to every other layer, one at a time; each must reach
//    the destination router port |dst - src| + 1 cycles after it was written.
// 2. Uniform traffic, everything synchronous on one clock: every layer sends
//    random datagrams to random other layers and random IP cores (16 per
//    layer), with phases of heavy back-pressure from the receiving routers.
// 3. Asynchronous interfaces: the stages share the 10 ns bus clock, each layer
//    runs on its own clock (8, 12, 14 and 18 ns periods).
// 4. Globally asynchronous bus: every stage runs on its layer's clock (same
//    four periods), all segments asynchronous, interfaces synchronous.
// 5. Mesochronous bus: every stage on a 10 ns clock with its own phase (0, 2,
//    5 and 7 ns), all segments asynchronous.
// Every received datagram is checked against a per-(source, destination)
// queue: right layer, right contents, in order, none lost. The testbench also
// counts, inside the stages, each mechanism of the bus: forwarding and
// injection in both directions, ejection, contention at a merge point, stalls
// on a bus link, both links of a segment busy in the same cycle, all segments
// busy in the same cycle, drops of self-addressed injections, and traffic in
// each clocking arrangement. A mechanism that never happens is a failure.
module tb_tsv_bus_top;
  import tsv_bus_pkg::*;

  localparam int NL = N_LAYERS_DEF;

  logic          bus_clk = 1'b0;
  logic [NL-1:0] own_clk = '0, meso_clk = '0;
  logic [NL-1:0] ts_clk, ts_rst_n = '0, layer_clk, layer_rst_n = '0;
  logic [NL-2:0] seg_async = '0;
  logic [NL-1:0] if_async = '0;
  int            ts_sel = 0;       // stage clocks: 0 bus_clk, 1 own_clk, 2 meso_clk
  logic          bus_rst_n;
  logic [NL-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '0, drop;
  flit_t         tx_flit [NL];
  flit_t         rx_flit [NL];

  tsv_bus_top dut (.*);

  always #5 bus_clk = !bus_clk;
  always #4 own_clk[0] = !own_clk[0];
  always #6 own_clk[1] = !own_clk[1];
  always #7 own_clk[2] = !own_clk[2];
  always #9 own_clk[3] = !own_clk[3];
  initial begin
    #2; forever #5 meso_clk[1] = !meso_clk[1];
  end
  initial begin
    #5; forever #5 meso_clk[2] = !meso_clk[2];
  end
  initial begin
    #7; forever #5 meso_clk[3] = !meso_clk[3];
  end
  always #5 meso_clk[0] = !meso_clk[0];
  for (genvar i = 0; i < NL; i++) begin : g_clk
    assign ts_clk[i]    = (ts_sel == 1) ? own_clk[i] : (ts_sel == 2) ? meso_clk[i] : bus_clk;
    assign layer_clk[i] = if_async[i] ? own_clk[i] : ts_clk[i];
  end
  assign bus_rst_n = &ts_rst_n;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- traffic generation and scoreboard ----------------
  flit_t   exp_q [NL][NL][$];
  int      seq [NL];
  int      n_rx [NL];
  int      load_pct = 0;      // chance per cycle that a layer offers a datagram
  int      ready_pct = 100;   // chance per cycle that a router accepts
  int      self_pct = 0;      // share of self-addressed (dropped) datagrams
  longint  lat_sum = 0, lat_n = 0;
  longint  t_sent [NL][int];

  function automatic flit_t new_flit(input int src);
    flit_t f;
    int d;
    if ($urandom_range(0, 99) < self_pct) d = src;
    else begin
      d = $urandom_range(0, NL - 2);
      if (d >= src) d++;
    end
    f.dst_layer = layer_addr_t'(d);
    f.dst_core  = core_addr_t'($urandom_range(0, CORES_PER_LAYER - 1));
    f.payload   = {8'(src), 24'(seq[src])};
    seq[src]++;
    return f;
  endfunction

  for (genvar i = 0; i < NL; i++) begin : g_port
    always @(posedge layer_clk[i]) begin
      if (layer_rst_n[i] && bus_rst_n) begin
        // a datagram written this edge
        if (tx_valid[i] && tx_ready[i] && tx_flit[i].dst_layer != layer_addr_t'(i)) begin
          exp_q[i][tx_flit[i].dst_layer].push_back(tx_flit[i]);
          t_sent[i][int'(tx_flit[i].payload[23:0])] = $time;
        end
        // a datagram read this edge
        if (rx_valid[i] && rx_ready[i]) begin
          automatic int s = int'(rx_flit[i].payload[31:24]);
          checks++;
          if (s >= NL || rx_flit[i].dst_layer != layer_addr_t'(i) ||
              exp_q[s][i].size() == 0 || exp_q[s][i][0] != rx_flit[i]) begin
            failures++;
            $display("FAIL layer %0d received unexpected %h at %0t", i, rx_flit[i], $time);
          end else begin
            void'(exp_q[s][i].pop_front());
            lat_sum += $time - t_sent[s][int'(rx_flit[i].payload[23:0])];
            lat_n++;
            t_sent[s].delete(int'(rx_flit[i].payload[23:0]));
          end
          n_rx[i]++;
        end
        // new stimulus, holding a datagram that was not taken
        if (!tx_valid[i] || tx_ready[i]) begin
          tx_valid[i] <= ($urandom_range(0, 99) < load_pct);
          tx_flit[i]  <= new_flit(i);
        end
        rx_ready[i] <= ($urandom_range(0, 99) < ready_pct);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int c_fwd_dn = 0, c_fwd_up = 0, c_inj_dn = 0, c_inj_up = 0, c_eject = 0;
  int c_contest_fifo = 0, c_contest_ej = 0, c_stall = 0, c_drop = 0;
  int c_bidir = 0, c_all_seg = 0, c_rx_sync = 0, c_rx_async = 0, c_rx_gals = 0, c_rx_meso = 0;
  int seg_busy;

  for (genvar i = 0; i < NL; i++) begin : g_mon
    always @(posedge ts_clk[i]) if (bus_rst_n) begin
      if (dut.g_layer[i].u_ts.dn_pass_gnt && dut.g_layer[i].u_ts.dn_fifo_ready) c_fwd_dn++;
      if (dut.g_layer[i].u_ts.up_pass_gnt && dut.g_layer[i].u_ts.up_fifo_ready) c_fwd_up++;
      if (dut.g_layer[i].u_ts.dn_inj_gnt  && dut.g_layer[i].u_ts.dn_fifo_ready) c_inj_dn++;
      if (dut.g_layer[i].u_ts.up_inj_gnt  && dut.g_layer[i].u_ts.up_fifo_ready) c_inj_up++;
      if (dut.g_layer[i].u_ts.m_ej_valid  && dut.g_layer[i].u_ts.m_ej_ready)    c_eject++;
      if ((dut.g_layer[i].u_ts.dn_pass_req && dut.g_layer[i].u_ts.dn_inj_req) ||
          (dut.g_layer[i].u_ts.up_pass_req && dut.g_layer[i].u_ts.up_inj_req)) c_contest_fifo++;
      if (dut.g_layer[i].u_ts.ej_dn_req && dut.g_layer[i].u_ts.ej_up_req) c_contest_ej++;
      if ((dut.g_layer[i].u_ts.s_dn_valid && !dut.g_layer[i].u_ts.s_dn_ready) ||
          (dut.g_layer[i].u_ts.s_up_valid && !dut.g_layer[i].u_ts.s_up_ready)) c_stall++;
      if (drop[i]) c_drop++;
    end
  end

  // Segment activity, observed while all stages share bus_clk.
  always @(posedge bus_clk) if (bus_rst_n && ts_sel == 0) begin
    seg_busy = 0;
    for (int s = 1; s < NL; s++) begin
      automatic bit d = dut.dn_valid[s] && dut.dn_ready[s];
      automatic bit u = dut.up_valid[s] && dut.up_ready[s];
      if (d && u) c_bidir++;
      if (d || u) seg_busy++;
    end
    if (seg_busy == NL - 1) c_all_seg++;
  end

  // ---------------- phases ----------------
  task automatic reset_all(input int sel, input logic [NL-2:0] seg_mode,
                           input logic [NL-1:0] if_mode);
    ts_rst_n = '0; layer_rst_n = '0;
    tx_valid = '0; load_pct = 0;
    repeat (2) @(posedge bus_clk);
    ts_sel = sel; seg_async = seg_mode; if_async = if_mode;
    for (int s = 0; s < NL; s++)
      for (int d = 0; d < NL; d++) exp_q[s][d].delete();
    repeat (4) @(posedge bus_clk);
    #1 ts_rst_n = '1; layer_rst_n = '1;
    repeat (4) @(posedge bus_clk);
  endtask

  task automatic drain();
    load_pct = 0; ready_pct = 100;
    repeat (200) @(posedge bus_clk);
    for (int s = 0; s < NL; s++)
      for (int d = 0; d < NL; d++)
        check(exp_q[s][d].size() == 0, "every datagram delivered");
  endtask

  function automatic int total_rx();
    int t = 0;
    for (int i = 0; i < NL; i++) t += n_rx[i];
    return t;
  endfunction

  // One datagram on an idle bus, in synchronous mode; returns the cycles
  // from the bus-clock edge that wrote it to the edge after which rx_valid shows.
  task automatic one_shot(input int src, input int dst, output int cyc);
    flit_t f;
    f.dst_layer = layer_addr_t'(dst);
    f.dst_core  = core_addr_t'(dst * 3);
    f.payload   = {8'(src), 24'(seq[src])};
    seq[src]++;
    @(posedge bus_clk); #1;
    tx_valid[src] = 1'b1; tx_flit[src] = f;
    @(posedge bus_clk); #1 tx_valid[src] = 1'b0;
    cyc = 0;
    while (!rx_valid[dst] && cyc < 30) begin
      @(posedge bus_clk); #1 cyc++;
    end
    repeat (3) @(posedge bus_clk);
  endtask

  int lat;

  task automatic run_uniform(input int sel, input logic [NL-2:0] seg_mode,
                             input logic [NL-1:0] if_mode, output int n_done,
                             input string name);
    int n_start;
    reset_all(sel, seg_mode, if_mode);
    n_start = total_rx();
    lat_sum = 0; lat_n = 0;
    self_pct = 3;
    load_pct = 40; ready_pct = 100; repeat (1500) @(posedge bus_clk);
    load_pct = 70; ready_pct = 30;  repeat (1500) @(posedge bus_clk);
    self_pct = 0;
    drain();
    n_done = total_rx() - n_start;
    $display("%s: %0d datagrams, mean latency %0d ns", name, n_done,
             (lat_n == 0) ? 0 : lat_sum / lat_n);
  endtask

  initial begin
    for (int i = 0; i < NL; i++) tx_flit[i] = '0;
    // 1. latency on an idle bus, synchronous mode
    reset_all(0, '0, '0);
    ready_pct = 100;
    for (int s = 0; s < NL; s++)
      for (int d = 0; d < NL; d++)
        if (s != d) begin
          one_shot(s, d, lat);
          check(lat == ((s > d) ? s - d : d - s) + 1,
                $sformatf("latency %0d -> %0d is |dst-src|+1 cycles (got %0d)", s, d, lat));
        end
    // 2. uniform traffic, everything synchronous
    run_uniform(0, '0, '0, c_rx_sync, "synchronous");
    // 3. asynchronous interfaces, stages on the bus clock
    run_uniform(0, '0, '1, c_rx_async, "async interfaces");
    // 4. every stage in its own clock domain, asynchronous segments
    run_uniform(1, '1, '0, c_rx_gals, "GALS bus");
    // 5. mesochronous stages, asynchronous segments
    run_uniform(2, '1, '0, c_rx_meso, "mesochronous bus");

    $display("forward dn=%0d up=%0d inject dn=%0d up=%0d eject=%0d", c_fwd_dn, c_fwd_up, c_inj_dn, c_inj_up, c_eject);
    $display("contest fifo=%0d eject=%0d stalls=%0d bidir=%0d all_segments=%0d drops=%0d",
             c_contest_fifo, c_contest_ej, c_stall, c_bidir, c_all_seg, c_drop);
    check(c_fwd_dn > 0,       "mechanism: forwarding down");
    check(c_fwd_up > 0,       "mechanism: forwarding up");
    check(c_inj_dn > 0,       "mechanism: injection down");
    check(c_inj_up > 0,       "mechanism: injection up");
    check(c_eject > 0,        "mechanism: ejection");
    check(c_contest_fifo > 0, "mechanism: contention at a direction FIFO");
    check(c_contest_ej > 0,   "mechanism: contention at the eject port");
    check(c_stall > 0,        "mechanism: stall on a bus link");
    check(c_bidir > 0,        "mechanism: both links of a segment in one cycle");
    check(c_all_seg > 0,      "mechanism: all segments busy in one cycle");
    check(c_drop > 0,         "mechanism: drop of a self-addressed datagram");
    check(c_rx_sync > 1000,   "mechanism: synchronous-mode traffic");
    check(c_rx_async > 1000,  "mechanism: traffic through asynchronous interfaces");
    check(c_rx_gals > 1000,   "mechanism: traffic over asynchronous segments, own clocks");
    check(c_rx_meso > 1000,   "mechanism: traffic over asynchronous segments, mesochronous");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
