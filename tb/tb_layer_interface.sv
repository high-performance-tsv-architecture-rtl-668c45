// tb_layer_interface: self-checking test of the layer-to-bus adapter.
//
// Random datagrams go both ways at once: router -> tx -> inj (layer clock to
// bus clock) and ej -> rx -> router (bus clock to layer clock), each checked
// in order against a queue. Phase 1 runs in synchronous mode with the layer on
// the bus clock and checks the one-cycle latency of each queue. Phase 2
// resets, programs asynchronous mode and runs the layer at a 6 ns period
// against a 10 ns bus clock, checking that data still arrives complete and
// in order, and that the crossing now takes longer than in phase 1.
module tb_layer_interface;
  import tsv_bus_pkg::*;

  logic async_mode = 1'b0;
  logic bus_clk = 1'b0, own_clk = 1'b0, layer_clk;
  logic layer_rst_n = 1'b0, bus_rst_n = 1'b0;
  logic  tx_valid = 0, tx_ready, rx_valid, rx_ready = 0;
  logic  inj_valid, inj_ready = 0, ej_valid = 0, ej_ready;
  flit_t tx_flit = '0, rx_flit, inj_flit, ej_flit = '0;

  always #5 bus_clk = !bus_clk;
  always #3 own_clk = !own_clk;
  assign layer_clk = async_mode ? own_clk : bus_clk;

  layer_interface #(.DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  flit_t tx_q [$], rx_q [$];
  int n_tx = 0, n_rx = 0;

  // layer clock side: tx writes and rx reads
  always @(negedge layer_clk) if (layer_rst_n && bus_rst_n) begin
    if (tx_valid && tx_ready) tx_q.push_back(tx_flit);
    if (rx_valid && rx_ready) begin
      check(rx_q.size() != 0 && rx_flit == rx_q[0], "rx datagram");
      void'(rx_q.pop_front());
      n_rx++;
    end
  end
  // bus clock side: inj reads and ej writes
  always @(negedge bus_clk) if (layer_rst_n && bus_rst_n) begin
    if (ej_valid && ej_ready) rx_q.push_back(ej_flit);
    if (inj_valid && inj_ready) begin
      check(tx_q.size() != 0 && inj_flit == tx_q[0], "inj datagram");
      void'(tx_q.pop_front());
      n_tx++;
    end
  end

  function automatic flit_t rand_flit();
    flit_t f;
    f.dst_layer = layer_addr_t'($urandom);
    f.dst_core  = core_addr_t'($urandom);
    f.payload   = $urandom;
    return f;
  endfunction

  task automatic traffic(input int n);
    fork
      for (int i = 0; i < n; i++) begin      // layer side
        @(negedge layer_clk);
        if (!(tx_valid && !tx_ready)) begin
          @(posedge layer_clk); #1;
          tx_valid = ($urandom_range(0, 3) != 0);
          tx_flit  = rand_flit();
        end else begin
          @(posedge layer_clk); #1;
        end
        rx_ready = ($urandom_range(0, 3) != 0);
      end
      for (int i = 0; i < n; i++) begin      // bus side
        @(negedge bus_clk);
        if (!(ej_valid && !ej_ready)) begin
          @(posedge bus_clk); #1;
          ej_valid = ($urandom_range(0, 3) != 0);
          ej_flit  = rand_flit();
        end else begin
          @(posedge bus_clk); #1;
        end
        inj_ready = ($urandom_range(0, 3) != 0);
      end
    join
    // let the held datagrams go, then drain
    inj_ready = 1'b1; rx_ready = 1'b1;
    @(negedge layer_clk); while (tx_valid && !tx_ready) @(negedge layer_clk);
    @(posedge layer_clk); #1 tx_valid = 1'b0;
    @(negedge bus_clk); while (ej_valid && !ej_ready) @(negedge bus_clk);
    @(posedge bus_clk); #1 ej_valid = 1'b0;
    inj_ready = 1'b1; rx_ready = 1'b1;
    repeat (30) @(posedge bus_clk);
    #1 check(tx_q.size() == 0 && rx_q.size() == 0, "both queues drained");
    inj_ready = 1'b0; rx_ready = 1'b0;
  endtask

  // Cycles of the reading clock from a tx write until inj_valid.
  task automatic tx_latency(output int cyc);
    @(posedge layer_clk); #1 tx_valid = 1'b1; tx_flit = rand_flit();
    @(posedge layer_clk); #1 tx_valid = 1'b0;
    cyc = 0;
    while (!inj_valid && cyc < 20) begin
      @(posedge bus_clk); #1 cyc++;
    end
    inj_ready = 1'b1;
    @(posedge bus_clk); #1 inj_ready = 1'b0;
  endtask

  int lat_sync, lat_async;

  initial begin
    repeat (3) @(posedge bus_clk);
    #1 layer_rst_n = 1'b1; bus_rst_n = 1'b1;
    tx_latency(lat_sync);
    check(lat_sync == 0, "sync mode: inj valid the cycle after the tx write");
    traffic(2000);
    layer_rst_n = 1'b0; bus_rst_n = 1'b0;
    tx_q.delete(); rx_q.delete();
    async_mode = 1'b1;
    repeat (3) @(posedge bus_clk);
    #1 layer_rst_n = 1'b1; bus_rst_n = 1'b1;
    repeat (3) @(posedge bus_clk);
    tx_latency(lat_async);
    check(lat_async > lat_sync, "async mode adds synchronizer delay");
    traffic(2000);
    check(n_tx > 1500 && n_rx > 1500, "traffic in both directions");
    $display("latency sync=%0d async=%0d  n_tx=%0d n_rx=%0d", lat_sync, lat_async, n_tx, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
