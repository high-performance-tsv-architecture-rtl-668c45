// tb_mode_fifo: self-checking test of the dual-clock FIFO in both modes.
//
// Phase 1 runs in synchronous mode with one clock on both sides and checks
// the one-cycle write-to-read latency. Phase 2 resets, selects asynchronous
// mode and runs the writer at 10 ns and the reader at 14 ns periods, checking
// that a word needs more than the synchronizer delay to appear. In both phases
// random traffic is checked word by word against a queue, the FIFO must
// never accept more than DEPTH words, and nothing may be lost or duplicated.
module tb_mode_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 4;

  logic async_mode = 1'b0;
  logic fast_clk = 1'b0, slow_clk = 1'b0;
  logic wclk, rclk;
  logic wrst_n = 1'b0, rrst_n = 1'b0;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0;
  logic [WIDTH-1:0] s_data = '0, m_data;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  int n_wr = 0, n_rd = 0, n_full = 0;

  always #5 fast_clk = !fast_clk;
  always #7 slow_clk = !slow_clk;
  assign wclk = fast_clk;
  assign rclk = async_mode ? slow_clk : fast_clk;

  mode_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Writes, sampled on the writer's falling edge.
  always @(negedge wclk) if (wrst_n && rrst_n) begin
    check(model.size() <= DEPTH, "never more than DEPTH words");
    if (!s_ready) n_full++;
    if (s_valid && s_ready) begin
      model.push_back(s_data);
      n_wr++;
    end
  end
  // Reads, sampled on the reader's falling edge.
  always @(negedge rclk) if (wrst_n && rrst_n) begin
    if (m_valid && m_ready) begin
      check(model.size() != 0 && m_data == model[0], "read data");
      void'(model.pop_front());
      n_rd++;
    end
  end

  task automatic run_traffic(input int n);
    fork
      for (int i = 0; i < n; i++) begin
        @(posedge wclk); #1;
        s_valid = ($urandom_range(0, 3) != 0);
        s_data  = WIDTH'($urandom);
      end
      for (int i = 0; i < n; i++) begin
        @(posedge rclk); #1;
        m_ready = ($urandom_range(0, 3) != 0);
      end
    join
    @(posedge wclk); #1 s_valid = 1'b0;
    m_ready = 1'b1;
    repeat (4 * DEPTH + 10) @(posedge rclk);
    #1 check(model.size() == 0 && !m_valid, "drained");
    check(n_wr == n_rd && n_wr > n / 3, "all words delivered");
    m_ready = 1'b0;
  endtask

  // Time from a write into the empty FIFO until m_valid, in reader cycles.
  task automatic measure_latency(output int cycles);
    @(posedge wclk); #1 s_valid = 1'b1; s_data = 16'h1234;
    @(posedge wclk); #1 s_valid = 1'b0;
    cycles = 0;
    while (!m_valid && cycles < 20) begin
      @(posedge rclk); #1 cycles++;
    end
    check(m_data == 16'h1234, "latency word");
    m_ready = 1'b1;
    @(posedge rclk); #1 m_ready = 1'b0;
  endtask

  int lat;

  initial begin
    // Phase 1: synchronous mode.
    repeat (3) @(posedge wclk);
    #1 wrst_n = 1'b1; rrst_n = 1'b1;
    measure_latency(lat);
    check(lat == 0, "sync mode: word readable the cycle after the write");
    run_traffic(2000);
    // Phase 2: asynchronous mode, unrelated clocks.
    wrst_n = 1'b0; rrst_n = 1'b0;
    n_wr = 0; n_rd = 0; model.delete();
    async_mode = 1'b1;
    repeat (3) @(posedge slow_clk);
    #1 wrst_n = 1'b1; rrst_n = 1'b1;
    repeat (3) @(posedge slow_clk);
    measure_latency(lat);
    check(lat >= 1 && lat <= 3, "async mode: synchronizer delay");
    run_traffic(2000);
    check(n_full > 50, "FIFO ran full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
