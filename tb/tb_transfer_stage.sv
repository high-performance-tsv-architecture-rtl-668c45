// tb_transfer_stage: self-checking test of one transfer stage.
//
// The stage under test is layer 1 of a 4-layer bus, with both neighbouring
// stages on its own clock (synchronous segments). Three random sources
// drive it: downward traffic from above (destination layers 1..3), upward
// traffic from below (layers 0..1) and injections from the interface (layers
// 0, 2, 3, and now and then 1, which must be dropped). Each datagram carries
// its source and a sequence number in the payload. Three random sinks take
// m_dn, m_up and m_ej. The checks:
//   * every datagram leaves on the port its destination calls for, in order
//     per source, and none is lost (queues empty at the end);
//   * at a contested merge point the winner follows the testbench's own
//     alternating-priority model and the loser is held off;
//   * an idle pass-through takes one cycle, an ejection none;
//   * a misaddressed injection is consumed with a drop pulse.
module tb_transfer_stage;
  import tsv_bus_pkg::*;

  localparam int unsigned ID = 1;
  localparam int unsigned NL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic  s_dn_valid = 0, s_dn_ready, m_dn_valid, m_dn_ready = 0;
  logic  s_up_valid = 0, s_up_ready, m_up_valid, m_up_ready = 0;
  logic  s_inj_valid = 0, s_inj_ready, m_ej_valid, m_ej_ready = 0;
  flit_t s_dn_flit = '0, m_dn_flit, s_up_flit = '0, m_up_flit, s_inj_flit = '0, m_ej_flit;
  logic  drop;
  // both neighbours share this stage's clock: synchronous segments
  logic  dn_nbr_clk, dn_nbr_rst_n, up_nbr_clk, up_nbr_rst_n;
  logic  dn_async = 1'b0, up_async = 1'b0;
  assign dn_nbr_clk = clk;
  assign up_nbr_clk = clk;
  assign dn_nbr_rst_n = rst_n;
  assign up_nbr_rst_n = rst_n;

  transfer_stage #(.LAYER_ID(ID), .N_LAYERS(NL), .DEPTH(4)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected traffic, one queue per (output port, source).
  // Output ports: 0 = m_dn, 1 = m_up, 2 = m_ej. Sources: 0 = dn, 1 = up, 2 = inj.
  flit_t exp_q [3][3][$];
  int    seq [3];
  int    n_out [3];
  int    n_drop = 0, n_contest [3], n_drop_seen = 0;
  bit    rr [3];   // model of the three priority bits: 0 pass/dn first, 1 inj/up first

  function automatic int out_port(input int src, input flit_t f);
    if (f.dst_layer == layer_addr_t'(ID)) return 2;
    return (f.dst_layer > layer_addr_t'(ID)) ? 0 : 1;
  endfunction

  function automatic flit_t make_flit(input int src);
    flit_t f;
    int d;
    case (src)
      0: d = $urandom_range(1, 3);
      1: d = $urandom_range(0, 1);
      default: begin
        d = $urandom_range(0, 9);
        d = (d < 4) ? 0 : (d < 6) ? 2 : (d < 9) ? 3 : 1;
      end
    endcase
    f.dst_layer = layer_addr_t'(d);
    f.dst_core  = core_addr_t'($urandom);
    f.payload   = {2'(src), 14'(seq[src]), 16'($urandom)};
    seq[src]++;
    return f;
  endfunction

  // Arbitration model for one merge point: a/b request, ra/rb the readies seen.
  task automatic check_arb(input int k, input bit a, input bit b, input bit ra, input bit rb);
    if (a && b) begin
      n_contest[k]++;
      if (!rr[k]) check(rb == 0, "loser held off (first source has priority)");
      else        check(ra == 0, "loser held off (second source has priority)");
      if (ra || rb) begin
        check(rr[k] ? rb : ra, "winner follows alternating priority");
        rr[k] = !rr[k];
      end
    end
  endtask

  logic acc_dn, acc_up, acc_inj;
  logic dn_loc, up_loc;
  logic inj_to_dn, inj_to_up;

  always @(negedge clk) if (rst_n) begin
    acc_dn  = s_dn_valid && s_dn_ready;
    acc_up  = s_up_valid && s_up_ready;
    acc_inj = s_inj_valid && s_inj_ready;
    dn_loc  = s_dn_flit.dst_layer == layer_addr_t'(ID);
    up_loc  = s_up_flit.dst_layer == layer_addr_t'(ID);
    inj_to_dn = s_inj_flit.dst_layer > layer_addr_t'(ID);
    inj_to_up = s_inj_flit.dst_layer < layer_addr_t'(ID);
    // merge points: 0 down FIFO, 1 up FIFO, 2 eject
    check_arb(0, s_dn_valid && !dn_loc, s_inj_valid && inj_to_dn,
              s_dn_ready && !dn_loc, s_inj_ready && inj_to_dn);
    check_arb(1, s_up_valid && !up_loc, s_inj_valid && inj_to_up,
              s_up_ready && !up_loc, s_inj_ready && inj_to_up);
    check_arb(2, s_dn_valid && dn_loc, s_up_valid && up_loc,
              s_dn_ready && dn_loc, s_up_ready && up_loc);
    // drop of a misaddressed injection
    check(drop == (s_inj_valid && !inj_to_dn && !inj_to_up), "drop pulse");
    if (drop) begin
      check(s_inj_ready, "dropped datagram consumed");
      n_drop_seen++;
    end
    // inputs accepted this cycle (first: an ejection leaves in the same cycle)
    if (acc_dn)  exp_q[out_port(0, s_dn_flit)][0].push_back(s_dn_flit);
    if (acc_up)  exp_q[out_port(1, s_up_flit)][1].push_back(s_up_flit);
    if (acc_inj && (inj_to_dn || inj_to_up))
      exp_q[out_port(2, s_inj_flit)][2].push_back(s_inj_flit);
    // outputs leaving this cycle
    if (m_dn_valid && m_dn_ready) pop_expect(0, m_dn_flit);
    if (m_up_valid && m_up_ready) pop_expect(1, m_up_flit);
    if (m_ej_valid && m_ej_ready) pop_expect(2, m_ej_flit);
  end

  task automatic pop_expect(input int port, input flit_t f);
    int src = int'(f.payload[31:30]);
    checks++;
    if (src > 2 || exp_q[port][src].size() == 0 || exp_q[port][src][0] != f) begin
      failures++;
      $display("FAIL port %0d got unexpected datagram %h at %0t", port, f, $time);
    end else begin
      void'(exp_q[port][src].pop_front());
      n_out[port]++;
    end
  endtask

  // Random sources that hold their datagram until it is taken.
  bit hold_dn, hold_up, hold_inj;
  task automatic drive_random(input int n, input int ready_pct);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      hold_dn  = s_dn_valid && !s_dn_ready;
      hold_up  = s_up_valid && !s_up_ready;
      hold_inj = s_inj_valid && !s_inj_ready;
      @(posedge clk); #1;
      if (!hold_dn) begin
        s_dn_valid = ($urandom_range(0, 99) < 60);
        s_dn_flit  = make_flit(0);
      end
      if (!hold_up) begin
        s_up_valid = ($urandom_range(0, 99) < 60);
        s_up_flit  = make_flit(1);
      end
      if (!hold_inj) begin
        s_inj_valid = ($urandom_range(0, 99) < 60);
        s_inj_flit  = make_flit(2);
      end
      m_dn_ready = ($urandom_range(0, 99) < ready_pct);
      m_up_ready = ($urandom_range(0, 99) < ready_pct);
      m_ej_ready = ($urandom_range(0, 99) < ready_pct);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: pass-through latency of one cycle.
    m_dn_ready = 1'b0;
    s_dn_valid = 1'b1; s_dn_flit = make_flit(0); s_dn_flit.dst_layer = 2'd3;
    #1 check(s_dn_ready && !m_dn_valid, "pass-through accepted, output still empty");
    @(posedge clk); #1 s_dn_valid = 1'b0;
    check(m_dn_valid && m_dn_flit == exp_q[0][0][0], "pass-through visible one cycle later");
    m_dn_ready = 1'b1;
    @(posedge clk); #1 m_dn_ready = 1'b0;
    // Directed: ejection in the same cycle.
    m_ej_ready = 1'b1;
    s_up_valid = 1'b1; s_up_flit = make_flit(1); s_up_flit.dst_layer = 2'd1;
    #1 check(m_ej_valid && m_ej_flit == s_up_flit && s_up_ready, "ejection without delay");
    @(posedge clk); #1 s_up_valid = 1'b0; m_ej_ready = 1'b0;
    // Random phases: free-flowing, then heavy back-pressure.
    drive_random(3000, 90);
    drive_random(3000, 30);
    // Drain.
    @(negedge clk);
    while (s_dn_valid || s_up_valid || s_inj_valid) begin
      hold_dn  = s_dn_valid && !s_dn_ready;
      hold_up  = s_up_valid && !s_up_ready;
      hold_inj = s_inj_valid && !s_inj_ready;
      m_dn_ready = 1'b1; m_up_ready = 1'b1; m_ej_ready = 1'b1;
      @(posedge clk); #1;
      if (!hold_dn) s_dn_valid = 1'b0;
      if (!hold_up) s_up_valid = 1'b0;
      if (!hold_inj) s_inj_valid = 1'b0;
      @(negedge clk);
    end
    m_dn_ready = 1'b1; m_up_ready = 1'b1; m_ej_ready = 1'b1;
    repeat (10) @(posedge clk);
    #1;
    for (int p = 0; p < 3; p++)
      for (int s = 0; s < 3; s++)
        check(exp_q[p][s].size() == 0, "every datagram delivered");
    for (int k = 0; k < 3; k++) begin
      check(n_contest[k] > 20, "merge point contested");
      check(n_out[k] > 200, "traffic through each output");
    end
    check(n_drop_seen > 20, "drops exercised");
    $display("contested: dn=%0d up=%0d ej=%0d  out: dn=%0d up=%0d ej=%0d drops=%0d",
             n_contest[0], n_contest[1], n_contest[2], n_out[0], n_out[1], n_out[2], n_drop_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
