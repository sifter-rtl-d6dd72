// tb_workload_flow_convergence: the single-bottleneck flow-convergence workload on
// the full harness at its default sizes, with STFQ ranks.
//
// Eight flows share the 100 Gb/s output link. Flow 1 starts alone, and every phase
// another flow joins, until all eight are active. Then the most recent flow leaves
// each phase, until flow 1 is alone again. That makes 15 phases of PHASE_PKTS
// departures each. Each sender is closed-loop: it keeps at most WINDOW packets of
// its flow between the host port and the output line. Together the senders push
// descriptors in unpaced (in_burst), so the output link is the bottleneck and the
// scheduler decides the shares. The published experiment is a network simulation
// with 10 Gb/s links and a transport protocol; the window senders, the 370-byte
// packets and the phase length are this testbench's own stand-ins.
//
// With eight equal flows the STFQ ranks move in step, so up to eight descriptors
// fall into one 10-rank calendar range while a calendar FIFO holds six at the
// default sizes. A few descriptors are then dropped, as a switch with a full buffer
// would drop them (about 4% here). A drop gives the window credit back, as if the
// sender saw the loss and sent again. With FIFO_SIZE_TB set to 8 or more, one slot per
// flow, nothing is dropped.
//
// Checks:
//  * every departure has the smallest rank held by the scheduler (what an ideal
//    PIFO would send), so no packet inversion happens;
//  * no descriptor is dropped when a calendar FIFO has a slot per flow, and fewer
//    than 10% are dropped otherwise;
//  * in the settled part of each phase (after SETTLE departures), every active flow
//    gets 1/n of the departures, within 2% of the phase plus two packets, and a flow
//    that is not active gets none;
//  * the output stays at the 100 Gb/s line rate.
// A table of per-flow throughput per phase is printed, like the published plot.
module tb_workload_flow_convergence;
  localparam int unsigned FIFO_SIZE_TB = sifter_pkg::FIFO_SIZE;  // S_F of the harness
  import sifter_pkg::*;
  localparam int unsigned NFLOW      = 8;
  localparam int unsigned WINDOW     = 3;
  localparam int unsigned PHASE_PKTS = 1000;
  localparam int unsigned SETTLE     = 100;
  localparam int unsigned NPHASE     = 2 * NFLOW - 1;
  localparam int unsigned PKT_LEN    = 370;
  localparam real         CLK_HZ     = 322.0e6;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        host_in_valid = 1'b0, run = 1'b0, in_burst = 1'b1;
  pkt_info_t   host_in_info = '0;
  logic        host_in_ready, sifting;
  logic [14:0] in_buf_count;
  logic [13:0] rec_rd_addr = '0;
  desc_t       rec_rd_data, last_drop;
  logic [31:0] rec_count, rec_order_drops, rec_last_rank;
  logic [31:0] stat_drops, stat_sift_passes, stat_evictions, stat_deq_holds, stat_send_backs;
  logic [31:0] sentinel, vtime;
  logic [2:0]  pifo_count;
  logic [$clog2(sifter_pkg::NUM_FIFOS*FIFO_SIZE_TB+1)-1:0] rcq_count;

  sifter_testbed_top #(.FIFO_SIZE_P(FIFO_SIZE_TB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] held[$];
  int  outstanding [NFLOW];
  int  phase_cnt [NFLOW];
  int  phase_deps = 0;
  int  phase = 0;
  int  n_active = 1;
  longint cyc = 0, t_first = -1, t_last = -1;
  longint total_deps = 0;
  int  n_lost = 0;
  real wire_bits = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // active flows in a phase: 1..n with n = phase+1 rising, then falling
  function automatic int active_in(input int ph);
    return (ph < int'(NFLOW)) ? ph + 1 : 2 * int'(NFLOW) - 1 - ph;
  endfunction

  // ideal-PIFO reference: every departure must carry the smallest held rank
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_sched.deq_valid && dut.u_sched.deq_ready) begin
      logic [63:0] d;
      int idx;
      d = {dut.u_sched.deq_rank, dut.u_sched.deq_data};
      idx = -1;
      foreach (held[i]) if (held[i] == d) idx = i;
      check(idx >= 0, "departing descriptor was held");
      if (idx >= 0) held.delete(idx);
      foreach (held[i]) if (held[i][63:32] < d[63:32]) check(1'b0, "packet inversion");
    end
    if (dut.u_sched.enq_valid && dut.u_sched.enq_ready)
      held.push_back({dut.u_sched.enq_rank, dut.u_sched.enq_data});
    if (dut.u_sched.drop) begin
      logic [63:0] d;
      int idx;
      d = {dut.u_sched.drop_rank, dut.u_sched.drop_data};
      idx = -1;
      foreach (held[i]) if (held[i] == d) idx = i;
      check(idx >= 0, "dropped descriptor was held");
      if (idx >= 0) held.delete(idx);
      outstanding[int'(dut.u_sched.drop_data[31:16])]--;  // loss seen, sender resends
      n_lost++;
    end
  end

  // closed-loop senders: one descriptor per clock, round robin over the active
  // flows that have fewer than WINDOW packets outstanding
  int rr = 0;
  always @(negedge clk) if (rst_n && run) begin
    int f, pick;
    if (host_in_valid && host_in_ready) outstanding[int'(host_in_info.flow)]++;
    pick = -1;
    for (int k = 0; k < int'(NFLOW); k++) begin
      f = (rr + k) % int'(NFLOW);
      if (pick < 0 && f < n_active && outstanding[f] < int'(WINDOW)) pick = f;
    end
    host_in_valid = (pick >= 0);
    if (pick >= 0) begin
      host_in_info = '{flow: 16'(pick), len: 16'(PKT_LEN)};
      rr = (pick + 1) % int'(NFLOW);
    end
  end

  // departures on the line: window credit back, per-phase counts
  always @(posedge clk) if (rst_n && dut.tx_valid) begin
    int f;
    f = int'(dut.tx_desc.info.flow);
    outstanding[f]--;
    if (t_first < 0) t_first = cyc;
    else wire_bits += 8.0 * real'(dut.tx_desc.info.len);
    t_last = cyc;
    total_deps++;
    phase_deps++;
    if (phase_deps > int'(SETTLE)) phase_cnt[f]++;
  end

  initial begin
    int  n, meas, tol;
    real secs, gbps;
    string line;
    foreach (outstanding[i]) outstanding[i] = 0;
    foreach (phase_cnt[i]) phase_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    $display("phase  flows  per-flow throughput in Gb/s (flows 1..8)");
    for (phase = 0; phase < int'(NPHASE); phase++) begin
      n_active = active_in(phase);
      @(negedge clk);
      phase_deps = 0;
      foreach (phase_cnt[i]) phase_cnt[i] = 0;
      wait (phase_deps >= int'(PHASE_PKTS));
      @(negedge clk);
      n = active_in(phase);
      meas = 0;
      foreach (phase_cnt[i]) meas += phase_cnt[i];
      tol = meas / 50 + 2;
      line = "";
      for (int f = 0; f < int'(NFLOW); f++) begin
        line = {line, $sformatf(" %6.2f", 100.0 * real'(phase_cnt[f]) / real'(meas))};
        if (f < n)
          check(phase_cnt[f] >= meas / n - tol && phase_cnt[f] <= meas / n + tol,
                $sformatf("phase %0d flow %0d fair share (%0d of %0d, %0d flows)",
                          phase, f + 1, phase_cnt[f], meas, n));
        else
          check(phase_cnt[f] == 0, $sformatf("phase %0d inactive flow %0d served", phase, f + 1));
      end
      $display("%5d  %5d %s", phase, n, line);
    end
    run = 1'b0;
    host_in_valid = 1'b0;
    wait (held.size() == 0);
    repeat (50) @(negedge clk);
    secs = real'(t_last - t_first) / CLK_HZ;
    gbps = wire_bits / secs / 1.0e9;
    $display("%0d departures, %0.2f Gb/s, %0d drops, %0d passes, %0d evictions, %0d held dequeues",
             total_deps, gbps, n_lost, stat_sift_passes, stat_evictions, stat_deq_holds);
    check(int'(stat_drops) == n_lost, "drop counter matches drop reports");
    if (FIFO_SIZE_TB >= NFLOW) check(n_lost == 0, "no descriptor dropped");
    else check(longint'(n_lost) * 10 < total_deps, "fewer than 10% dropped");
    check(gbps > 98.0 && gbps < 102.0, "output at line rate");
    check(held.size() == 0, "scheduler empty at end");
    foreach (outstanding[i]) check(outstanding[i] == 0, "every sent packet left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
