// tb_sifter_testbed_top: end-to-end test of the testbed datapath at its default
// sizes (no parameter overrides).
//
// Two runs as in the hardware evaluation, a trace of fixed 370-byte packets and a
// trace of varying sizes (370..1500 bytes), each spread over 8 flows, and a third
// run of varying sizes released as a burst (input not paced) to fill the scheduler. The trace is
// loaded into the input buffer, `run` is raised, and the testbench waits until
// every packet is recorded or reported dropped. It checks:
//  * inversion-free order: at every dequeue, no descriptor still held by the
//    scheduler has a smaller rank (reference list kept from the scheduler's
//    enqueue, dequeue and drop handshakes);
//  * conservation: recorded + dropped = loaded, per flow, and the recorded
//    descriptors read back through the host port match the departures;
//  * line rate: the departures of the fixed-size run take within 2% of the wire
//    time of the packets at 100 Gb/s and 322 MHz;
//  * mechanisms: enqueue into the mini-PIFO, enqueue into the calendar queue,
//    sifting passes and evictions (sentinel lowered) each happen at least once.
module tb_sifter_testbed_top;
  import sifter_pkg::*;
  localparam int unsigned NPKT = 3000;
  localparam real BITS_PER_CLK = 100000.0 / 322.0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        host_in_valid = 1'b0, run = 1'b0, in_burst = 1'b0;
  pkt_info_t   host_in_info = '0;
  logic        host_in_ready, sifting;
  logic [14:0] in_buf_count;
  logic [13:0] rec_rd_addr = '0;
  desc_t       rec_rd_data, last_drop;
  logic [31:0] rec_count, rec_order_drops, rec_last_rank;
  logic [31:0] stat_drops, stat_sift_passes, stat_evictions, stat_deq_holds, stat_send_backs;
  logic [31:0] sentinel, vtime;
  logic [2:0]  pifo_count;
  logic [5:0]  rcq_count;

  sifter_testbed_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_enq_pifo = 0, n_enq_rcq = 0, n_deq = 0, n_drop = 0;
  longint cyc = 0, t_first = -1, t_last = -1;
  logic [63:0] held[$];
  desc_t       departed[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference list of what the scheduler holds, from its handshakes.
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
      foreach (held[i]) check(held[i][63:32] >= d[63:32], "no packet inversion");
      departed.push_back(d);
      n_deq++;
    end
    if (dut.u_sched.enq_valid && dut.u_sched.enq_ready) begin
      held.push_back({dut.u_sched.enq_rank, dut.u_sched.enq_data});
      if (dut.u_sched.enq_rank <= dut.u_sched.sentinel) n_enq_pifo++; else n_enq_rcq++;
    end
    if (dut.u_sched.drop) begin
      int idx;
      idx = -1;
      foreach (held[i]) if (held[i] == {dut.u_sched.drop_rank, dut.u_sched.drop_data}) idx = i;
      if (idx >= 0) held.delete(idx);
      n_drop++;
    end
  end

  // Departures on the wire (output of the output rate controller).
  always @(posedge clk) if (rst_n && dut.tx_valid) begin
    if (t_first < 0) t_first = cyc;
    t_last = cyc;
  end

  task automatic run_trace(input bit fixed_size, input bit burst);
    int      sent_per_flow[8], got_per_flow[8];
    real     bits, last_bits;
    int      base_rec, base_drop, nrec;
    pkt_info_t pk;
    bits = 0.0; last_bits = 0.0;
    foreach (sent_per_flow[f]) begin sent_per_flow[f] = 0; got_per_flow[f] = 0; end
    base_rec  = int'(rec_count);
    base_drop = int'(stat_drops);
    departed.delete();
    t_first = -1;
    // load the trace into the input buffer
    for (int i = 0; i < NPKT; i++) begin
      @(negedge clk);
      pk.flow = 16'($urandom_range(0, 7));
      pk.len  = fixed_size ? 16'd370 : 16'($urandom_range(370, 1500));
      host_in_valid = 1'b1; host_in_info = pk;
      sent_per_flow[3'(pk.flow)]++;
      bits += 8.0 * pk.len;
      last_bits = 8.0 * pk.len;
      #1;
      check(host_in_ready, "input buffer accepts the trace");
    end
    @(negedge clk);
    host_in_valid = 1'b0;
    run = 1'b1; in_burst = burst;
    while (int'(rec_count) - base_rec + int'(stat_drops) - base_drop < NPKT) @(negedge clk);
    run = 1'b0;
    repeat (20) @(negedge clk);
    nrec = int'(rec_count) - base_rec;
    $display("%s%s: %0d recorded, %0d dropped, %0d clocks from first to last departure, wire time %0.0f",
             fixed_size ? "fixed 370 B" : "370-1500 B", burst ? ", burst" : "", nrec, int'(stat_drops) - base_drop,
             t_last - t_first, (bits - last_bits) / BITS_PER_CLK);
    check(nrec + int'(stat_drops) - base_drop == NPKT, "conservation");
    check(nrec == departed.size(), "every departure recorded");
    for (int i = 0; i < nrec && base_rec + i < 16384; i++) begin
      rec_rd_addr = 14'(base_rec + i);
      #1;
      check(rec_rd_data == departed[i], "recorded order read back");
      got_per_flow[3'(rec_rd_data.info.flow)]++;
    end
    if (int'(stat_drops) == base_drop)
      foreach (got_per_flow[f]) check(got_per_flow[f] == sent_per_flow[f], "per-flow count");
    if (fixed_size && !burst)
      check(real'(t_last - t_first) <= 1.02 * (bits - last_bits) / BITS_PER_CLK &&
            real'(t_last - t_first) >= 0.98 * (bits - last_bits) / BITS_PER_CLK,
            "100 Gb/s line rate with 370-byte packets");
    check(held.size() == 0, "scheduler empty at end");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_trace(1'b1, 1'b0);
    run_trace(1'b0, 1'b0);
    run_trace(1'b0, 1'b1);
    $display("mechanisms: enq->mini-PIFO %0d, enq->calendar %0d, sifting passes %0d, evictions %0d, send-backs %0d, held dequeues %0d, drops %0d",
             n_enq_pifo, n_enq_rcq, stat_sift_passes, stat_evictions, stat_send_backs, stat_deq_holds, stat_drops);
    check(n_enq_pifo > 0, "enqueue into mini-PIFO happened");
    check(n_enq_rcq > 0, "enqueue into calendar queue happened");
    check(stat_sift_passes > 0, "sifting happened");
    check(stat_evictions > 0, "eviction (sentinel lowered) happened");
    check(stat_drops > 0, "calendar FIFO overflow happened");
    check(stat_deq_holds > 0 || stat_send_backs > 0, "hold or send-back happened");
    check(rec_order_drops == 0 || rec_order_drops > 0, "order statistic readable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
