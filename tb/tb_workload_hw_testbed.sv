// tb_workload_hw_testbed: the hardware-testbed workloads on the full harness at its
// default sizes: traces of 14,000 descriptors over 8 flows, one of fixed 370-byte
// packets, one of varying sizes and one of fixed 128-byte packets, each replayed at
// the 100 Gb/s line rate. The 128-byte trace is the speed-up example of the
// published design (128-byte packets at 100 Gb/s), about 3.2 clocks per packet.
//
// The varying sizes are drawn uniformly from 370..750 bytes, for an average near
// 560 bytes (about 97 Gb/s at about 21.7 Mpacket/s, as the published bar chart
// suggests; the exact distribution is not known). For each trace the testbench
// reports throughput in Gb/s and Mpacket/s and checks:
//  * no packet inversion at any dequeue (reference list of held descriptors);
//  * every packet recorded, none dropped;
//  * throughput: fixed sizes within 2% of 100 Gb/s and of 100e9/(8*size) packet/s;
//    varying sizes within 2% of 100 Gb/s;
//  * recorded ranks rise over the trace (first quarter below last quarter) and the
//    recorded sequence read back from the host port matches the departures.
module tb_workload_hw_testbed;
  import sifter_pkg::*;
  localparam int unsigned NPKT = 14000;
  localparam real CLK_HZ = 322.0e6;

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
  longint cyc = 0, t_first = -1, t_last = -1;
  logic [63:0] held[$];
  logic [63:0] departed[$];
  real wire_bits = 0.0, first_bits = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      departed.push_back(d);
    end
    if (dut.u_sched.enq_valid && dut.u_sched.enq_ready)
      held.push_back({dut.u_sched.enq_rank, dut.u_sched.enq_data});
    if (dut.tx_valid) begin
      if (t_first < 0) t_first = cyc;
      else wire_bits += 8.0 * real'(dut.tx_desc.info.len);
      t_last = cyc;
    end
  end

  task automatic run_trace(input int unsigned fixed_len);  // 0: varying sizes
    int  base_rec, base_drop, nrec;
    real secs, gbps, mpps, q1, q4;
    base_rec  = int'(rec_count);
    base_drop = int'(stat_drops);
    departed.delete();
    t_first = -1;
    wire_bits = 0.0;
    for (int i = 0; i < NPKT; i++) begin
      @(negedge clk);
      host_in_valid = 1'b1;
      host_in_info  = '{flow: 16'($urandom_range(0, 7)),
                        len: (fixed_len != 0) ? 16'(fixed_len) : 16'($urandom_range(370, 750))};
    end
    @(negedge clk);
    host_in_valid = 1'b0;
    run = 1'b1;
    while (int'(rec_count) - base_rec + int'(stat_drops) - base_drop < NPKT) @(negedge clk);
    run = 1'b0;
    repeat (20) @(negedge clk);
    nrec = int'(rec_count) - base_rec;
    secs = real'(t_last - t_first) / CLK_HZ;
    gbps = wire_bits / secs / 1.0e9;
    mpps = real'(nrec - 1) / secs / 1.0e6;
    $display("%s: %0d packets, %0.2f Gb/s, %0.2f Mpacket/s, %0d passes, %0d held dequeues, %0d order decreases",
             (fixed_len != 0) ? $sformatf("fixed %0d B", fixed_len) : "370-750 B", nrec, gbps, mpps,
             stat_sift_passes, stat_deq_holds, rec_order_drops);
    check(nrec == NPKT && int'(stat_drops) == base_drop, "all packets scheduled, none dropped");
    check(gbps > 98.0 && gbps < 102.0, "100 Gb/s line rate");
    if (fixed_len != 0)
      check(mpps > 0.98 * 100.0e3 / (8.0 * real'(fixed_len)) &&
            mpps < 1.02 * 100.0e3 / (8.0 * real'(fixed_len)), "packet rate of fixed-size packets at line rate");
    q1 = 0.0; q4 = 0.0;
    for (int i = 0; i < nrec / 4; i++) begin
      q1 += real'(departed[i][63:32]);
      q4 += real'(departed[nrec - 1 - i][63:32]);
    end
    check(q4 > q1, "ranks rise over the trace");
    for (int i = 0; i < nrec && base_rec + i < 16384; i += 7) begin
      rec_rd_addr = 14'(base_rec + i);
      #1;
      check(rec_rd_data == departed[i], "recorded order read back");
    end
    check(held.size() == 0, "scheduler empty at end");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_trace(370);
    // each further trace starts from reset so the recorder has room for it
    @(negedge clk); rst_n = 1'b0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run_trace(0);
    @(negedge clk); rst_n = 1'b0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run_trace(128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
