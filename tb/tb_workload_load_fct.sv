// tb_workload_load_fct: flow completion time (FCT) and tail delay under random
// load, on the full harness, compared with an ideal PIFO. The harness runs at its
// default sizes except S_F = 8, one calendar slot per flow, so that equal STFQ tags
// of eight flows cause no drops (see tb_workload_flow_convergence).
//
// The published fat-tree evaluation reports normalized FCT and 95th-percentile
// delay per flow-size class at 70% and 90% load, and finds Sifter identical to an
// ideal PIFO. A network cannot be simulated here; this testbench keeps the part
// that concerns one switch output. Messages arrive at random (exponential gaps)
// at 70% and then 90% of the 100 Gb/s output; then, for the incast pattern, in
// bursts of INCAST messages at once, at the same two loads. Their sizes come from four classes
// of 370-byte packets: 1-9, 10-20, 21-50 and 51-200 packets, with probabilities
// 50/25/15/10%. Each message takes one of the 8 STFQ flow slots while it lasts and
// waits for a free slot otherwise. Its sender releases at most one packet per
// packet time of the line and keeps at most WINDOW packets in flight. A dropped
// packet gives its credit back and is sent again. The sizes, the window and the
// message mix are this testbench's own scaled-down stand-ins. The FCT includes the
// wait for a free flow slot, which dominates for small messages at 90% load.
//
// The ideal PIFO is a shadow model. It sees the same enqueues and dequeues at the
// same clocks, and at each dequeue it releases its smallest rank, the earliest one
// among equal ranks. Both the harness and the shadow give every message an FCT:
// from its arrival to the dequeue of its last packet. The FCT is normalized by the
// message's own transmission time. The testbench prints mean normalized FCT and
// 95th-percentile packet delay per class for both, and checks:
//  * every dequeue has the smallest rank held (no packet inversion);
//  * every message completes; no packet is dropped when a calendar FIFO has a slot
//    per flow, and fewer than 5% are dropped otherwise;
//  * per class and load, the harness's mean normalized FCT is within 2% of the
//    ideal PIFO's and its 95th-percentile delay within 2% plus one packet time.
module tb_workload_load_fct;
  localparam int unsigned FIFO_SIZE_TB = 8;  // S_F of the harness: one slot per flow
  import sifter_pkg::*;
  localparam int unsigned NSLOT    = 8;
  localparam int unsigned WINDOW   = 3;
  localparam int unsigned NMSG     = 600;   // messages per load
  localparam int unsigned PKT_LEN  = 370;
  localparam real         CLK_HZ   = 322.0e6;
  localparam real         PKT_CLKS = 8.0 * PKT_LEN / (100.0e9 / CLK_HZ);
  localparam int unsigned NCLS     = 4;
  localparam int unsigned MAXMSG   = 4 * NMSG;
  localparam int unsigned INCAST   = 8;     // messages per incast burst

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
  longint cyc = 0;

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

  // messages
  int     m_size   [MAXMSG];   // packets
  int     m_cls    [MAXMSG];
  longint m_arr    [MAXMSG];   // arrival clock
  int     m_done   [MAXMSG];   // packets dequeued by the harness
  int     m_sdone  [MAXMSG];   // packets released by the shadow PIFO
  longint m_fct    [MAXMSG];
  longint m_sfct   [MAXMSG];
  int     n_msg = 0;           // messages created so far
  int     n_fin = 0;           // messages completed (harness)

  // per-packet delays, enqueue clock kept with each held descriptor
  typedef struct { logic [63:0] d; longint t_enq; } held_t;
  held_t  held[$];
  held_t  shadow[$];           // ideal PIFO contents
  longint dly  [NCLS][$];
  longint sdly [NCLS][$];

  // sender slots
  int     slot_msg [NSLOT];    // -1: free
  int     slot_left[NSLOT];    // packets still to send
  int     slot_out [NSLOT];    // packets in flight
  real    slot_next[NSLOT];    // earliest clock of the next release
  int     waiting[$];          // messages waiting for a slot
  int     n_lost = 0, n_sent = 0;

  function automatic int msg_of(input logic [63:0] d);
    return int'(d[31:16]) / int'(NSLOT);
  endfunction

  // harness dequeue, shadow release, drops
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_sched.deq_valid && dut.u_sched.deq_ready) begin
      logic [63:0] d;
      int idx, sidx, m, sm;
      d = {dut.u_sched.deq_rank, dut.u_sched.deq_data};
      idx = -1;
      foreach (held[i]) if (held[i].d == d && idx < 0) idx = i;
      check(idx >= 0, "departing descriptor was held");
      if (idx >= 0) foreach (held[i]) if (held[i].d[63:32] < d[63:32]) check(1'b0, "packet inversion");
      sidx = -1;
      foreach (shadow[i]) if (sidx < 0 || shadow[i].d[63:32] < shadow[sidx].d[63:32]) sidx = i;
      check(sidx >= 0, "shadow PIFO not empty");
      if (idx >= 0) begin
        m = msg_of(d);
        dly[m_cls[m]].push_back(cyc - held[idx].t_enq);
        m_done[m]++;
        if (m_done[m] == m_size[m]) begin m_fct[m] = cyc - m_arr[m]; n_fin++; end
        held.delete(idx);
      end
      if (sidx >= 0) begin
        sm = msg_of(shadow[sidx].d);
        sdly[m_cls[sm]].push_back(cyc - shadow[sidx].t_enq);
        m_sdone[sm]++;
        if (m_sdone[sm] == m_size[sm]) m_sfct[sm] = cyc - m_arr[sm];
        shadow.delete(sidx);
      end
    end
    if (dut.u_sched.enq_valid && dut.u_sched.enq_ready) begin
      held.push_back('{d: {dut.u_sched.enq_rank, dut.u_sched.enq_data}, t_enq: cyc});
      shadow.push_back('{d: {dut.u_sched.enq_rank, dut.u_sched.enq_data}, t_enq: cyc});
    end
    if (dut.u_sched.drop) begin
      logic [63:0] d;
      int idx, sl;
      d = {dut.u_sched.drop_rank, dut.u_sched.drop_data};
      idx = -1;
      foreach (held[i]) if (held[i].d == d && idx < 0) idx = i;
      check(idx >= 0, "dropped descriptor was held");
      if (idx >= 0) held.delete(idx);
      idx = -1;
      foreach (shadow[i]) if (shadow[i].d == d && idx < 0) idx = i;
      if (idx >= 0) shadow.delete(idx);
      sl = int'(d[31:16]) % int'(NSLOT);
      slot_out[sl]--;
      slot_left[sl]++;      // sent again
      n_lost++;
    end
  end

  // line departures give window credit back; a slot frees when its message is done
  always @(posedge clk) if (rst_n && dut.tx_valid) begin
    int sl;
    sl = int'(dut.tx_desc.info.flow) % int'(NSLOT);
    slot_out[sl]--;
    if (slot_left[sl] == 0 && slot_out[sl] == 0) slot_msg[sl] = -1;
  end

  // senders: fill free slots from the waiting list, then release one packet per
  // clock, round robin over the slots that may send
  int rr = 0;
  always @(negedge clk) if (rst_n && run) begin
    int sl, pick;
    if (host_in_valid && host_in_ready) begin
      sl = int'(host_in_info.flow) % int'(NSLOT);
      slot_out[sl]++;
      slot_left[sl]--;
      slot_next[sl] = real'(cyc) + PKT_CLKS;
      n_sent++;
    end
    for (int s = 0; s < int'(NSLOT); s++)
      if (slot_msg[s] < 0 && waiting.size() > 0) begin
        slot_msg[s]  = waiting.pop_front();
        slot_left[s] = m_size[slot_msg[s]];
        slot_out[s]  = 0;
        slot_next[s] = real'(cyc);
      end
    pick = -1;
    for (int k = 0; k < int'(NSLOT); k++) begin
      sl = (rr + k) % int'(NSLOT);
      if (pick < 0 && slot_msg[sl] >= 0 && slot_left[sl] > 0 &&
          slot_out[sl] < int'(WINDOW) && real'(cyc) >= slot_next[sl]) pick = sl;
    end
    host_in_valid = (pick >= 0);
    if (pick >= 0) begin
      host_in_info = '{flow: 16'(slot_msg[pick] * int'(NSLOT) + pick), len: 16'(PKT_LEN)};
      rr = (pick + 1) % int'(NSLOT);
    end
  end

  function automatic int draw_size(output int cls);
    int u;
    u = $urandom_range(0, 99);
    if (u < 50)      begin cls = 0; return $urandom_range(1, 9);    end
    else if (u < 75) begin cls = 1; return $urandom_range(10, 20);  end
    else if (u < 90) begin cls = 2; return $urandom_range(21, 50);  end
    else             begin cls = 3; return $urandom_range(51, 200); end
  endfunction

  function automatic longint p95(input longint q[$]);
    longint s[$];
    s = q;
    s.sort();
    return (s.size() == 0) ? 0 : s[(s.size() * 95) / 100];
  endfunction

  task automatic run_load(input int pct, input bit incast);
    int     first, cls, cnt[NCLS];
    real    mean_gap, gap, nf[NCLS], snf[NCLS];
    longint hp, sp;
    string  names[NCLS] = '{"1-9 pkt  ", "10-20 pkt", "21-50 pkt", "51-200 pkt"};
    first = n_msg;
    foreach (dly[c]) begin dly[c].delete(); sdly[c].delete(); end
    // mean message of 0.5*5 + 0.25*15 + 0.15*35.5 + 0.1*125.5 packets
    mean_gap = (0.5 * 5.0 + 0.25 * 15.0 + 0.15 * 35.5 + 0.1 * 125.5) * PKT_CLKS * 100.0 / real'(pct);
    for (int i = 0; i < int'(NMSG); i++) begin
      m_size[n_msg] = draw_size(cls);
      m_cls[n_msg]  = cls;
      m_arr[n_msg]  = cyc;
      m_done[n_msg] = 0;
      m_sdone[n_msg] = 0;
      waiting.push_back(n_msg);
      n_msg++;
      if (!incast || (i % int'(INCAST)) == int'(INCAST) - 1) begin
        gap = -mean_gap * (incast ? real'(INCAST) : 1.0) *
              $ln(1.0 - real'($urandom_range(0, 999999)) / 1.0e6);
        repeat (int'(gap) + 1) @(negedge clk);
      end
    end
    wait (n_fin == n_msg && held.size() == 0);
    repeat (50) @(negedge clk);
    check(n_fin == n_msg, "every message completed");
    for (int c = 0; c < int'(NCLS); c++) begin cnt[c] = 0; nf[c] = 0.0; snf[c] = 0.0; end
    for (int m = first; m < n_msg; m++) begin
      cnt[m_cls[m]]++;
      nf[m_cls[m]]  += real'(m_fct[m])  / (real'(m_size[m]) * PKT_CLKS);
      snf[m_cls[m]] += real'(m_sfct[m]) / (real'(m_size[m]) * PKT_CLKS);
    end
    $display("%s load %0d%%: class  msgs  norm FCT (harness / ideal PIFO)  p95 delay us (harness / ideal PIFO)",
             incast ? "incast" : "random", pct);
    for (int c = 0; c < int'(NCLS); c++) begin
      if (cnt[c] == 0) continue;
      nf[c] /= real'(cnt[c]);
      snf[c] /= real'(cnt[c]);
      hp = p95(dly[c]);
      sp = p95(sdly[c]);
      $display("          %s  %4d   %6.2f / %6.2f                     %7.3f / %7.3f",
               names[c], cnt[c], nf[c], snf[c], real'(hp) / 322.0, real'(sp) / 322.0);
      check(nf[c] <= snf[c] * 1.02 && nf[c] >= snf[c] * 0.98,
            $sformatf("load %0d incast %0d class %0d normalized FCT matches the ideal PIFO", pct, incast, c));
      check(real'(hp) <= real'(sp) * 1.02 + PKT_CLKS && real'(hp) >= real'(sp) * 0.98 - PKT_CLKS,
            $sformatf("load %0d incast %0d class %0d tail delay matches the ideal PIFO", pct, incast, c));
    end
  endtask

  initial begin
    foreach (slot_msg[s]) begin slot_msg[s] = -1; slot_left[s] = 0; slot_out[s] = 0; slot_next[s] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    run_load(70, 1'b0);
    run_load(90, 1'b0);
    run_load(70, 1'b1);
    run_load(90, 1'b1);
    $display("%0d packets sent, %0d dropped and sent again, %0d passes, %0d evictions, %0d held dequeues",
             n_sent, n_lost, stat_sift_passes, stat_evictions, stat_deq_holds);
    if (FIFO_SIZE_TB >= NSLOT) check(n_lost == 0, "no packet dropped");
    else check(n_lost * 20 < n_sent, "fewer than 5% dropped");
    check(stat_deq_holds == 0, "no dequeue held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
