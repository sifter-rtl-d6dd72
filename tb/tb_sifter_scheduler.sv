// tb_sifter_scheduler: self-checking test of the Sifter scheduler at its default sizes
// (mini-PIFO 6, Th_S 3, 10 calendar FIFOs of 6, 10 ranks per FIFO).
//
// Part 1 is a set of directed sequences whose sentinel values, dequeue order and
// sifting time were worked out by hand, among them a sifting pass that overfills
// the mini-PIFO and lowers the sentinel twice. Part 2 drives random enqueues and dequeues and keeps
// a reference list of every descriptor held; every dequeued descriptor must be in
// the list and no held descriptor may have a smaller rank (no packet inversion).
// Every event kind (sifting pass, eviction, send-back, held dequeue, drop, enqueue
// stall) must occur at least once.
module tb_sifter_scheduler;
  localparam int unsigned RW = 32, DW = 32;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          enq_valid = 1'b0, deq_ready = 1'b0;
  logic [RW-1:0] enq_rank = '0;
  logic [DW-1:0] enq_data = '0;
  logic          enq_ready, deq_valid, drop, sifting;
  logic [RW-1:0] deq_rank, drop_rank, sentinel;
  logic [DW-1:0] deq_data, drop_data;
  logic [2:0]    pifo_count;
  logic [5:0]    rcq_count;
  logic          ev_sift_start, ev_evict, ev_reject, ev_deq_hold;

  int checks = 0, failures = 0;
  int n_sift = 0, n_evict = 0, n_reject = 0, n_hold = 0, n_drop = 0, n_stall = 0, n_deq = 0;
  int sift_cycles = 0;
  logic [RW+DW-1:0] model[$];
  logic [RW-1:0] last_deq_rank;
  logic          check_min = 1'b1;

  sifter_scheduler dut (
    .clk, .rst_n, .enq_valid, .enq_ready, .enq_rank, .enq_data,
    .deq_valid, .deq_ready, .deq_rank, .deq_data,
    .drop, .drop_rank, .drop_data, .sentinel, .pifo_count, .rcq_count, .sifting,
    .ev_sift_start, .ev_evict, .ev_reject, .ev_deq_hold
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model, updated with the values seen just before each clock edge.
  always @(posedge clk) if (rst_n) begin
    if (deq_valid && deq_ready) begin
      int idx;
      idx = -1;
      n_deq++;
      last_deq_rank = deq_rank;
      foreach (model[i]) if (model[i] == {deq_rank, deq_data}) idx = i;
      check(idx >= 0, "dequeued descriptor was held");
      if (idx >= 0) model.delete(idx);
      if (check_min)
        foreach (model[i]) check(model[i][RW+DW-1:DW] >= deq_rank, "no inversion");
    end
    if (enq_valid && enq_ready) model.push_back({enq_rank, enq_data});
    if (enq_valid && !enq_ready) n_stall++;
    if (drop) begin
      int idx;
      idx = -1;
      n_drop++;
      foreach (model[i]) if (model[i] == {drop_rank, drop_data}) idx = i;
      check(idx >= 0, "dropped descriptor was held");
      if (idx >= 0) model.delete(idx);
    end
    if (ev_sift_start) n_sift++;
    if (ev_evict)      n_evict++;
    if (ev_reject)     n_reject++;
    if (ev_deq_hold && deq_ready) n_hold++;
    if (sifting)       sift_cycles++;
  end

  int unsigned uid = 0;
  int unsigned fig_fifo[6] = '{11, 16, 12, 14, 15, 10};
  int unsigned fig_out[8]  = '{7, 9, 10, 11, 12, 14, 15, 16};

  task automatic enq(input int unsigned r);
    @(negedge clk);
    enq_valid = 1'b1; enq_rank = r; enq_data = uid++;
    while (!enq_ready) @(negedge clk);
    @(negedge clk);
    enq_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Dequeue one descriptor and compare its rank.
  task automatic deq_expect(input int unsigned r);
    @(negedge clk);
    deq_ready = 1'b1;
    while (!deq_valid) @(negedge clk);
    check(deq_rank == r, $sformatf("dequeue order: got %0d want %0d", deq_rank, r));
    @(negedge clk);
    deq_ready = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- Part 1: directed -------------------------------------------------
    check(sentinel == 0, "sentinel after reset");
    enq(15);            // above s=0: calendar FIFO 1, then sifted; s = 19
    idle(4);
    check(sentinel == 19, "sentinel raised to top of range 10-19");
    check(pifo_count == 1 && rcq_count == 0, "15 sifted into mini-PIFO");
    enq(12); enq(11);   // <= 19: straight into the mini-PIFO
    enq(33);            // > 19: stays in calendar FIFO 3 (mini-PIFO holds Th_S)
    idle(3);
    check(pifo_count == 3 && rcq_count == 1, "33 held in calendar queue");
    enq(16); enq(14); enq(10);
    check(pifo_count == 6, "mini-PIFO full");
    enq(13);            // full: 16 is pushed back, s = 16
    idle(1);
    check(sentinel == 16, "sentinel lowered to evicted rank");
    check(pifo_count == 6 && rcq_count == 2, "evicted descriptor in calendar queue");
    enq(17);            // > 16: calendar FIFO 1
    deq_expect(10); deq_expect(11); deq_expect(12); deq_expect(13);
    idle(6);            // two left: FIFO 1 (16, 17) is sifted, s = 19
    check(sentinel == 19, "sentinel after second pass");
    deq_expect(14); deq_expect(15); deq_expect(16); deq_expect(17);
    idle(4);
    check(sentinel == 39, "third pass over FIFO 3");
    deq_expect(33);
    idle(4);
    check(model.size() == 0 && pifo_count == 0 && rcq_count == 0, "empty after directed part");

    // Sifting moves one descriptor per clock: fill FIFO 5 with S_F = 6 descriptors
    // while the mini-PIFO holds Th_S, then release and time the pass.
    enq(40); idle(4);   // s = 49
    enq(41); enq(42);   // mini-PIFO holds 3
    for (int i = 0; i < 6; i++) enq(50 + i);
    idle(2);
    check(rcq_count == 6, "calendar FIFO filled to S_F");
    sift_cycles = 0;
    deq_expect(40);     // count drops below Th_S -> pass over 6 descriptors
    idle(10);
    check(sift_cycles == 6, $sformatf("pass over S_F descriptors takes S_F clocks (%0d)", sift_cycles));
    for (int i = 0; i < 2; i++) deq_expect(41 + i);
    for (int i = 0; i < 6; i++) deq_expect(50 + i);
    idle(4);

    // Sifting example: FIFO 10-19 holds 11 16 12 14 15 10 (head first), the
    // mini-PIFO 7 9, and no dequeue during the pass. The pass moves 11 16 12 14,
    // fills the mini-PIFO, then 15 pushes out 16 (s = 16) and 10 pushes out 15
    // (s = 15), leaving 16 15 in the FIFO.
    idle(4);
    rst_n = 1'b0; idle(2); rst_n = 1'b1;
    enq(7); idle(4);    // sifted from FIFO 0: s = 9
    check(sentinel == 9, "sentinel 9 after first pass");
    enq(5); enq(9);
    foreach (fig_fifo[i]) enq(fig_fifo[i]);
    idle(2);
    check(pifo_count == 3 && rcq_count == 6 && sentinel == 9, "example state before sifting");
    sift_cycles = 0;
    deq_expect(5);      // two left -> pass over FIFO 1
    idle(10);
    check(sift_cycles == 6, "pass over six descriptors");
    check(sentinel == 15, $sformatf("sentinel after the pass is 15 (%0d)", sentinel));
    check(pifo_count == 6 && rcq_count == 2, "mini-PIFO full, two sent back");
    foreach (fig_out[i]) deq_expect(fig_out[i]);
    idle(4);
    check(model.size() == 0, "example drained");

    // ---- Part 2: random ---------------------------------------------------
    begin
      int unsigned vt;
      for (int round = 0; round < 6; round++) begin
        vt = last_deq_rank;
        // fill phase (enqueue faster than dequeue), then drain phase
        for (int c = 0; c < 3000; c++) begin
          @(negedge clk);
          if (!enq_valid || enq_ready) begin
            enq_valid = ($urandom_range(0, 99) < ((c < 1500) ? 70 : 10));
            enq_rank  = last_deq_rank + $urandom_range(0, ((round % 2) != 0) ? 60 : 180);
            enq_data  = uid++;
          end
          deq_ready = ($urandom_range(0, 99) < ((c < 1500) ? 20 : 90));
        end
        @(negedge clk);
        enq_valid = 1'b0;
        deq_ready = 1'b1;
        repeat (400) @(negedge clk);
        check(model.size() == 0, $sformatf("drained (left %0d)", model.size()));
        deq_ready = 1'b0;
      end
    end

    $display("events: passes=%0d evictions=%0d send-backs=%0d held-dequeues=%0d drops=%0d enq-stalls=%0d dequeues=%0d",
             n_sift, n_evict, n_reject, n_hold, n_drop, n_stall, n_deq);
    check(n_sift > 0,   "sifting happened");
    check(n_evict > 0,  "eviction happened");
    check(n_reject > 0, "send-back happened");
    check(n_hold > 0,   "held dequeue happened");
    check(n_drop > 0,   "drop happened");
    check(n_stall > 0,  "enqueue stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
