// tb_sifter_scheduler_large: the scheduler at a larger configuration (mini-PIFO 16,
// Th_S 8, 32 calendar FIFOs of 16, 8 ranks per FIFO), with random traffic checked
// against a reference list of held descriptors: every dequeue must be held and
// leave no smaller rank behind.
//
// Two phases exercise the inversion-free condition Th_S * K >= S_F (K = clocks per
// dequeue, i.e. descriptors moved per packet time):
//  * phase A dequeues whenever possible (K = 1, condition broken): the order must
//    stay exact, and the scheduler's hold rule is expected to act;
//  * phase B dequeues at most once every 4 clocks (K = 4, 8*4 >= 16 + start
//    clock): the order must stay exact and no dequeue should need holding.
module tb_sifter_scheduler_large;
  localparam int unsigned RW = 32, DW = 32;
  localparam int unsigned SP = 16, TH = 8, NF = 32, SF = 16, BW = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          enq_valid = 1'b0, deq_ready = 1'b0;
  logic [RW-1:0] enq_rank = '0;
  logic [DW-1:0] enq_data = '0;
  logic          enq_ready, deq_valid, drop, sifting;
  logic [RW-1:0] deq_rank, drop_rank, sentinel;
  logic [DW-1:0] deq_data, drop_data;
  logic [4:0]    pifo_count;
  logic [9:0]    rcq_count;
  logic          ev_sift_start, ev_evict, ev_reject, ev_deq_hold;

  int checks = 0, failures = 0;
  int n_hold = 0, n_sift = 0, n_deq = 0, n_evict = 0;
  logic [RW+DW-1:0] model[$];
  logic [RW-1:0] last_deq_rank = '0;

  sifter_scheduler #(.RANK_W(RW), .DATA_W(DW), .PIFO_SIZE(SP), .SIFT_TH(TH),
                     .NUM_FIFOS(NF), .FIFO_SIZE(SF), .BUCKET_W(BW)) dut (
    .clk, .rst_n, .enq_valid, .enq_ready, .enq_rank, .enq_data,
    .deq_valid, .deq_ready, .deq_rank, .deq_data,
    .drop, .drop_rank, .drop_data, .sentinel, .pifo_count, .rcq_count, .sifting,
    .ev_sift_start, .ev_evict, .ev_reject, .ev_deq_hold
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (deq_valid && deq_ready) begin
      int idx;
      idx = -1;
      n_deq++;
      last_deq_rank = deq_rank;
      foreach (model[i]) if (model[i] == {deq_rank, deq_data}) idx = i;
      check(idx >= 0, "dequeued descriptor was held");
      if (idx >= 0) model.delete(idx);
      foreach (model[i]) if (model[i][RW+DW-1:DW] < deq_rank) check(1'b0, "packet inversion");
    end
    if (enq_valid && enq_ready) model.push_back({enq_rank, enq_data});
    if (drop) begin
      int idx;
      idx = -1;
      foreach (model[i]) if (model[i] == {drop_rank, drop_data}) idx = i;
      if (idx >= 0) model.delete(idx);
    end
    if (ev_deq_hold && deq_ready) n_hold++;
    if (ev_sift_start) n_sift++;
    if (ev_evict) n_evict++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random traffic; deq_every = minimum clocks between dequeue attempts.
  task automatic phase(input int cycles, input int deq_every, input int enq_pct);
    int unsigned uid, gap;
    uid = 0; gap = 0;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (!enq_valid || enq_ready) begin
        enq_valid = ($urandom_range(0, 99) < enq_pct);
        enq_rank  = last_deq_rank + $urandom_range(0, 200);
        enq_data  = {8'(deq_every), 24'(uid++)};
      end
      if (deq_ready && deq_valid) gap = 0; else gap++;
      deq_ready = (gap + 1 >= deq_every) && (c > 200);
    end
    @(negedge clk);
    enq_valid = 1'b0;
    deq_ready = 1'b1;
    repeat (3000) @(negedge clk);
    deq_ready = 1'b0;
    check(model.size() == 0, $sformatf("drained (left %0d)", model.size()));
  endtask

  initial begin
    int holds_a;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    phase(30000, 1, 60);
    holds_a = n_hold;
    $display("phase A (K=1): %0d dequeues, %0d passes, %0d evictions, %0d held dequeues", n_deq, n_sift, n_evict, holds_a);
    check(holds_a > 0, "hold rule acts when the condition is broken");
    phase(60000, 4, 24);
    $display("phase B (K=4): %0d dequeues, %0d passes, %0d held dequeues", n_deq, n_sift, n_hold - holds_a);
    check(n_hold - holds_a == 0, "no held dequeue when Th_S*K >= S_F");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
