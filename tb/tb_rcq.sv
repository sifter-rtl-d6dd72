// tb_rcq: self-checking test of the rotating-calendar-queue storage at its default
// size (10 FIFOs of 6 descriptors).
//
// Random pushes and pops on random FIFOs are mirrored in ten reference queues. The
// head of the popped FIFO, push acceptance (full FIFO, or full FIFO popped in the
// same cycle), the per-FIFO and total counts, and the ring search for the first
// non-empty FIFO are compared with the reference every cycle.
module tb_rcq;
  localparam int unsigned N = 10, D = 6, RW = 32, DW = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          push = 1'b0, pop = 1'b0;
  logic [3:0]    push_fifo = '0, pop_fifo = '0, cnt_fifo = '0, search_start = '0;
  logic [RW-1:0] push_rank = '0, pop_rank;
  logic [DW-1:0] push_data = '0, pop_data;
  logic          push_ok, found;
  logic [3:0]    found_fifo;
  logic [2:0]    fifo_count;
  logic [5:0]    total_count;

  int checks = 0, failures = 0, n_full_rej = 0, n_full_same = 0;
  logic [RW+DW-1:0] ref_q[N][$];

  rcq #(.NUM_FIFOS(N), .FIFO_SIZE(D), .RANK_W(RW), .DATA_W(DW)) dut (
    .clk, .rst_n, .push, .push_fifo, .push_rank, .push_data, .push_ok,
    .pop, .pop_fifo, .pop_rank, .pop_data, .cnt_fifo, .fifo_count, .total_count,
    .search_start, .found, .found_fifo
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned uid, total, exp_found;
    bit any;
    uid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      push         = ($urandom_range(0, 99) < ((c % 4000) < 2000 ? 70 : 30));
      pop          = ($urandom_range(0, 99) < 50);
      push_fifo    = 4'($urandom_range(0, N-1));
      pop_fifo     = ($urandom_range(0, 3) == 0) ? push_fifo : 4'($urandom_range(0, N-1));
      cnt_fifo     = 4'($urandom_range(0, N-1));
      search_start = 4'($urandom_range(0, N-1));
      push_rank    = $urandom;
      push_data    = uid++;
      #1;
      total = 0;
      foreach (ref_q[f]) total += ref_q[f].size();
      check(total_count == 6'(total), "total count");
      check(fifo_count == 3'(ref_q[cnt_fifo].size()), "FIFO count");
      any = 0; exp_found = 0;
      for (int k = N - 1; k >= 0; k--)
        if (ref_q[(search_start + k) % N].size() != 0) begin any = 1; exp_found = (search_start + k) % N; end
      check(found == any, "found");
      if (any) check(found_fifo == 4'(exp_found), "first non-empty FIFO in ring order");
      if (ref_q[pop_fifo].size() != 0)
        check({pop_rank, pop_data} == ref_q[pop_fifo][0], "head of popped FIFO");
      // push acceptance as seen before the edge
      if (push) begin
        bit room;
        room = ref_q[push_fifo].size() < D ||
               (pop && pop_fifo == push_fifo && ref_q[pop_fifo].size() != 0);
        check(push_ok == room, "push acceptance");
        if (ref_q[push_fifo].size() == D) begin
          if (room) n_full_same++; else n_full_rej++;
        end
      end
      // reference update
      if (pop && ref_q[pop_fifo].size() != 0) void'(ref_q[pop_fifo].pop_front());
      if (push && push_ok) ref_q[push_fifo].push_back({push_rank, push_data});
    end
    check(n_full_rej > 10 && n_full_same > 10, "full-FIFO cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
