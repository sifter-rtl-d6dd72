// tb_mini_pifo: self-checking test of the sorted mini-PIFO (default depth 6).
//
// Random pushes and pops, alone and together, are mirrored in a sorted reference
// list built in the testbench. Each cycle the head must equal the reference minimum
// (first arrival among equal ranks), and when a push meets a full queue the evicted
// descriptor must be the reference maximum (last arrival among equal ranks).
module tb_mini_pifo;
  localparam int unsigned DEPTH = 6, RW = 32, DW = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          push = 1'b0, pop = 1'b0;
  logic [RW-1:0] push_rank = '0;
  logic [DW-1:0] push_data = '0;
  logic [RW-1:0] head_rank, evict_rank;
  logic [DW-1:0] head_data, evict_data;
  logic          evict, empty, full;
  logic [2:0]    count;

  int checks = 0, failures = 0, n_evict = 0, n_both = 0;
  logic [RW+DW-1:0] ref_q[$];  // sorted by rank, stable

  mini_pifo #(.DEPTH(DEPTH), .RANK_W(RW), .DATA_W(DW)) dut (
    .clk, .rst_n, .push, .push_rank, .push_data, .pop,
    .head_rank, .head_data, .evict, .evict_rank, .evict_data,
    .count, .empty, .full
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
    int unsigned uid;
    uid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // state check against the reference
      check(count == 3'(ref_q.size()), "count");
      check(empty == (ref_q.size() == 0), "empty");
      check(full == (ref_q.size() == DEPTH), "full");
      if (ref_q.size() > 0)
        check({head_rank, head_data} == ref_q[0], "head is smallest rank");
      // new stimulus
      push      = ($urandom_range(0, 99) < 60);
      pop       = ($urandom_range(0, 99) < 40);
      push_rank = $urandom_range(0, 40);
      push_data = uid++;
      #1;
      if (push && pop && ref_q.size() > 0) n_both++;
      // reference: pop first, then insert, then overflow
      if (pop && ref_q.size() > 0) void'(ref_q.pop_front());
      if (push) begin
        int pos;
        pos = 0;
        while (pos < ref_q.size() && ref_q[pos][RW+DW-1:DW] <= push_rank) pos++;
        ref_q.insert(pos, {push_rank, push_data});
        if (ref_q.size() > DEPTH) begin
          logic [RW+DW-1:0] ev;
          ev = ref_q.pop_back();
          n_evict++;
          check(evict && {evict_rank, evict_data} == ev, "evicted descriptor is largest");
        end else
          check(!evict, "no eviction below capacity");
      end
    end
    check(n_evict > 100 && n_both > 100, "evictions and simultaneous push/pop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
