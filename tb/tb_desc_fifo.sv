// tb_desc_fifo: self-checking test of the descriptor input buffer, reduced to 16
// entries so that full and empty are both reached often. Random pushes and pops
// are compared against a reference queue: data order, count, in_ready at full,
// out_valid at empty.
module tb_desc_fifo;
  localparam int unsigned W = 32, D = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic         in_ready, out_valid;
  logic [4:0]   count;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] ref_q[$];

  desc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < (((c / 500) % 2) != 0 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < 50);
      in_data   = $urandom;
      #1;
      check(count == 5'(ref_q.size()), "count");
      check(in_ready == (ref_q.size() < D), "in_ready");
      check(out_valid == (ref_q.size() > 0), "out_valid");
      if (ref_q.size() > 0) check(out_data == ref_q[0], "data order");
      if (ref_q.size() == D) n_full++;
      if (ref_q.size() == 0) n_empty++;
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready) ref_q.push_back(in_data);
    end
    check(n_full > 10 && n_empty > 10, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
