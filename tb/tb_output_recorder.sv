// tb_output_recorder: self-checking test of the output recorder, reduced to 64
// entries. Random descriptors with mostly rising ranks (and some falls) are fed at
// random times; the departure count, the count of rank decreases and every recorded
// entry read back are compared with values kept by the testbench. More descriptors
// than entries are sent, to check that the memory stops while the count goes on.
module tb_output_recorder;
  localparam int unsigned D = 64;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [63:0] in_data = '0, rd_data;
  logic [5:0]  rd_addr = '0;
  logic        in_ready;
  logic [31:0] rec_count, order_drops, last_rank;

  int checks = 0, failures = 0, n = 0, drops = 0;
  logic [63:0] sent[$];
  logic [31:0] r, prev;

  output_recorder #(.DEPTH(D)) dut (.*);

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
    r = 100;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < 50);
      if (in_valid) begin
        r = ($urandom_range(0, 9) == 0) ? r - 32'($urandom_range(1, 5)) : r + 32'($urandom_range(0, 7));
        in_data = {r, 32'($urandom)};
        if (n > 0 && r < prev) drops++;
        prev = r;
        n++;
        sent.push_back(in_data);
      end
      #1;
      check(in_ready, "always ready");
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    check(rec_count == 32'(n), "departure count");
    check(order_drops == 32'(drops) && drops > 0, "rank decreases counted");
    check(last_rank == prev, "last rank");
    for (int i = 0; i < D; i++) begin
      rd_addr = 6'(i);
      #1;
      check(rd_data == sent[i], "recorded entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
