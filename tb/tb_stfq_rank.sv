// tb_stfq_rank: self-checking test of the STFQ rank stage (8 flows, 32-byte cost
// unit). Random packets of random flows and lengths, random output back-pressure
// and random virtual-time updates; the testbench keeps its own finish tags and
// virtual time and recomputes every start tag: rank = max(V, F[flow]),
// F[flow] += max(1, len / 32). The rank must appear one clock after acceptance.
module tb_stfq_rank;
  import sifter_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_ready = 1'b0, vt_valid = 1'b0;
  pkt_info_t   in_info = '0, out_info;
  logic        in_ready, out_valid;
  logic [31:0] out_rank, vt_rank = '0, vtime;

  int checks = 0, failures = 0, n_out = 0, n_bp = 0;
  longint unsigned fin[8];
  longint unsigned v;
  logic [63:0] exp_q[$];   // {rank, info}

  stfq_rank dut (.*);

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

  // Reference model on the values seen just before each edge.
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      n_out++;
      check(exp_q.size() > 0 && {out_rank, out_info} == exp_q[0], $sformatf("start tag %0d/%h want %h", out_rank, out_info, exp_q[0]));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (out_valid && !out_ready) n_bp++;
    if (in_valid && in_ready) begin
      longint unsigned st, cost;
      int f;
      f    = int'(in_info.flow) % 8;
      st   = (fin[f] > v) ? fin[f] : v;
      cost = (in_info.len / 32 == 0) ? 1 : in_info.len / 32;
      fin[f] = st + cost;
      exp_q.push_back({32'(st), in_info});
    end
    if (vt_valid && vt_rank > 32'(v)) v = vt_rank;
  end

  initial begin
    foreach (fin[i]) fin[i] = 0;
    v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency: one packet, output ready, rank visible after one clock
    in_valid = 1'b1; in_info = '{flow: 16'd3, len: 16'd370}; out_ready = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid && out_rank == 0, "one-clock latency");
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 99) < 60);
        in_info  = '{flow: 16'($urandom_range(0, 15)), len: 16'($urandom_range(16, 1500))};
      end
      out_ready = ($urandom_range(0, 99) < 70);
      vt_valid  = ($urandom_range(0, 99) < 30);
      vt_rank   = 32'(v) + 32'($urandom_range(0, 40)) - ((v >= 10) ? 32'd10 : 32'd0);
    end
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b1; vt_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0 && n_out > 5000 && n_bp > 100, "all packets ranked, back-pressure seen");
    check(vtime == 32'(v), "virtual time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
