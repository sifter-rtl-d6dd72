// tb_rate_ctrl: self-checking test of the line-rate pacer at the testbed rates
// (100 Gb/s, 322 MHz).
//
// Back-to-back streams of 370-byte packets (the smallest size the testbed runs at
// line rate) and of random sizes are sent with the output always ready. The clock
// at which the last descriptor passes must equal the wire time of all earlier
// packets, computed here in floating point, within two clocks. Descriptors must come
// out unchanged and in order; enable low and out_ready low must hold the stream;
// bypass must pass one descriptor per clock and leave no debt.
module tb_rate_ctrl;
  localparam int unsigned W = 64;
  localparam real BITS_PER_CLK = 100000.0 / 322.0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         enable = 1'b0, bypass = 1'b0, in_valid = 1'b0, out_ready = 1'b1;
  logic [W-1:0] in_data = '0, out_data;
  logic [15:0]  pkt_len = '0;
  logic         in_ready, out_valid;

  int checks = 0, failures = 0;
  longint cyc = 0;

  rate_ctrl #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send n packets back to back; sizes fixed (len != 0) or random.
  task automatic stream(input int n, input int len);
    real    bits;
    longint t0, tl;
    int     cur;
    bits = 0.0;
    for (int i = 0; i < n; i++) begin
      cur = (len != 0) ? len : $urandom_range(64, 1500);
      @(negedge clk);
      in_valid = 1'b1; pkt_len = 16'(cur); in_data = {32'(i), 16'(cur), 16'hA5A5};
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      check(out_valid && out_data == in_data, "descriptor passes unchanged");
      if (i == 0) t0 = cyc;
      if (i == n - 1) tl = cyc;
      if (i < n - 1) bits += 8.0 * cur;
    end
    @(negedge clk);
    in_valid = 1'b0;
    begin
      real expect_c;
      expect_c = bits / BITS_PER_CLK;
      $display("stream of %0d: %0d clocks, line rate needs %0.1f", n, tl - t0, expect_c);
      check((real'(tl - t0) - expect_c) < 2.0 && (expect_c - real'(tl - t0)) < 2.0,
            "packets leave at the line rate");
    end
    repeat (600) @(negedge clk);   // let the debt run out
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // disabled: nothing passes
    @(negedge clk);
    in_valid = 1'b1; pkt_len = 16'd370; in_data = 64'h1234;
    repeat (5) begin
      #1; check(!in_ready && !out_valid, "held while disabled");
      @(negedge clk);
    end
    in_valid = 1'b0;
    enable = 1'b1;
    // output back-pressure holds the stream
    @(negedge clk);
    out_ready = 1'b0; in_valid = 1'b1;
    #1; check(!in_ready, "held while output not ready");
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b1;
    stream(2000, 370);
    stream(2000, 0);
    // bypass: one descriptor per clock, no pacing
    bypass = 1'b1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = 1'b1; pkt_len = 16'd1500; in_data = 64'(i);
      #1; check(in_ready && out_valid && out_data == 64'(i), "bypass passes every clock");
    end
    @(negedge clk);
    in_valid = 1'b0; bypass = 1'b0;
    #1; check(in_ready == 1'b1, "no debt left by bypassed packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
