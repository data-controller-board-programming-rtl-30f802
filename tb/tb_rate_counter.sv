// tb_rate_counter: self-checking test of rate_counter.
// Three counters (16-bit compressed, 20-bit MSB readout, 8-bit) count the same
// random event pulses; after each latch tick the raw count and the readout
// byte are compared with a count kept by the testbench and with a reference
// compression written independently of the design (repeated halving).
// Saturation of the 8-bit counter and the hand-over of an event in the latch
// clock are also checked.
module tb_rate_counter;
  logic clk = 0, rst_n = 0;
  logic inc = 0, latch = 0;
  logic [15:0] q16; logic [7:0] o16;
  logic [19:0] q20; logic [7:0] o20;
  logic [7:0]  q8;  logic [7:0] o8;
  int checks = 0, failures = 0;

  rate_counter #(.WIDTH(16), .COMPRESS(1'b1)) dut16 (.clk, .rst_n, .inc, .latch, .count_q(q16), .out8(o16));
  rate_counter #(.WIDTH(20), .COMPRESS(1'b0)) dut20 (.clk, .rst_n, .inc, .latch, .count_q(q20), .out8(o20));
  rate_counter #(.WIDTH(8))                   dut8  (.clk, .rst_n, .inc, .latch, .count_q(q8),  .out8(o8));

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_comp(input longint v);
    longint t; int e;
    if (v < 16) return 8'(v);
    t = v; e = 1;
    while (t >= 32) begin t = t >> 1; e++; end
    if (e > 15) return 8'hFF;
    return {4'(e), 4'(t)};
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // count n events over some clocks, then latch; carry = event in latch clock
  task automatic interval(input int n, input bit carry_in, input bit carry_out);
    int done = 0;
    while (done < n) begin
      @(negedge clk);
      inc = ($urandom_range(0, 2) != 0);
      if (inc) done++;
    end
    @(negedge clk); inc = carry_out; latch = 1;
    @(negedge clk); inc = 0; latch = 0;
    begin
      longint expv = n + (carry_in ? 1 : 0);
      check("raw16", q16, (expv > 65535) ? 65535 : expv);
      check("comp16", o16, ref_comp((expv > 65535) ? 65535 : expv));
      check("raw20", q20, expv);
      check("msb20", o20, (expv >> 12) & 8'hFF);
      check("raw8", q8, (expv > 255) ? 255 : expv);
      check("out8", o8, (expv > 255) ? 255 : expv);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    interval(0, 0, 0);
    interval(5, 0, 1);
    interval(15, 1, 0);
    interval(16, 0, 0);
    interval(100, 0, 0);
    interval(300, 0, 1);
    interval(4095, 1, 0);
    interval(20000, 0, 0);
    interval(70000, 0, 0);
    // compression spot checks against hand-worked values
    check("c16", ref_comp(16), 8'h10);
    check("c100", ref_comp(100), 8'h39);   // 100 = (16+9)<<2 -> E=3, M=9
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
