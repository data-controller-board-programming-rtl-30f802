// tb_bcf_watchdog: self-checking test of the watchdog timer.
// With a short timeout it checks that regular touches keep wdt_rst low, that
// the reset pulse starts exactly TIMEOUT clocks after the last touch and lasts
// RST clocks, that it repeats while the timer is not touched, and that a touch
// ends a pulse and restarts the full timeout.
module tb_bcf_watchdog;
  localparam int TO = 50, RC = 4;
  logic clk = 0, rst_n = 0, touch = 0;
  logic wdt_rst;
  logic [7:0] expired_cnt;
  int checks = 0, failures = 0;

  bcf_watchdog #(.TIMEOUT_CYCLES(TO), .RST_CYCLES(RC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_touch();
    @(negedge clk); touch = 1; @(negedge clk); touch = 0;
  endtask

  // clocks from now until wdt_rst rises, and then its length
  task automatic measure(output int until_rise, output int len);
    until_rise = 0; len = 0;
    while (!wdt_rst && until_rise < 10 * TO) begin @(negedge clk); until_rise++; end
    while (wdt_rst && len < 10 * TO) begin @(negedge clk); len++; end
  endtask

  initial begin
    int t, l, hi;
    repeat (3) @(negedge clk);
    rst_n = 1;
    hi = 0;
    for (int i = 0; i < 20; i++) begin
      repeat (TO - 5) begin @(negedge clk); hi += wdt_rst; end
      do_touch();
    end
    check("touched never fires", hi, 0);
    check("no expiry", expired_cnt, 0);
    measure(t, l);
    check("timeout", t, TO);
    check("pulse length", l, RC);
    measure(t, l);
    check("repeat timeout", t, TO);
    check("repeat length", l, RC);
    check("expiries", expired_cnt, 2);
    // touch during a pulse ends it
    while (!wdt_rst) @(negedge clk);
    do_touch();
    check("pulse ended", wdt_rst, 0);
    measure(t, l);
    check("restart", t, TO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
