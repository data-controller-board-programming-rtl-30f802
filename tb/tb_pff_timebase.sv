// tb_pff_timebase: self-checking test of the packet formatter time base, at a
// reduced second (CLK_PER_US = 4, US_PER_SEC = 8192) so that whole seconds
// simulate quickly. Internal mode: microsecond tick every 4 clocks, one-second
// tick every 8192 microseconds, seconds and subseconds counts, 8 ticks per
// second at 8 Hz, and the timer tick period (US_PER_SEC/8 >> sel) for all eight
// rate settings. Spacecraft mode: ticks follow the 1 MHz and 1 Hz inputs,
// subseconds restart at each 1 Hz edge. Byte writes of the seconds register.
module tb_pff_timebase;
  localparam int CPU = 4, UPS = 8192;
  logic clk = 0, rst_n = 0;
  logic int_mode = 1, sc_1mhz = 0, sc_1hz = 0;
  logic [2:0] timer_sel = 0;
  logic [3:0] sec_we = 0;
  logic [7:0] sec_wdata = 0;
  logic tick_1mhz, tick_1hz, tick_8hz, timer_tick;
  logic [19:0] subsec;
  logic [31:0] seconds;
  int checks = 0, failures = 0;
  longint cyc = 0;

  pff_timebase #(.CLK_PER_US(CPU), .US_PER_SEC(UPS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // count ticks of each kind over n clocks; returns the last two timer ticks' spacing
  task automatic run(input int n, output int n_us, output int n_s, output int n_8,
                     output int n_t, output longint t_gap);
    longint last_t = -1;
    n_us = 0; n_s = 0; n_8 = 0; n_t = 0; t_gap = -1;
    repeat (n) begin
      @(negedge clk);
      n_us += tick_1mhz; n_s += tick_1hz; n_8 += tick_8hz;
      if (timer_tick) begin
        if (last_t >= 0) t_gap = cyc - last_t;
        last_t = cyc; n_t++;
      end
    end
  endtask

  initial begin
    int a, b, c, d;
    longint g;
    logic [31:0] s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // internal mode, one whole second from reset
    run(CPU * UPS - 2, a, b, c, d, g);
    check("us ticks before 1s", a, UPS - 1);
    check("no second yet", b, 0);
    check("subsec", subsec, UPS - 1);
    run(2, a, b, c, d, g);
    check("second tick", b, 1);
    check("seconds", seconds, 1);
    check("subsec cleared", subsec, 0);
    run(CPU * UPS, a, b, c, d, g);
    check("8 Hz per second", c, 8);
    check("1 s", b, 1);
    check("seconds 2", seconds, 2);
    for (int s = 0; s < 8; s++) begin
      timer_sel = 3'(s);
      run(CPU * (UPS / 8 >> s) * 3, a, b, c, d, g);  // settle
      run(CPU * (UPS / 8 >> s) * 4, a, b, c, d, g);
      check("timer ticks", d, 4);
      check("timer period", g, CPU * (UPS / 8 >> s));
    end
    // seconds byte writes
    s0 = seconds;
    @(negedge clk); sec_we = 4'b1000; sec_wdata = 8'hA5;
    @(negedge clk); sec_we = 4'b0001; sec_wdata = 8'h3C;
    @(negedge clk); sec_we = 0;
    check("seconds written", {seconds[31:24], seconds[7:0]}, 16'hA53C);
    check("seconds middle kept", seconds[23:8], s0[23:8]);
    // spacecraft mode: 1 MHz input of period 6 clocks, 1 Hz every 600 clocks
    int_mode = 0;
    fork
      forever begin @(negedge clk); sc_1mhz = 1; repeat (3) @(negedge clk); sc_1mhz = 0; repeat (2) @(negedge clk); end
      forever begin repeat (599) @(negedge clk); sc_1hz = 1; @(negedge clk); sc_1hz = 0; end
    join_none
    run(1200, a, b, c, d, g);
    s0 = seconds;
    run(6000, a, b, c, d, g);
    check("ext us ticks", a, 1000);
    check("ext seconds ticks", b, 10);
    check("ext seconds count", seconds - s0, 10);
    check("ext subsec at most 100", subsec <= 100, 1);
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
