// tb_dif_counters: self-checking test of the detector interface card counters.
// Each of the ten inputs gets its own random number of pulses (or live
// microseconds) in an interval; after the one-second latch the five read words
// are compared with bytes computed by the testbench: saturation at each
// counter's own width, the reference compression, and the 8 MSBs of the 20-bit
// live-time counts.
module tb_dif_counters;
  logic clk = 0, rst_n = 0, sec_tick = 0, tick_1mhz = 0;
  logic f_preamp_rst = 0, f_slow_valid = 0, f_slow_uld = 0, f_fast_valid = 0, f_live = 0;
  logic r_preamp_rst = 0, r_slow_valid = 0, r_slow_uld = 0, r_fast_valid = 0, r_live = 0;
  logic [15:0] word [5];
  int checks = 0, failures = 0;

  dif_counters dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] ref_comp(input longint v, input int w);
    longint t; int e;
    if (v > (64'd1 << w) - 1) v = (64'd1 << w) - 1;
    if (w <= 8 || v < 16) return 8'(v);
    t = v; e = 1;
    while (t >= 32) begin t = t >> 1; e++; end
    if (e > 15) return 8'hFF;
    return {4'(e), 4'(t)};
  endfunction

  function automatic logic [7:0] ref_msb(input longint v);
    if (v > 20'hFFFFF) v = 20'hFFFFF;
    return 8'(v >> 12);
  endfunction

  initial begin
    int n [10];
    int mx;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      mx = 0;
      for (int i = 0; i < 10; i++) begin
        n[i] = (round == 3) ? 300000 + $urandom_range(0, 100000) : $urandom_range(0, 20000);
        if (n[i] > mx) mx = n[i];
      end
      // live-time inputs: live high every cycle, tick_1mhz in the first n clocks
      for (int k = 0; k < mx; k++) begin
        @(negedge clk);
        f_preamp_rst = k < n[0]; f_slow_valid = k < n[1]; f_slow_uld = k < n[2];
        f_fast_valid = k < n[3]; f_live = 1; tick_1mhz = 1;
        r_preamp_rst = k < n[5]; r_slow_valid = k < n[6]; r_slow_uld = k < n[7];
        r_fast_valid = k < n[8]; r_live = k < n[9];
        if (k >= n[4]) f_live = 0;
      end
      @(negedge clk);
      {f_preamp_rst, f_slow_valid, f_slow_uld, f_fast_valid, f_live} = '0;
      {r_preamp_rst, r_slow_valid, r_slow_uld, r_fast_valid, r_live} = '0;
      tick_1mhz = 0; sec_tick = 1;
      @(negedge clk); sec_tick = 0;
      check("X4", word[0], {ref_comp(n[0], 16), ref_comp(n[1], 17)});
      check("X5", word[1], {ref_comp(n[2], 9),  ref_comp(n[3], 19)});
      check("X6", word[2], {ref_msb(n[4]),      ref_comp(n[5], 18)});
      check("X7", word[3], {ref_comp(n[6], 14), ref_comp(n[7], 8)});
      check("X8", word[4], {ref_comp(n[8], 19), ref_msb(n[9])});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
