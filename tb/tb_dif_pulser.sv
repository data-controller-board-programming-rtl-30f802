// tb_dif_pulser: self-checking test of the test pulser and event strobe
// selection, with a reduced second (US_PER_SEC = 2048) and a microsecond tick
// every 3 clocks. Checks the pulse period (US_PER_SEC >> sel ticks) for all
// eleven rates and for an out-of-range setting, no pulses while disabled, and
// the event strobe in each of the four test modes.
module tb_dif_pulser;
  localparam int UPS = 2048, TPC = 3;
  logic clk = 0, rst_n = 0, tick_1mhz = 0, pulser_en = 0, det_strobe = 0;
  logic [3:0] sel = 0;
  logic [1:0] test_mode = 0;
  logic pulse, event_strobe;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dif_pulser #(.US_PER_SEC(UPS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    tick_1mhz <= (cyc % TPC) == 0;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // over n clocks: number of pulses, number of event strobes, last pulse gap
  task automatic run(input int n, output int np, output int ns, output longint gap);
    longint last = -1;
    np = 0; ns = 0; gap = -1;
    repeat (n) begin
      @(negedge clk);
      ns += event_strobe;
      if (pulse) begin
        if (last >= 0) gap = cyc - last;
        last = cyc; np++;
      end
    end
  endtask

  initial begin
    int np, ns;
    longint g;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5000, np, ns, g); check("disabled", np, 0);
    pulser_en = 1;
    for (int s = 0; s <= 12; s++) begin
      int per;
      sel = 4'(s);
      per = UPS >> ((s > 10) ? 10 : s);
      run(TPC * per * 2, np, ns, g);   // settle
      run(TPC * per * 3, np, ns, g);
      check("pulses", np, 3);
      check("period", g, TPC * per);
    end
    // event strobe selection; the pulser period at sel 3 is 256 ticks
    sel = 3;
    test_mode = 2'b00;
    fork
      repeat (40) begin @(negedge clk); det_strobe = 1; @(negedge clk); det_strobe = 0; repeat (3) @(negedge clk); end
    join_none
    run(200, np, ns, g); check("normal mode strobes", ns, 40);
    test_mode = 2'b01;
    run(TPC * 160, np, ns, g); check("1 MHz strobes", ns, 160);
    test_mode = 2'b10;
    run(TPC * 160, np, ns, g); check("62.5 kHz strobes", ns, 10);
    test_mode = 2'b11;
    run(TPC * 256 * 4, np, ns, g); check("pulser strobes", ns, 4); check("pulses", np, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
