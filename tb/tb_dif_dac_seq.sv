// tb_dif_dac_seq: self-checking test of the DAC programming sequencer.
// For random DAC words it checks the latched 12-bit data and SELA, that only
// the strobes chosen by bits 12, 13 and 15 go low, that they start one clock
// after the write clock and stay low for exactly STROBE_CYCLES clocks, and
// that data and SELA hold until the next write; a write during a running
// sequence is ignored.
module tb_dif_dac_seq;
  localparam int SC = 3;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [15:0] word = 0;
  logic [11:0] dac_data;
  logic sela, ds0_n, ds1_n, pdac_wr_n, busy;
  int checks = 0, failures = 0;

  dif_dac_seq #(.STROBE_CYCLES(SC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle strobes", {ds0_n, ds1_n, pdac_wr_n}, 3'b111);
    for (int k = 0; k < 40; k++) begin
      logic [15:0] w;
      int low0, low1, lowp, first;
      w = (k < 8) ? {k[2], 1'b0, k[1:0], 12'($urandom)} : 16'($urandom);
      w[15] = (k < 8) ? k[2] : w[15];
      w[14] = $urandom_range(0, 1);
      @(negedge clk); wr = 1; word = w;
      @(negedge clk); wr = 0; word = 16'($urandom);
      check("data", dac_data, w[11:0]); check("sela", sela, w[14]);
      check("setup clock", {ds0_n, ds1_n, pdac_wr_n}, 3'b111);
      low0 = 0; low1 = 0; lowp = 0; first = -1;
      for (int c = 0; c < SC + 4; c++) begin
        @(negedge clk);
        if (c == 1) begin wr = 1; word = 16'hFFFF; end   // ignored: sequence running
        if (c == 2) wr = 0;
        low0 += !ds0_n; low1 += !ds1_n; lowp += !pdac_wr_n;
        if (first < 0 && (!ds0_n || !ds1_n || !pdac_wr_n)) first = c;
      end
      check("ds0 width", low0, w[12] ? SC : 0);
      check("ds1 width", low1, w[13] ? SC : 0);
      check("pdac width", lowp, w[15] ? SC : 0);
      if (w[12] || w[13] || w[15]) check("strobe start", first, 0);
      check("data held", dac_data, w[11:0]); check("sela held", sela, w[14]);
      check("idle", busy, 0);
    end
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
