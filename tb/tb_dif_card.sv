// tb_dif_card: self-checking test of one complete detector interface card
// (id 4) through its backplane registers, with a reduced second
// (US_PER_SEC = 1024) and a microsecond tick every 2 clocks. Checks counter
// words after a one-second latch, the pulser driving the event strobe in test
// mode 11, a DAC programming write producing its strobes, the status word and
// broadcast analog mux selection.
module tb_dif_card;
  import dcb_pkg::*;
  localparam int UPS = 1024;
  logic clk = 0, rst_n = 0;
  idpu_req_t idpu = '0;
  logic [15:0] rdata;
  logic tick_1mhz = 0, sec_tick = 0, collect_tick = 0;
  logic [31:0] event_word = 32'hCAFE_F00D, fast_rate = 32'h0102_0304;
  logic event_valid = 0, event_pop, det_strobe = 0;
  logic [1:0] preamp_rst = 0, slow_valid = 0, slow_uld = 0, fast_valid = 0, live = 0, afe_shdn = 0;
  logic etr, afe_pwr, tp_pwr, spare_out, oc_latched, pulse, event_strobe;
  logic [3:0] test_energy; logic [5:0] front_en, rear_en; logic [7:0] front_dec, rear_dec;
  logic [11:0] dac_data; logic sela, ds0_n, ds1_n, pdac_wr_n;
  logic [1:0] amux_enb; logic [2:0] amux_addr;
  int checks = 0, failures = 0, n_es = 0, n_ds0 = 0, n_pd = 0;
  longint cyc = 0;

  dif_card #(.CARD_ID(4'd4), .US_PER_SEC(UPS), .STROBE_CYCLES(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    tick_1mhz <= cyc[0];
    if (rst_n) begin n_es += event_strobe; n_ds0 += !ds0_n; n_pd += !pdac_wr_n; end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); idpu.addr = a; idpu.wdata = d; idpu.wr = 1;
    @(negedge clk); idpu.wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); idpu.addr = a; idpu.rd = 1;
    #1 d = rdata;
    @(negedge clk); idpu.rd = 0;
  endtask

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // counters: 5 front slow-valid and 12 rear slow-ULD pulses, half-live front
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      slow_valid[0] = k < 5; slow_uld[1] = k < 12; live[0] = k < 50;
    end
    @(negedge clk); slow_valid = 0; slow_uld = 0; live = 0; sec_tick = 1;
    @(negedge clk); sec_tick = 0;
    rd(8'h44, d); check("X4", d, 16'h0005);
    rd(8'h47, d); check("X7", d, 16'h000C);
    rd(8'h46, d); check("X6 live MSBs", d, 16'h0000);
    rd(8'h34, d); check("not addressed", d, 0);
    // pulser into the event strobe: sel 4 -> 64 ticks = 128 clocks
    wr(8'h48, 16'h0004);
    wr(8'h41, 16'h000E);   // pulser enable, test mode 11
    n_es = 0;
    repeat (128 * 5) @(negedge clk);
    check("pulser strobes", n_es, 5);
    rd(8'h4C, d); check("status global", d[15:8], 8'h0E);
    // DAC write with data strobe 0 and pulser DAC strobe
    wr(8'h4C, 16'hD5A5);
    repeat (8) @(negedge clk);
    check("dac data", dac_data, 12'h5A5); check("sela", sela, 1);
    check("ds0 width", n_ds0, 3); check("pdac width", n_pd, 3);
    // analog mux
    wr(8'hF0, 16'h0043); check("mux", amux_enb, 2'b01); check("mux addr", amux_addr, 3);
    // event read-out
    event_valid = 1;
    wr(8'h41, 16'h0001); check("etr", etr, 1);
    rd(8'h40, d); check("event hi", d, 16'hCAFE);
    rd(8'h41, d); check("event lo", d, 16'hF00D);
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
