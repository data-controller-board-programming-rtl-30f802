// tb_dif_regs: self-checking test of the detector interface card register
// file. Two cards (ids 3 and 1) share one backplane. Checks: address decode
// (only the addressed card answers and takes writes), every write register and
// its outputs, the status word bit by bit, event word read and release, the
// event request, fast rate capture (and the 16-bit-only rule for ids 0-2), the
// counter word pass-through, the overcurrent latch with its clear pulse and the
// AFE power cut, the DAC write pulse, and broadcast analog mux selection.
module tb_dif_regs;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 0;
  idpu_req_t idpu = '0;
  logic [15:0] rd3, rd1;
  logic [31:0] event_word = 0, fast_rate = 0;
  logic event_valid = 0, collect_tick = 0;
  logic [15:0] cnt_word [5];
  logic [1:0] afe_shdn = 0;
  // outputs of card 3
  logic event_pop, spare_out, afe_pwr, tp_pwr, oc_latched, etr, pulser_en;
  logic [1:0] test_mode; logic [3:0] test_energy, pulser_sel;
  logic [5:0] front_en, rear_en; logic [7:0] front_dec, rear_dec;
  logic clr_shutdown, dac_wr; logic [15:0] dac_word;
  logic [1:0] amux_enb, amux_enb1; logic [2:0] amux_addr, amux_addr1;
  int checks = 0, failures = 0, n_dac = 0, n_pop = 0;

  dif_regs #(.CARD_ID(4'd3)) dut (
    .clk, .rst_n, .idpu, .rdata(rd3), .event_word, .event_valid, .event_pop,
    .fast_rate, .collect_tick, .cnt_word, .afe_shdn,
    .spare_out, .afe_pwr, .tp_pwr, .oc_latched, .etr, .pulser_en, .test_mode,
    .test_energy, .front_en, .front_dec, .rear_en, .rear_dec, .pulser_sel,
    .clr_shutdown, .dac_wr, .dac_word, .amux_enb, .amux_addr
  );
  dif_regs #(.CARD_ID(4'd1)) dut1 (
    .clk, .rst_n, .idpu, .rdata(rd1), .event_word, .event_valid, .event_pop(),
    .fast_rate, .collect_tick, .cnt_word, .afe_shdn,
    .spare_out(), .afe_pwr(), .tp_pwr(), .oc_latched(), .etr(), .pulser_en(), .test_mode(),
    .test_energy(), .front_en(), .front_dec(), .rear_en(), .rear_dec(), .pulser_sel(),
    .clr_shutdown(), .dac_wr(), .dac_word(), .amux_enb(amux_enb1), .amux_addr(amux_addr1)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin n_dac += dac_wr; n_pop += event_pop; end

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
    #1 d = rd3 | rd1;
    @(negedge clk); idpu.rd = 0;
  endtask

  initial begin
    logic [15:0] d;
    for (int i = 0; i < 5; i++) cnt_word[i] = 16'h1000 * 16'(i + 1) + 16'h0ABC;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'h3C, d); check("status reset", d, 0);
    // general register
    wr(8'h30, 16'h0001); check("spare", spare_out, 1);
    wr(8'h30, 16'h0002); check("afe pwr", afe_pwr, 1);
    wr(8'h30, 16'h0004); check("tp pwr", tp_pwr, 1); check("afe off", afe_pwr, 0);
    rd(8'h3C, d); check("status tp", d, 16'h0020);
    wr(8'h30, 16'h000A); rd(8'h3C, d); check("status afe+ocs", d, 16'h0003);
    // global register
    wr(8'h31, 16'h00A7);
    check("pulser en", pulser_en, 1); check("test mode", test_mode, 2'b01);
    check("energy", test_energy, 4'hA);
    rd(8'h3C, d); check("status global", d, 16'hA703);
    // front / rear enables and decimation
    wr(8'h32, 16'h003F); check("front en", front_en, 6'h3F);
    wr(8'h33, 16'h005C); check("front dec", front_dec, 8'h5C);
    wr(8'h34, 16'h0015); check("rear en", rear_en, 6'h15);
    wr(8'h35, 16'h00C3); check("rear dec", rear_dec, 8'hC3);
    wr(8'h38, 16'h0009); check("pulser sel", pulser_sel, 4'h9);
    rd(8'h3C, d); check("status fe re", d, 16'hA7C3);
    // the other card took none of this
    wr(8'h12, 16'h0000); check("foreign write", front_en, 6'h3F);
    rd(8'h12, d); check("card1 fast rate 0", d, 0);
    // overcurrent
    @(negedge clk); afe_shdn = 2'b10; @(negedge clk);
    rd(8'h3C, d); check("status shdn1", d[4:2], 3'b101);
    check("afe cut", afe_pwr, 0);
    afe_shdn = 0; @(negedge clk);
    rd(8'h3C, d); check("latched", d[4:2], 3'b001);
    wr(8'h37, 16'h0001); check("oc cleared", oc_latched, 0); check("afe back", afe_pwr, 1);
    wr(8'h30, 16'h0002);
    @(negedge clk); afe_shdn = 2'b01; @(negedge clk); afe_shdn = 0;
    check("no cut without enable", afe_pwr, 1); check("latched 0", oc_latched, 1);
    wr(8'h37, 16'h0001);
    // events
    event_word = 32'hDEAD_BEEF; event_valid = 0; @(negedge clk);
    check("etr idle", etr, 0);
    event_valid = 1; @(negedge clk);
    wr(8'h31, 16'h0000); check("etr disabled", etr, 0);
    wr(8'h31, 16'h0001); check("etr", etr, 1);
    rd(8'h30, d); check("event hi", d, 16'hDEAD); check("no pop on X0", n_pop, 0);
    rd(8'h31, d); check("event lo", d, 16'hBEEF); check("pop on X1", n_pop, 1);
    event_valid = 0;
    // fast rate
    fast_rate = 32'h1234_5678;
    @(negedge clk); collect_tick = 1; @(negedge clk); collect_tick = 0;
    fast_rate = 0;
    rd(8'h32, d); check("fr0", d, 16'h1234);
    rd(8'h33, d); check("fr1", d, 16'h5678);
    rd(8'h13, d); check("card1 fr1 zero", d, 0);
    rd(8'h12, d); check("card1 fr0", d, 16'h1234);
    // counter words
    for (int i = 0; i < 5; i++) begin
      rd(8'h34 + 8'(i), d); check("cnt word", d, cnt_word[i]);
    end
    rd(8'h39, d); check("X9 zero", d, 0);
    // DAC write pulse
    wr(8'h3C, 16'hF123); check("dac pulse", n_dac, 1); check("dac word", dac_word, 16'hF123);
    wr(8'h1C, 16'hF123); check("dac foreign", n_dac, 1);
    // broadcast analog mux select
    wr(8'hF0, 16'h003D); check("mux3", amux_enb, 2'b10); check("addr3", amux_addr, 3'd5);
    check("mux1 off", amux_enb1, 2'b00);
    wr(8'hF0, 16'h0012); check("mux3 off", amux_enb, 2'b00);
    check("mux1 on", amux_enb1, 2'b01); check("addr1", amux_addr1, 3'd2);
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
