// tb_dcb_top: end-to-end test of the data controller board with its nine
// detector interface cards, driven only through 8085 bus cycles (plus the
// board's external inputs). The second is shortened (CLK_PER_US = 2,
// US_PER_SEC = 1024) and the watchdog timeout is 3000 clocks. Every mechanism
// is counted and a mechanism that never happens counts as a failure:
// ROM/RAM decode with the ROM on and off, 16-bit backplane writes and reads
// through the bus extension register, broadcast mux select, the external
// backplane subsystems, the DMA chip select, packet formatter memory test
// writes/reads in both banks and the hand-back to the formatter port, the
// timer, one-second and DMA end-of-process flags, the packet collection error
// flags, the 8 Hz particle detector counters, a watchdog reset, the ADC
// overcurrent shutdown, transfer request masking, a card counter latched at
// the second, a DAC programming sequence, the test pulser and an AFE
// overcurrent power cut.
module tb_dcb_top;
  import dcb_pkg::*;
  localparam int CPU = 2, UPS = 1024, WDT = 3000, N = 9;

  logic clk = 0, rst_n = 0;
  logic ale, iom, rd_n, wr_n; logic [7:0] ad_in, a_hi, ad_out; logic ad_oe;
  logic [15:0] la; logic rom_cs_n, ram_cs_n, rom_pwr, dma_cs_n, wdt_rst;
  logic pd_a_evt = 0, pd_b_evt = 0, adc_oc = 0, uplink_par_err = 0, adp_req = 0;
  logic [15:0] adc_data = 16'h0ABC;
  logic fast_rate_en, monitor_rate_en, uplink_en, adc_shutdown, adc_run, adc_soc;
  logic [7:0] pd_dac_data, diag_data, bcf_status; logic pd_dac_wr, diag_stb;
  logic [8:0] etr_masked; logic adp_req_masked;
  idpu_req_t idpu; logic [15:0] ext_rdata = 16'h1234;
  logic sc_1mhz = 0, sc_1hz = 0, dma_eop = 0, rrecrdyf = 0, safe = 0;
  logic [7:0] err_set = 0;
  logic tlm_inhibit; logic [2:0] pff_irq; logic [7:0] header [6];
  logic [31:0] seconds; logic [19:0] subsec;
  logic [14:0] pfw_addr = 0; logic [15:0] pfw_wdata = 0, pfw_rdata; logic pfw_we = 0;
  logic collect_tick = 0;
  logic [N-1:0][31:0] event_word, fast_rate;
  logic [N-1:0] event_valid = 0, event_pop, det_strobe = 0;
  logic [N-1:0][1:0] preamp_rst = 0, slow_valid = 0, slow_uld = 0, fast_valid = 0, live = 0, afe_shdn = 0;
  logic [N-1:0] afe_pwr, tp_pwr, spare_out, oc_latched, pulse, event_strobe, sela, ds0_n, ds1_n, pdac_wr_n;
  logic [N-1:0][3:0] test_energy; logic [N-1:0][5:0] front_en, rear_en;
  logic [N-1:0][7:0] front_dec, rear_dec; logic [N-1:0][11:0] dac_data;
  logic [N-1:0][1:0] amux_enb; logic [N-1:0][2:0] amux_addr;

  dcb_top #(.N_DIF(N), .CLK_PER_US(CPU), .US_PER_SEC(UPS), .WDT_TIMEOUT(WDT)) dut (.*);

  cpu8085_model cpu (.clk, .ale, .ad(ad_in), .a_hi, .iom, .rd_n, .wr_n, .ad_out, .ad_oe,
                     .rom_cs_n, .ram_cs_n);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mech [string];
  int n_dma = 0, n_wdt = 0, n_ds0_5 = 0, n_es1 = 0, n_soc = 0, n_ext_wr = 0;
  logic wdt_q = 0;

  always @(posedge clk) if (rst_n) begin
    n_dma += !dma_cs_n;
    if (wdt_rst && !wdt_q) n_wdt++;
    wdt_q <= wdt_rst;
    n_ds0_5 += !ds0_n[5];
    n_es1 += event_strobe[1];
    n_soc += adc_soc;
    if (idpu.wr && idpu.addr[7:4] == 4'hA) n_ext_wr++;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic seen(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endtask

  task automatic wr16(input logic [7:0] p, input logic [15:0] w);
    cpu.io_wr(8'hB2, w[15:8]);
    cpu.io_wr(p, w[7:0]);
  endtask

  task automatic rd16(input logic [7:0] p, output logic [15:0] w);
    logic [7:0] lo, hi;
    cpu.io_rd(p, lo);
    cpu.io_rd(8'hB2, hi);
    w = {hi, lo};
  endtask

  function automatic logic [7:0] ref_comp(input longint v);
    longint t; int e;
    if (v < 16) return 8'(v);
    t = v; e = 1;
    while (t >= 32) begin t = t >> 1; e++; end
    return {4'(e), 4'(t)};
  endfunction

  initial begin
    bit r, m;
    logic [7:0] d;
    logic [15:0] w;
    logic [31:0] s0;
    for (int i = 0; i < N; i++) begin
      event_word[i] = {16'hC000 + 16'(i), 16'hF000 + 16'(i)};
      fast_rate[i] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---- memory map ----
    cpu.mem_sel(0, 16'h0100, r, m); check("rom read", {r, m}, 2'b10); if (r) seen("rom_read");
    cpu.mem_sel(1, 16'h0100, r, m); check("write under rom", {r, m}, 2'b01); if (m) seen("ram_write_under_rom");
    cpu.mem_sel(0, 16'h8100, r, m); check("ram alias read", {r, m}, 2'b01);
    cpu.io_wr(8'hB0, 8'h00);
    check("rom power off", rom_pwr, 0);
    cpu.mem_sel(0, 16'h0100, r, m); check("rom off read", {r, m}, 2'b01); if (m) seen("rom_off_ram_read");
    cpu.io_wr(8'hB0, 8'h01);
    cpu.mem_sel(0, 16'h1FFF, r, m); check("rom top", {r, m}, 2'b10);
    cpu.mem_sel(0, 16'h2000, r, m); check("above rom", {r, m}, 2'b01);

    // ---- backplane through the bus extension register ----
    wr16(8'h32, 16'h003F); check("card3 front en", front_en[3], 6'h3F);
    check("card2 untouched", front_en[2], 0);
    wr16(8'h5C, 16'hD5A5);
    repeat (8) @(negedge clk);
    check("card5 dac", dac_data[5], 12'h5A5); check("card5 sela", sela[5], 1);
    check("card5 ds0", n_ds0_5, 3);
    if (n_ds0_5 == 3 && dac_data[5] == 12'h5A5) begin seen("bus_ext_write"); seen("dac_strobe"); end
    rd16(8'h20, w); check("card2 event hi", w, 16'hC002);
    if (w == 16'hC002) seen("bus_ext_read");
    rd16(8'h61, w); check("card6 event lo", w, 16'hF006);
    wr16(8'hF0, 16'h006B);
    check("mux card6", amux_enb[6], 2'b10); check("mux addr6", amux_addr[6], 3'd3);
    check("mux card5 off", amux_enb[5], 2'b00);
    if (amux_enb[6] == 2'b10) seen("broadcast");
    rd16(8'h90, w); check("adp read", w, 16'h1234);
    cpu.io_wr(8'hA3, 8'h55); check("power ctl write", n_ext_wr, 1);
    if (w == 16'h1234 && n_ext_wr == 1) seen("ext_subsystem");
    cpu.io_rd(8'hD0, d); check("dma cs", n_dma > 0, 1); if (n_dma > 0) seen("dma_select");

    // ---- packet formatter memory test mode ----
    cpu.io_wr(8'hC0, 8'h01);
    cpu.io_wr(8'hEA, 8'h34); cpu.io_wr(8'hEB, 8'h12);
    cpu.io_wr(8'hE8, 8'hEF); cpu.io_wr(8'hE9, 8'hBE); cpu.io_wr(8'hED, 8'h00);
    cpu.io_wr(8'hC0, 8'h03);
    cpu.io_wr(8'hE8, 8'hAD); cpu.io_wr(8'hE9, 8'hDE); cpu.io_wr(8'hED, 8'h00);
    seen("pf_test_write");
    cpu.io_rd(8'hE9, d); check("bank1 lo", d, 8'hAD);
    cpu.io_rd(8'hED, d); check("bank1 hi", d, 8'hDE);
    cpu.io_wr(8'hC0, 8'h01);
    cpu.io_rd(8'hEA, d); check("bank0 lo", d, 8'hEF);
    cpu.io_rd(8'hEE, d); check("bank0 hi", d, 8'hBE);
    if (d == 8'hBE) seen("pf_test_read");
    cpu.io_wr(8'hC0, 8'h00);
    pfw_addr = 15'h5234; @(negedge clk); @(negedge clk);
    check("formatter port", pfw_rdata, 16'hDEAD);
    if (pfw_rdata == 16'hDEAD) seen("pf_formatter_port");
    cpu.io_rd(8'hE8, d); check("no test read outside mode", d, 0);

    // ---- time base and interrupts (internal timer, 1024 Hz) ----
    cpu.io_wr(8'hC0, 8'hF0);
    repeat (CPU * 10) @(negedge clk);
    cpu.io_rd(8'hC1, d); check("timer flag", d[0], 1); if (d[0]) seen("timer_irq");
    cpu.io_wr(8'hC0, 8'h80);
    cpu.io_wr(8'hC1, 8'h07);
    s0 = seconds;
    while (seconds == s0) @(negedge clk);
    cpu.io_rd(8'hC1, d); check("second flag", d[1], 1); if (d[1]) seen("second_irq");
    cpu.io_rd(8'hC4, d); check("seconds read", d, 8'(s0 + 1));
    @(negedge clk); dma_eop = 1; @(negedge clk); dma_eop = 0;
    cpu.io_rd(8'hC1, d); check("eop flag", d[2], 1); if (d[2]) seen("eop_irq");
    check("irq out", pff_irq[2], 1);
    @(negedge clk); err_set = 8'h81; @(negedge clk); err_set = 0;
    cpu.io_rd(8'hC2, d); check("errors", d, 8'h81);
    cpu.io_wr(8'hC1, 8'h80);
    cpu.io_rd(8'hC2, d); check("errors cleared", d, 0); if (d == 0) seen("err_flags");

    // ---- particle detector counter A: one event every 4 clocks ----
    s0 = seconds;
    while (seconds == s0) @(negedge clk);
    fork
      repeat (CPU * UPS / 8 * 3 / 4) begin
        @(negedge clk); pd_a_evt = 1; @(negedge clk); pd_a_evt = 0; repeat (2) @(negedge clk);
      end
    join_none
    repeat (CPU * UPS / 8 * 2 + 20) @(negedge clk);
    cpu.io_rd(8'hB0, d); check("pd counter", d, ref_comp(CPU * UPS / 8 / 4));
    if (d == ref_comp(CPU * UPS / 8 / 4)) seen("pd_count");
    wait fork;

    // ---- watchdog: touched, then left alone ----
    cpu.io_wr(8'hB3, 8'h00);
    begin
      int n_wdt0;
      n_wdt0 = n_wdt;
      repeat (WDT - 100) @(negedge clk);
      check("no reset while touched", n_wdt, n_wdt0);
      repeat (200) @(negedge clk);
      check("reset after timeout", n_wdt, n_wdt0 + 1);
      if (n_wdt == n_wdt0 + 1) seen("wdt_reset");
    end

    // ---- ADC ----
    cpu.io_wr(8'hB4, 8'h01); check("adc run", adc_run, 1);
    cpu.io_wr(8'hB5, 8'h00); check("soc", n_soc, 1);
    cpu.io_rd(8'hB4, d); check("adc lo", d, 8'hBC);
    cpu.io_rd(8'hB5, d); check("adc hi", d, 8'h0A);
    @(negedge clk); adc_oc = 1; @(negedge clk); adc_oc = 0;
    check("adc shutdown", adc_shutdown, 1); if (adc_shutdown) seen("adc_shutdown");
    cpu.io_rd(8'hB8, d); check("status oc", d[2:0], 3'b010);
    cpu.io_wr(8'hB8, 8'h02); check("shutdown cleared", adc_shutdown, 0);
    cpu.io_wr(8'hB7, 8'h5A); check("diag", diag_data, 8'h5A);

    // ---- transfer requests ----
    event_valid = 9'h101;
    cpu.io_wr(8'h01, 8'h01); cpu.io_wr(8'h81, 8'h01);
    check("etr", etr_masked, 9'h101);
    cpu.io_wr(8'hBA, 8'h01); check("etr8 masked", etr_masked, 9'h001);
    if (etr_masked == 9'h001) seen("etr_mask");
    cpu.io_wr(8'hBA, 8'h00);
    cpu.io_rd(8'h01, d); check("event popped", d, 8'h00);
    event_valid = 0;

    // ---- card counters latched at the second ----
    s0 = seconds;
    while (seconds == s0) @(negedge clk);
    repeat (20) begin @(negedge clk); fast_valid[7] = 2'b01; @(negedge clk); fast_valid[7] = 0; end
    s0 = seconds;
    while (seconds == s0) @(negedge clk);
    rd16(8'h75, w); check("card7 fast valid", w[7:0], ref_comp(20));
    if (w[7:0] == ref_comp(20)) seen("dif_counter_latch");

    // ---- test pulser on card 1 (sel 2: UPS/4 us) into the event strobe ----
    cpu.io_wr(8'h18, 8'h02); cpu.io_wr(8'h11, 8'h0E);
    n_es1 = 0;
    repeat (CPU * UPS / 4 * 4) @(negedge clk);
    check("pulser strobes", n_es1 >= 3 && n_es1 <= 4, 1);
    if (n_es1 >= 3) seen("pulser_strobe");

    // ---- AFE overcurrent cut on card 0 ----
    cpu.io_wr(8'h00, 8'h0A); check("afe on", afe_pwr[0], 1);
    @(negedge clk); afe_shdn[0] = 2'b01; @(negedge clk); afe_shdn[0] = 0;
    check("afe cut", afe_pwr[0], 0); if (!afe_pwr[0]) seen("afe_overcurrent_cut");
    cpu.io_wr(8'h07, 8'h01); check("afe restored", afe_pwr[0], 1);

    check("bus driven on reads", cpu.bus_errors, 0);
    foreach (mech[k]) $display("mechanism %s: %0d", k, mech[k]);
    begin
      string need [] = '{"rom_read", "ram_write_under_rom", "rom_off_ram_read", "bus_ext_write",
        "dac_strobe", "bus_ext_read", "broadcast", "ext_subsystem", "dma_select",
        "pf_test_write", "pf_test_read", "pf_formatter_port", "timer_irq", "second_irq",
        "eop_irq", "err_flags", "pd_count", "wdt_reset", "adc_shutdown", "etr_mask",
        "dif_counter_latch", "pulser_strobe", "afe_overcurrent_cut"};
      foreach (need[i]) begin
        checks++;
        if (!mech.exists(need[i])) begin failures++; $display("FAIL mechanism never seen: %s", need[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
