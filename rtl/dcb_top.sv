// dcb_top: the data controller board's processor-facing logic and the detector
// interface cards on its backplane.
//
// An 8085 processor reaches everything through one bus. bcf_decode latches its
// address and splits memory cycles into ROM and RAM selects (the ROM and RAM
// chips themselves are outside) and I/O cycles into one-clock register
// accesses. The 256 I/O ports are shared by upper nibble:
//   0-8  detector interface cards (N_DIF dif_card instances, card id = nibble)
//   9, A aspect data processor and power controller (outside; their backplane
//        read data comes in on ext_rdata)
//   B    bus controller registers (bcf_regs, idpu_bridge for B2, watchdog)
//   C    packet formatter registers and time base (pff_regs)
//   D    DMA controller (outside; dma_cs_n)
//   E    packet formatter memory test port (pff_test_port)
//   F    backplane broadcast
// Ports 0-A and F are carried on the 16-bit backplane bus through idpu_bridge,
// whose bus extension register supplies or captures the upper byte.
//
// The 32K x 16 packet formatter memory (pf_memory) is shared: in memory test
// mode (packet formatter control bit 0) the test port drives it, otherwise the
// packet formatter's own port pfw_* (whose packet collection and telemetry
// logic is outside this model) does. The packet formatter time base provides
// the microsecond, one-second and 8 Hz ticks used by the bus controller's
// particle detector counters and by the cards' counters and pulsers.
//
// Read data for the processor is the OR of the blocks' read data (each is zero
// when not addressed) and is meant to be driven onto AD[7:0] while ad_oe is
// high. All logic runs on one board clock, assumed 10 MHz by the defaults.
// An assertion checks in simulation that at most one card has an analog mux
// enable on, which is what the F0 broadcast select guarantees.
module dcb_top
  import dcb_pkg::*;
#(
  parameter int unsigned N_DIF          = 9,
  parameter int unsigned CLK_PER_US     = 10,
  parameter int unsigned US_PER_SEC     = 1_000_000,
  parameter int unsigned WDT_TIMEOUT    = 10_000_000,
  parameter int unsigned STROBE_CYCLES  = 3,
  parameter int unsigned PF_DEPTH       = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  // 8085 bus
  input  logic        ale,
  input  logic [7:0]  ad_in,
  output logic [7:0]  ad_out,
  output logic        ad_oe,
  input  logic [7:0]  a_hi,
  input  logic        iom,
  input  logic        rd_n,
  input  logic        wr_n,
  // memory and DMA selects
  output logic [15:0] la,
  output logic        rom_cs_n,
  output logic        ram_cs_n,
  output logic        rom_pwr,
  output logic        dma_cs_n,
  output logic        wdt_rst,
  // bus controller I/O
  input  logic        pd_a_evt,
  input  logic        pd_b_evt,
  input  logic [15:0] adc_data,
  input  logic        adc_oc,
  input  logic        uplink_par_err,
  input  logic        adp_req,
  output logic        fast_rate_en,
  output logic        monitor_rate_en,
  output logic        uplink_en,
  output logic        adc_shutdown,
  output logic        adc_run,
  output logic        adc_soc,
  output logic [7:0]  pd_dac_data,
  output logic        pd_dac_wr,
  output logic [7:0]  diag_data,
  output logic        diag_stb,
  output logic [7:0]  bcf_status,
  output logic [8:0]  etr_masked,
  output logic        adp_req_masked,
  // backplane, for the aspect data processor and power controller
  output idpu_req_t   idpu,
  input  logic [15:0] ext_rdata,
  // packet formatter
  input  logic        sc_1mhz,
  input  logic        sc_1hz,
  input  logic        dma_eop,
  input  logic        rrecrdyf,
  input  logic        safe,
  input  logic [7:0]  err_set,
  output logic        tlm_inhibit,
  output logic [2:0]  pff_irq,
  output logic [7:0]  header [6],
  output logic [31:0] seconds,
  output logic [19:0] subsec,
  // packet formatter's own memory port
  input  logic [14:0] pfw_addr,
  input  logic [15:0] pfw_wdata,
  input  logic        pfw_we,
  output logic [15:0] pfw_rdata,
  // detector interface cards
  input  logic                        collect_tick,
  input  logic [N_DIF-1:0][31:0]      event_word,
  input  logic [N_DIF-1:0]            event_valid,
  output logic [N_DIF-1:0]            event_pop,
  input  logic [N_DIF-1:0][31:0]      fast_rate,
  input  logic [N_DIF-1:0]            det_strobe,
  input  logic [N_DIF-1:0][1:0]       preamp_rst,
  input  logic [N_DIF-1:0][1:0]       slow_valid,
  input  logic [N_DIF-1:0][1:0]       slow_uld,
  input  logic [N_DIF-1:0][1:0]       fast_valid,
  input  logic [N_DIF-1:0][1:0]       live,
  input  logic [N_DIF-1:0][1:0]       afe_shdn,
  output logic [N_DIF-1:0]            afe_pwr,
  output logic [N_DIF-1:0]            tp_pwr,
  output logic [N_DIF-1:0]            spare_out,
  output logic [N_DIF-1:0]            oc_latched,
  output logic [N_DIF-1:0]            pulse,
  output logic [N_DIF-1:0]            event_strobe,
  output logic [N_DIF-1:0][3:0]       test_energy,
  output logic [N_DIF-1:0][5:0]       front_en,
  output logic [N_DIF-1:0][7:0]       front_dec,
  output logic [N_DIF-1:0][5:0]       rear_en,
  output logic [N_DIF-1:0][7:0]       rear_dec,
  output logic [N_DIF-1:0][11:0]      dac_data,
  output logic [N_DIF-1:0]            sela,
  output logic [N_DIF-1:0]            ds0_n,
  output logic [N_DIF-1:0]            ds1_n,
  output logic [N_DIF-1:0]            pdac_wr_n,
  output logic [N_DIF-1:0][1:0]       amux_enb,
  output logic [N_DIF-1:0][2:0]       amux_addr
);

  io_req_t io;
  logic    io_rd_cycle, rom_on;
  logic    wdt_touch;
  logic    tick_1mhz, tick_1hz, tick_8hz;
  logic    test_mode, mem_bank;

  bcf_decode u_decode (
    .clk, .rst_n, .ale, .ad_in, .a_hi, .iom, .rd_n, .wr_n, .rom_on,
    .la, .rom_cs_n, .ram_cs_n, .rom_pwr, .dma_cs_n, .io, .io_rd_cycle
  );

  // ---------------- bus controller ----------------
  logic [7:0] bcf_rdata, br_rdata, pff_rdata, tp_rdata;
  logic [8:0] etr;
  logic [7:0] wdt_expired;

  bcf_regs u_bcf (
    .clk, .rst_n, .io, .rdata(bcf_rdata),
    .pd_a_evt, .pd_b_evt, .tick_8hz, .adc_data, .adc_oc, .uplink_par_err,
    .etr, .adp_req,
    .rom_on, .fast_rate_en, .monitor_rate_en, .uplink_en, .adc_shutdown,
    .adc_run, .adc_soc, .dac_data(pd_dac_data), .dac_wr(pd_dac_wr),
    .diag_q(diag_data), .diag_stb, .wdt_touch, .status(bcf_status),
    .etr_masked, .adp_req_masked
  );

  bcf_watchdog #(.TIMEOUT_CYCLES(WDT_TIMEOUT)) u_wdt (
    .clk, .rst_n, .touch(wdt_touch), .wdt_rst, .expired_cnt(wdt_expired)
  );

  logic [15:0] idpu_rdata, dif_rdata_or;
  logic [N_DIF-1:0][15:0] dif_rdata;

  idpu_bridge u_bridge (
    .clk, .rst_n, .io, .rdata(br_rdata), .idpu, .idpu_rdata
  );

  always_comb begin
    dif_rdata_or = '0;
    for (int i = 0; i < N_DIF; i++) dif_rdata_or |= dif_rdata[i];
  end
  assign idpu_rdata = dif_rdata_or |
      ((idpu.addr[7:4] == IO_ADP || idpu.addr[7:4] == IO_PWR) ? ext_rdata : 16'h0000);

  // ---------------- packet formatter ----------------
  pff_regs #(.CLK_PER_US(CLK_PER_US), .US_PER_SEC(US_PER_SEC)) u_pff (
    .clk, .rst_n, .io, .rdata(pff_rdata),
    .sc_1mhz, .sc_1hz, .dma_eop, .rrecrdyf, .safe, .err_set,
    .test_mode, .mem_bank, .tlm_inhibit, .irq(pff_irq), .header,
    .tick_1mhz, .tick_1hz, .tick_8hz, .seconds, .subsec
  );

  localparam int unsigned PAW = $clog2(PF_DEPTH);

  logic [14:0] tp_addr;
  logic [15:0] tp_wdata, mem_rdata;
  logic        tp_we;

  pff_test_port u_test (
    .clk, .rst_n, .io, .rdata(tp_rdata), .test_mode, .bank(mem_bank),
    .mem_addr(tp_addr), .mem_wdata(tp_wdata), .mem_we(tp_we), .mem_rdata
  );

  logic [14:0] m_addr;
  assign m_addr = test_mode ? tp_addr : pfw_addr;

  pf_memory #(.DEPTH(PF_DEPTH), .WIDTH(16)) u_pfmem (
    .clk,
    .we    (test_mode ? tp_we : pfw_we),
    .addr  (m_addr[PAW-1:0]),
    .wdata (test_mode ? tp_wdata : pfw_wdata),
    .rdata (mem_rdata)
  );
  assign pfw_rdata = mem_rdata;

  // ---------------- detector interface cards ----------------
  logic [N_DIF-1:0] dif_etr;

  for (genvar g = 0; g < N_DIF; g++) begin : g_dif
    dif_card #(
      .CARD_ID(4'(g)), .US_PER_SEC(US_PER_SEC), .STROBE_CYCLES(STROBE_CYCLES)
    ) u_dif (
      .clk, .rst_n, .idpu, .rdata(dif_rdata[g]),
      .tick_1mhz, .sec_tick(tick_1hz), .collect_tick,
      .event_word(event_word[g]), .event_valid(event_valid[g]), .event_pop(event_pop[g]),
      .fast_rate(fast_rate[g]), .det_strobe(det_strobe[g]),
      .preamp_rst(preamp_rst[g]), .slow_valid(slow_valid[g]), .slow_uld(slow_uld[g]),
      .fast_valid(fast_valid[g]), .live(live[g]), .afe_shdn(afe_shdn[g]),
      .etr(dif_etr[g]), .afe_pwr(afe_pwr[g]), .tp_pwr(tp_pwr[g]),
      .spare_out(spare_out[g]), .oc_latched(oc_latched[g]),
      .pulse(pulse[g]), .event_strobe(event_strobe[g]),
      .test_energy(test_energy[g]), .front_en(front_en[g]), .front_dec(front_dec[g]),
      .rear_en(rear_en[g]), .rear_dec(rear_dec[g]),
      .dac_data(dac_data[g]), .sela(sela[g]), .ds0_n(ds0_n[g]), .ds1_n(ds1_n[g]),
      .pdac_wr_n(pdac_wr_n[g]), .amux_enb(amux_enb[g]), .amux_addr(amux_addr[g])
    );
  end

  assign etr = 9'(dif_etr);

  // ---------------- processor read data ----------------
  assign ad_out = bcf_rdata | br_rdata | pff_rdata | tp_rdata;
  assign ad_oe  = io_rd_cycle;

  // The F0 broadcast selects one card at a time, so at most one analog mux
  // enable on the whole backplane may be on (checked in simulation).
  a_one_amux: assert property (@(posedge clk) disable iff (!rst_n) $countones(amux_enb) <= 1)
    else $error("dcb_top: more than one analog mux enabled");

endmodule
