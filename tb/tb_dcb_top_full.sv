// tb_dcb_top_full: the whole board at its default parameters (10 MHz clock,
// 1 MHz microsecond tick, one-second second, nine cards, 32K x 16 memory)
// through one complete second of operation. The processor switches to the
// internal time base, programs a card's DAC through the bus extension
// register, writes and reads a packet formatter memory word in test mode, and
// waits for one second; meanwhile a card's front fast channel sees 100 events
// and its rear channel is live for the whole second. The checks: the second
// arrives after exactly 10,000,000 clocks, the seconds register and flag, eight
// 8 Hz latches of the particle detector counter, the card counter words
// latched at the second, the DAC strobes (3 clocks = 300 ns) and the memory
// word.
module tb_dcb_top_full;
  import dcb_pkg::*;
  localparam int N = 9;

  logic clk = 0, rst_n = 0;
  logic ale, iom, rd_n, wr_n; logic [7:0] ad_in, a_hi, ad_out; logic ad_oe;
  logic [15:0] la; logic rom_cs_n, ram_cs_n, rom_pwr, dma_cs_n, wdt_rst;
  logic pd_a_evt = 0, pd_b_evt = 0, adc_oc = 0, uplink_par_err = 0, adp_req = 0;
  logic [15:0] adc_data = 0;
  logic fast_rate_en, monitor_rate_en, uplink_en, adc_shutdown, adc_run, adc_soc;
  logic [7:0] pd_dac_data, diag_data, bcf_status; logic pd_dac_wr, diag_stb;
  logic [8:0] etr_masked; logic adp_req_masked;
  idpu_req_t idpu; logic [15:0] ext_rdata = 0;
  logic sc_1mhz = 0, sc_1hz = 0, dma_eop = 0, rrecrdyf = 0, safe = 0;
  logic [7:0] err_set = 0;
  logic tlm_inhibit; logic [2:0] pff_irq; logic [7:0] header [6];
  logic [31:0] seconds; logic [19:0] subsec;
  logic [14:0] pfw_addr = 0; logic [15:0] pfw_wdata = 0, pfw_rdata; logic pfw_we = 0;
  logic collect_tick = 0;
  logic [N-1:0][31:0] event_word = '0, fast_rate = '0;
  logic [N-1:0] event_valid = 0, event_pop, det_strobe = 0;
  logic [N-1:0][1:0] preamp_rst = 0, slow_valid = 0, slow_uld = 0, fast_valid = 0, live = 0, afe_shdn = 0;
  logic [N-1:0] afe_pwr, tp_pwr, spare_out, oc_latched, pulse, event_strobe, sela, ds0_n, ds1_n, pdac_wr_n;
  logic [N-1:0][3:0] test_energy; logic [N-1:0][5:0] front_en, rear_en;
  logic [N-1:0][7:0] front_dec, rear_dec; logic [N-1:0][11:0] dac_data;
  logic [N-1:0][1:0] amux_enb; logic [N-1:0][2:0] amux_addr;

  dcb_top dut (.*);

  cpu8085_model cpu (.clk, .ale, .ad(ad_in), .a_hi, .iom, .rd_n, .wr_n, .ad_out, .ad_oe,
                     .rom_cs_n, .ram_cs_n);

  always #50 clk = ~clk;   // 10 MHz

  int checks = 0, failures = 0, n_pd = 0;
  longint cyc = 0, t_sec = -1, t_switch = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) n_pd += !pdac_wr_n[8];
    if (seconds == 1 && t_sec < 0) t_sec = cyc;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] d, lo, hi;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // internal time base; the clock count starts here
    cpu.io_wr(8'hC0, 8'h81);
    t_switch = cyc;
    live[4] = 2'b10;
    // pulser DAC write on card 8
    cpu.io_wr(8'hB2, 8'h83); cpu.io_wr(8'h8C, 8'h21);
    repeat (8) @(negedge clk);
    check("dac data", dac_data[8], 12'h321); check("pdac strobe", n_pd, 3);
    // test mode memory word
    cpu.io_wr(8'hEA, 8'hFF); cpu.io_wr(8'hEB, 8'h3F);
    cpu.io_wr(8'hE8, 8'h99); cpu.io_wr(8'hE9, 8'h77); cpu.io_wr(8'hED, 8'h00);
    cpu.io_rd(8'hE8, lo); cpu.io_rd(8'hEC, hi);
    check("memory word", {hi, lo}, 16'h7799);
    // 100 fast channel events on card 4 and 40 particle detector A events
    repeat (100) begin
      @(negedge clk); fast_valid[4] = 2'b01; pd_a_evt = 1;
      @(negedge clk); fast_valid[4] = 0; pd_a_evt = 0;
    end
    while (seconds == 0) @(negedge clk);
    @(negedge clk);
    live[4] = 0;
    // the switch is seen a couple of clocks before the task returns
    check("second length in clocks", (t_sec - t_switch) >= 9_999_980 && (t_sec - t_switch) <= 10_000_000, 1);
    cpu.io_rd(8'hC1, d); check("second flag", d[1], 1);
    cpu.io_rd(8'hC4, d); check("seconds", d, 1);
    // card 4: X5 low byte = fast valid count 100 = (16+9)<<2 -> 8'h39
    cpu.io_rd(8'h45, d); check("card4 fast valid", d, 8'h39);
    // card 4: X8 low byte = rear live-time MSBs: 1,000,000 us >> 12 = 244
    cpu.io_rd(8'h48, d); check("card4 rear live", d, 8'd244);
    // the 8 Hz latches have since cleared the particle detector count
    cpu.io_rd(8'hB0, d); check("pd counter relatched", d, 0);
    $display("second at clock %0d", t_sec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (11_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
