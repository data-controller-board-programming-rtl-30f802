// tb_bcf_regs: self-checking test of the bus controller registers B0-BA.
// Drives one-clock I/O accesses and checks reset values, every write register
// and the outputs it controls, the one-clock pulses (watchdog touch, ADC start
// of conversion, DAC write, diagnostic strobe), the status byte, set/clear of
// the uplink parity and ADC overcurrent latches, ADCSHUTDOWN with and without
// the disable bit, the transfer request masks, the 8 Hz particle detector
// counters (reference compression in the testbench) and decode of other ports.
module tb_bcf_regs;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 0;
  io_req_t io = '0;
  logic [7:0] rdata;
  logic pd_a_evt = 0, pd_b_evt = 0, tick_8hz = 0, adc_oc = 0, uplink_par_err = 0, adp_req = 0;
  logic [15:0] adc_data = 0;
  logic [8:0] etr = 0;
  logic rom_on, fast_rate_en, monitor_rate_en, uplink_en, adc_shutdown, adc_run, adc_soc;
  logic [7:0] dac_data, diag_q, status;
  logic dac_wr, diag_stb, wdt_touch, adp_req_masked;
  logic [8:0] etr_masked;
  int checks = 0, failures = 0;
  int n_soc = 0, n_dac = 0, n_diag = 0, n_touch = 0;

  bcf_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_soc += adc_soc; n_dac += dac_wr; n_diag += diag_stb; n_touch += wdt_touch;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); io.addr = a; io.wdata = d; io.wr = 1;
    @(negedge clk); io.wr = 0;
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); io.addr = a; io.rd = 1;
    #1 d = rdata;
    @(negedge clk); io.rd = 0;
  endtask

  function automatic logic [7:0] ref_comp(input longint v);
    longint t; int e;
    if (v < 16) return 8'(v);
    t = v; e = 1;
    while (t >= 32) begin t = t >> 1; e++; end
    if (e > 15) return 8'hFF;
    return {4'(e), 4'(t)};
  endfunction

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("rom_on reset", rom_on, 1);
    rd(8'hB8, d); check("status reset", d, 8'h80);
    check("fast reset", fast_rate_en, 0);
    // power switches and enables
    wr(8'hB0, 8'h00); check("rom off", rom_on, 0);
    rd(8'hB8, d); check("status romoff", d, 8'h00);
    wr(8'hB0, 8'h01); check("rom on", rom_on, 1);
    wr(8'hB1, 8'h01); check("fast", fast_rate_en, 1); check("mon0", monitor_rate_en, 0);
    rd(8'hB8, d); check("status fast", d, 8'h90);
    wr(8'hB1, 8'h02); check("mon", monitor_rate_en, 1);
    rd(8'hB8, d); check("status mon", d, 8'hA0);
    wr(8'hB1, 8'h04); check("uplink", uplink_en, 1);
    rd(8'hB8, d); check("status uplink", d, 8'hC0);
    wr(8'hB1, 8'h08); rd(8'hB8, d); check("status ocdis", d, 8'h88);
    wr(8'hB1, 8'h00);
    // pulses
    wr(8'hB3, 8'h00); check("touch", n_touch, 1);
    wr(8'hB5, 8'h00); check("soc", n_soc, 1);
    wr(8'hB6, 8'hA5); check("dac", n_dac, 1); check("dac data", dac_data, 8'hA5);
    wr(8'hB7, 8'h3C); check("diag", n_diag, 1); check("diag data", diag_q, 8'h3C);
    wr(8'hC3, 8'h00); wr(8'h35, 8'h00);
    check("no foreign pulses", n_touch + n_soc, 2);
    // ADC control and data
    wr(8'hB4, 8'h01); check("adc run", adc_run, 1);
    adc_data = 16'hBEEF;
    rd(8'hB4, d); check("adc lo", d, 8'hEF);
    rd(8'hB5, d); check("adc hi", d, 8'hBE);
    rd(8'hB6, d); check("B6 reads 0", d, 0);
    rd(8'hC4, d); check("other nibble 0", d, 0);
    // uplink parity latch
    @(negedge clk); uplink_par_err = 1; @(negedge clk); uplink_par_err = 0;
    rd(8'hB8, d); check("parity set", d[0], 1);
    wr(8'hB8, 8'h02); rd(8'hB8, d); check("parity kept", d[0], 1);
    wr(8'hB8, 8'h01); rd(8'hB8, d); check("parity clr", d[0], 0);
    // overcurrent
    @(negedge clk); adc_oc = 1; @(negedge clk);
    rd(8'hB8, d); check("oc bits", d[2:1], 2'b11);
    check("adcshutdown", adc_shutdown, 1);
    adc_oc = 0; @(negedge clk);
    rd(8'hB8, d); check("oc latched only", d[2:1], 2'b01);
    wr(8'hB1, 8'h08); check("shutdown disabled", adc_shutdown, 0);
    wr(8'hB1, 8'h00); check("shutdown again", adc_shutdown, 1);
    wr(8'hB8, 8'h02); check("oc cleared", adc_shutdown, 0);
    rd(8'hB8, d); check("oc bit clr", d[1], 0);
    // masks
    etr = 9'h1FF; adp_req = 1; @(negedge clk);
    check("etr unmasked", etr_masked, 9'h1FF); check("adp unmasked", adp_req_masked, 1);
    wr(8'hB9, 8'hA5); check("etr mask lo", etr_masked, 9'h15A);
    wr(8'hBA, 8'h01); check("etr mask 8", etr_masked, 9'h05A); check("adp", adp_req_masked, 1);
    wr(8'hBA, 8'h02); check("etr 8 back", etr_masked, 9'h15A); check("adp masked", adp_req_masked, 0);
    // particle detector counters
    for (int k = 0; k < 4; k++) begin
      int na, nb;
      na = (k == 0) ? 7 : $urandom_range(0, 3000);
      nb = $urandom_range(0, 300);
      for (int i = 0; i < ((na > nb) ? na : nb); i++) begin
        @(negedge clk); pd_a_evt = (i < na); pd_b_evt = (i < nb);
      end
      @(negedge clk); pd_a_evt = 0; pd_b_evt = 0; tick_8hz = 1;
      @(negedge clk); tick_8hz = 0;
      rd(8'hB0, d); check("pd a", d, ref_comp(na));
      rd(8'hB1, d); check("pd b", d, ref_comp(nb));
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
