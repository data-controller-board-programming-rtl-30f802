// bcf_regs: registers of the bus controller at I/O ports B0-BA (except B2,
// the bus extension register, which lives in idpu_bridge).
//
//   port  read                               write
//   B0    particle detector counter A        power switches: bit0 ROM on (1 at reset)
//   B1    particle detector counter B        enables: bit0 fast rate, bit1 monitor
//                                            rate, bit2 uplink, bit3 disable
//                                            overcurrent shutdown (0 at reset)
//   B3    0                                  watchdog touch (any write)
//   B4    ADC data [7:0]                     ADC control: bit0 ADC run (0 = nap)
//   B5    ADC data [15:8]                    pulse the ADC start-of-conversion line
//   B6    0                                  byte to the particle detector DAC
//   B7    0                                  diagnostic register (internal copy kept,
//                                            strobe for the external debug latch)
//   B8    status (below)                     pulse: bit0 clear uplink parity error,
//                                            bit1 clear ADC overcurrent latch
//   B9    0                                  transfer request mask ETR[7:0]
//   BA    0                                  mask: bit0 ETR8, bit1 ADP request
// Status byte: {ROM on, uplink enable, monitor enable, fast enable, overcurrent
// shutdown disable, ADC overcurrent input, ADC overcurrent latched, uplink
// parity error}. The status and diagnostic bytes are outputs for telemetry.
//
// The particle detector counters are 16-bit rate_counters latched by the 8 Hz
// tick. ADCSHUTDOWN follows the overcurrent latch unless shutdown is disabled
// (B1 bit 3). Masked transfer requests are the requests AND NOT the mask.
// Writes take effect at the end of the io.wr clock; pulse outputs (adc_soc,
// dac_wr, diag_stb, wdt_touch) are one clock long and registered, one clock
// after io.wr. Read data is combinational from io.addr and is zero outside
// B0-BA. The register layout follows the board's register map; the counter
// width, the level-sensitive overcurrent latch and reading unused ports as
// zero are this design's choices.
module bcf_regs
  import dcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  io_req_t     io,
  output logic [7:0]  rdata,
  // external inputs
  input  logic        pd_a_evt,        // particle detector A event
  input  logic        pd_b_evt,        // particle detector B event
  input  logic        tick_8hz,
  input  logic [15:0] adc_data,
  input  logic        adc_oc,          // ADC overcurrent, direct from analog circuit
  input  logic        uplink_par_err,  // uplink parity error pulse
  input  logic [8:0]  etr,             // transfer requests of the detector cards
  input  logic        adp_req,         // aspect data processor transfer request
  // controls
  output logic        rom_on,
  output logic        fast_rate_en,
  output logic        monitor_rate_en,
  output logic        uplink_en,
  output logic        adc_shutdown,    // ADCSHUTDOWN
  output logic        adc_run,
  output logic        adc_soc,
  output logic [7:0]  dac_data,
  output logic        dac_wr,
  output logic [7:0]  diag_q,
  output logic        diag_stb,
  output logic        wdt_touch,
  output logic [7:0]  status,
  output logic [8:0]  etr_masked,
  output logic        adp_req_masked
);

  logic       sel;
  logic [3:0] reg_a;
  assign sel   = (io.addr[7:4] == IO_BCF);
  assign reg_a = io.addr[3:0];

  logic       wr;
  assign wr = io.wr && sel;

  logic [3:0] enables;
  logic       uplink_err, oc_latched;
  logic [7:0] mask_lo;
  logic [1:0] mask_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_on     <= 1'b1;
      enables    <= '0;
      adc_run    <= 1'b0;
      dac_data   <= '0;
      diag_q     <= '0;
      mask_lo    <= '0;
      mask_hi    <= '0;
      uplink_err <= 1'b0;
      oc_latched <= 1'b0;
      adc_soc    <= 1'b0;
      dac_wr     <= 1'b0;
      diag_stb   <= 1'b0;
      wdt_touch  <= 1'b0;
    end else begin
      adc_soc   <= wr && reg_a == 4'h5;
      dac_wr    <= wr && reg_a == 4'h6;
      diag_stb  <= wr && reg_a == 4'h7;
      wdt_touch <= wr && reg_a == 4'h3;
      if (wr) begin
        case (reg_a)
          4'h0: rom_on   <= io.wdata[0];
          4'h1: enables  <= io.wdata[3:0];
          4'h4: adc_run  <= io.wdata[0];
          4'h6: dac_data <= io.wdata;
          4'h7: diag_q   <= io.wdata;
          4'h9: mask_lo  <= io.wdata;
          4'hA: mask_hi  <= io.wdata[1:0];
          default: ;
        endcase
      end
      // set has priority over clear, so an error is never lost
      if (uplink_par_err)                       uplink_err <= 1'b1;
      else if (wr && reg_a == 4'h8 && io.wdata[0]) uplink_err <= 1'b0;
      if (adc_oc)                               oc_latched <= 1'b1;
      else if (wr && reg_a == 4'h8 && io.wdata[1]) oc_latched <= 1'b0;
    end
  end

  assign fast_rate_en    = enables[0];
  assign monitor_rate_en = enables[1];
  assign uplink_en       = enables[2];
  assign adc_shutdown    = oc_latched && !enables[3];

  assign status = {rom_on, enables[2], enables[1], enables[0], enables[3],
                   adc_oc, oc_latched, uplink_err};

  assign etr_masked     = etr & ~{mask_hi[0], mask_lo};
  assign adp_req_masked = adp_req & ~mask_hi[1];

  logic [7:0] pd_a8, pd_b8;
  logic [15:0] pd_a_raw, pd_b_raw;

  rate_counter #(.WIDTH(16), .COMPRESS(1'b1)) u_pd_a (
    .clk, .rst_n, .inc(pd_a_evt), .latch(tick_8hz), .count_q(pd_a_raw), .out8(pd_a8)
  );
  rate_counter #(.WIDTH(16), .COMPRESS(1'b1)) u_pd_b (
    .clk, .rst_n, .inc(pd_b_evt), .latch(tick_8hz), .count_q(pd_b_raw), .out8(pd_b8)
  );

  always_comb begin
    rdata = '0;
    if (sel) begin
      case (reg_a)
        4'h0: rdata = pd_a8;
        4'h1: rdata = pd_b8;
        4'h4: rdata = adc_data[7:0];
        4'h5: rdata = adc_data[15:8];
        4'h8: rdata = status;
        default: rdata = '0;
      endcase
    end
  end

endmodule
