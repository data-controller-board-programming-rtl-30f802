// dif_card: one detector interface card as seen from the IDPU backplane.
//
// It joins the card's register file (dif_regs), its once-per-second counters
// (dif_counters), its test pulser and event strobe selection (dif_pulser) and
// its DAC programming sequencer (dif_dac_seq). The card answers at backplane
// ports X0-XF with X = CARD_ID and to broadcast writes at F0; rdata is zero
// when it is not addressed, so the cards' read data can be ORed on the bus.
// The event data and fast rate words come from the card's event and rate
// logic, which is outside this model; the counters count pulses from the
// analog front end. sec_tick latches the counters and collect_tick the fast
// rate words; tick_1mhz is the microsecond tick.
module dif_card
  import dcb_pkg::*;
#(
  parameter logic [3:0]  CARD_ID       = 4'd0,
  parameter int unsigned US_PER_SEC    = 1_000_000,
  parameter int unsigned STROBE_CYCLES = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  idpu_req_t   idpu,
  output logic [15:0] rdata,
  input  logic        tick_1mhz,
  input  logic        sec_tick,
  input  logic        collect_tick,
  // event and rate data from the card's own logic
  input  logic [31:0] event_word,
  input  logic        event_valid,
  output logic        event_pop,
  input  logic [31:0] fast_rate,
  input  logic        det_strobe,
  // front end pulses and levels: {rear, front}
  input  logic [1:0]  preamp_rst,
  input  logic [1:0]  slow_valid,
  input  logic [1:0]  slow_uld,
  input  logic [1:0]  fast_valid,
  input  logic [1:0]  live,
  input  logic [1:0]  afe_shdn,
  // outputs
  output logic        etr,
  output logic        afe_pwr,
  output logic        tp_pwr,
  output logic        spare_out,
  output logic        oc_latched,
  output logic        pulse,
  output logic        event_strobe,
  output logic [3:0]  test_energy,
  output logic [5:0]  front_en,
  output logic [7:0]  front_dec,
  output logic [5:0]  rear_en,
  output logic [7:0]  rear_dec,
  output logic [11:0] dac_data,
  output logic        sela,
  output logic        ds0_n,
  output logic        ds1_n,
  output logic        pdac_wr_n,
  output logic [1:0]  amux_enb,
  output logic [2:0]  amux_addr
);

  logic [15:0] cnt_word [5];
  logic        pulser_en, clr_shutdown, dac_wr, dac_busy;
  logic [1:0]  test_mode;
  logic [3:0]  pulser_sel;
  logic [15:0] dac_word;

  dif_regs #(.CARD_ID(CARD_ID)) u_regs (
    .clk, .rst_n, .idpu, .rdata,
    .event_word, .event_valid, .event_pop,
    .fast_rate, .collect_tick, .cnt_word, .afe_shdn,
    .spare_out, .afe_pwr, .tp_pwr, .oc_latched, .etr,
    .pulser_en, .test_mode, .test_energy,
    .front_en, .front_dec, .rear_en, .rear_dec,
    .pulser_sel, .clr_shutdown, .dac_wr, .dac_word,
    .amux_enb, .amux_addr
  );

  dif_counters u_cnt (
    .clk, .rst_n, .sec_tick, .tick_1mhz,
    .f_preamp_rst (preamp_rst[0]), .f_slow_valid (slow_valid[0]),
    .f_slow_uld   (slow_uld[0]),   .f_fast_valid (fast_valid[0]), .f_live (live[0]),
    .r_preamp_rst (preamp_rst[1]), .r_slow_valid (slow_valid[1]),
    .r_slow_uld   (slow_uld[1]),   .r_fast_valid (fast_valid[1]), .r_live (live[1]),
    .word (cnt_word)
  );

  dif_pulser #(.US_PER_SEC(US_PER_SEC)) u_pulser (
    .clk, .rst_n, .tick_1mhz, .pulser_en, .sel(pulser_sel), .test_mode,
    .det_strobe, .pulse, .event_strobe
  );

  dif_dac_seq #(.STROBE_CYCLES(STROBE_CYCLES)) u_dac (
    .clk, .rst_n, .wr(dac_wr), .word(dac_word),
    .dac_data, .sela, .ds0_n, .ds1_n, .pdac_wr_n, .busy(dac_busy)
  );

endmodule
