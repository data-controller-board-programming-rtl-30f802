// dif_counters: the once-per-second counters of a detector interface card and
// the five 16-bit words (ports X4-X8) in which they are read.
//
// Each counter is a rate_counter latched by the one-second tick. Widths:
//   front: preamp reset 16, slow channel valid 17, slow channel over ULD 9,
//          fast channel valid 19, live time 20
//   rear:  preamp reset 18, slow channel valid 14, slow channel over ULD 8,
//          fast channel valid 19, live time 20
// The event counters count one-clock event pulses. The live-time counters count
// microsecond ticks (tick_1mhz) while the channel's live input is high, so a
// fully live second reads 1,000,000; they are read as their 8 MSBs, the other
// counters as compressed bytes (dcb_pkg::compress8).
//   word[0] (X4) = {front preamp reset, front slow valid}
//   word[1] (X5) = {front slow over ULD, front fast valid}
//   word[2] (X6) = {front live time MSBs, rear preamp reset}
//   word[3] (X7) = {rear slow valid, rear slow over ULD}
//   word[4] (X8) = {rear fast valid, rear live time MSBs}
// Widths, latch rate and word layout follow the card's register map; counting
// live time in microseconds is this design's reading of a 20-bit live-time
// counter latched once per second.
module dif_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sec_tick,
  input  logic        tick_1mhz,
  // front detector
  input  logic        f_preamp_rst,
  input  logic        f_slow_valid,
  input  logic        f_slow_uld,
  input  logic        f_fast_valid,
  input  logic        f_live,
  // rear detector
  input  logic        r_preamp_rst,
  input  logic        r_slow_valid,
  input  logic        r_slow_uld,
  input  logic        r_fast_valid,
  input  logic        r_live,
  output logic [15:0] word [5]
);

  logic [7:0] fpr, fsv, ful, ffv, flt, rpr, rsv, rul, rfv, rlt;

  rate_counter #(.WIDTH(16)) u_fpr (.clk, .rst_n, .inc(f_preamp_rst), .latch(sec_tick), .count_q(), .out8(fpr));
  rate_counter #(.WIDTH(17)) u_fsv (.clk, .rst_n, .inc(f_slow_valid), .latch(sec_tick), .count_q(), .out8(fsv));
  rate_counter #(.WIDTH(9))  u_ful (.clk, .rst_n, .inc(f_slow_uld),   .latch(sec_tick), .count_q(), .out8(ful));
  rate_counter #(.WIDTH(19)) u_ffv (.clk, .rst_n, .inc(f_fast_valid), .latch(sec_tick), .count_q(), .out8(ffv));
  rate_counter #(.WIDTH(20), .COMPRESS(1'b0)) u_flt (.clk, .rst_n, .inc(f_live && tick_1mhz), .latch(sec_tick), .count_q(), .out8(flt));
  rate_counter #(.WIDTH(18)) u_rpr (.clk, .rst_n, .inc(r_preamp_rst), .latch(sec_tick), .count_q(), .out8(rpr));
  rate_counter #(.WIDTH(14)) u_rsv (.clk, .rst_n, .inc(r_slow_valid), .latch(sec_tick), .count_q(), .out8(rsv));
  rate_counter #(.WIDTH(8))  u_rul (.clk, .rst_n, .inc(r_slow_uld),   .latch(sec_tick), .count_q(), .out8(rul));
  rate_counter #(.WIDTH(19)) u_rfv (.clk, .rst_n, .inc(r_fast_valid), .latch(sec_tick), .count_q(), .out8(rfv));
  rate_counter #(.WIDTH(20), .COMPRESS(1'b0)) u_rlt (.clk, .rst_n, .inc(r_live && tick_1mhz), .latch(sec_tick), .count_q(), .out8(rlt));

  assign word[0] = {fpr, fsv};
  assign word[1] = {ful, ffv};
  assign word[2] = {flt, rpr};
  assign word[3] = {rsv, rul};
  assign word[4] = {rfv, rlt};

endmodule
