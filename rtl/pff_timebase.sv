// pff_timebase: time keeping of the packet formatter.
//
// Two time sources are possible. In spacecraft mode (int_mode = 0) the 1 MHz
// and 1 Hz clocks come from the spacecraft inputs sc_1mhz and sc_1hz; each is
// synchronised with two flip-flops and its rising edge becomes a one-clock
// tick. In internal mode (int_mode = 1, control register bit 7) a prescaler of
// CLK_PER_US board clocks makes the microsecond tick and the one-second tick is
// issued when the subseconds counter reaches US_PER_SEC - 1.
//
//   subsec   20-bit microsecond count within the second, cleared by each
//            one-second tick (the processor reads bits 19:4)
//   seconds  32-bit seconds count, +1 per one-second tick; any of its bytes can
//            be written (sec_we[i] writes byte i, which wins over the increment)
//   timer_tick  one clock every (US_PER_SEC/8) >> timer_sel microseconds, i.e.
//            8 Hz * 2^timer_sel (8 ... 1024 Hz); with integer periods the high
//            rates are within 0.05 % of nominal
//   tick_8hz one clock every US_PER_SEC/8 microseconds, restarted by each
//            one-second tick, for the 8 Hz particle detector counters
//
// The source selection, the rates and the counter widths follow the register
// map; the derivation of the timer and 8 Hz ticks from the microsecond tick
// and the default 10 MHz board clock (CLK_PER_US = 10) are this design's
// choices. Tick outputs are one clock wide.
module pff_timebase #(
  parameter int unsigned CLK_PER_US = 10,
  parameter int unsigned US_PER_SEC = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        int_mode,
  input  logic        sc_1mhz,
  input  logic        sc_1hz,
  input  logic [2:0]  timer_sel,
  input  logic [3:0]  sec_we,
  input  logic [7:0]  sec_wdata,
  output logic        tick_1mhz,
  output logic        tick_1hz,
  output logic        tick_8hz,
  output logic        timer_tick,
  output logic [19:0] subsec,
  output logic [31:0] seconds
);

  localparam int unsigned PW = (CLK_PER_US > 1) ? $clog2(CLK_PER_US) : 1;
  localparam int unsigned P8 = US_PER_SEC / 8;
  localparam int unsigned TW = $clog2(P8 + 1);

  // spacecraft clock synchronisers
  logic [2:0] s1m, s1h;
  logic       ext_us, ext_sec;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1m <= '0;
      s1h <= '0;
    end else begin
      s1m <= {s1m[1:0], sc_1mhz};
      s1h <= {s1h[1:0], sc_1hz};
    end
  end
  assign ext_us  = s1m[1] && !s1m[2];
  assign ext_sec = s1h[1] && !s1h[2];

  // internal prescaler
  logic [PW-1:0] pre;
  logic          int_us, int_sec;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre <= '0;
    else if (pre == PW'(CLK_PER_US - 1)) pre <= '0;
    else pre <= pre + 1'b1;
  end
  assign int_us  = (pre == PW'(CLK_PER_US - 1));
  assign int_sec = int_us && (subsec == 20'(US_PER_SEC - 1));

  assign tick_1mhz = int_mode ? int_us  : ext_us;
  assign tick_1hz  = int_mode ? int_sec : ext_sec;

  // subseconds and seconds
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      subsec  <= '0;
      seconds <= '0;
    end else begin
      if (tick_1hz)                        subsec <= '0;
      else if (tick_1mhz && subsec != '1)  subsec <= subsec + 1'b1;
      if (tick_1hz) seconds <= seconds + 1'b1;
      for (int i = 0; i < 4; i++)
        if (sec_we[i]) seconds[8*i +: 8] <= sec_wdata;
    end
  end

  // programmable timer interrupt and 8 Hz collection tick
  logic [TW-1:0] tmr, c8, tmr_last;
  assign tmr_last = TW'((P8 >> timer_sel) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr <= '0;
      c8  <= '0;
    end else begin
      if (tick_1mhz) tmr <= (tmr >= tmr_last) ? '0 : tmr + 1'b1;
      if (tick_1hz)       c8 <= '0;
      else if (tick_1mhz) c8 <= (c8 == TW'(P8 - 1)) ? '0 : c8 + 1'b1;
    end
  end

  assign timer_tick = tick_1mhz && (tmr >= tmr_last);
  assign tick_8hz   = tick_1hz || (tick_1mhz && c8 == TW'(P8 - 1));

endmodule
