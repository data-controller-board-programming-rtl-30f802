// dif_pulser: test pulser and test-mode event strobe of a detector interface
// card.
//
// The pulser emits a one-clock pulse every US_PER_SEC >> sel microsecond ticks
// while enabled (global register bit 1), sel being the pulser frequency field
// (X8 bits 3:0). The eleven rates 0..10 give 1, 2, 4, ... 1024 Hz (the top
// rate is 1000000 >> 10 = 976 us, 1024.6 Hz); values 11-15 act as 10. The
// pulser restarts when it is disabled.
//
// The event strobe follows the test mode field (global register bits 3:2):
//   00 the detector's own event strobe (normal operation)
//   01 every microsecond tick (1 MHz)
//   10 every 16th microsecond tick (62.5 kHz)
//   11 the pulser output
// All strobes are one clock wide. The number of rates, their range and the
// test mode encoding follow the card's register map; the power-of-two spacing
// of the rates is this design's reading of "11 frequencies from 1 Hz to 1 kHz".
module dif_pulser #(
  parameter int unsigned US_PER_SEC = 1_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_1mhz,
  input  logic       pulser_en,
  input  logic [3:0] sel,
  input  logic [1:0] test_mode,
  input  logic       det_strobe,
  output logic       pulse,
  output logic       event_strobe
);

  localparam int unsigned CW = $clog2(US_PER_SEC + 1);

  logic [3:0]    s;
  logic [CW-1:0] cnt, last;
  logic [3:0]    div16;

  assign s    = (sel > 4'd10) ? 4'd10 : sel;
  assign last = CW'((US_PER_SEC >> s) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      div16 <= '0;
    end else begin
      if (!pulser_en)     cnt <= '0;
      else if (tick_1mhz) cnt <= (cnt >= last) ? '0 : cnt + 1'b1;
      if (tick_1mhz) div16 <= div16 + 1'b1;
    end
  end

  assign pulse = pulser_en && tick_1mhz && (cnt >= last);

  always_comb begin
    unique case (test_mode)
      2'b00: event_strobe = det_strobe;
      2'b01: event_strobe = tick_1mhz;
      2'b10: event_strobe = tick_1mhz && div16 == 4'hF;
      2'b11: event_strobe = pulse;
    endcase
  end

endmodule
