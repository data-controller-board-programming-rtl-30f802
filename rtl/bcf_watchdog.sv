// bcf_watchdog: processor watchdog timer of the bus controller.
//
// Any write to port B3 produces a one-clock touch, which restarts the timer.
// If TIMEOUT_CYCLES clocks pass without a touch, wdt_rst is driven high for
// RST_CYCLES clocks and the timer then starts over, so a processor that stays
// silent is reset again and again. expired_cnt counts the timeouts (saturating).
//
// Only the touch at B3 is specified for this timer. The timeout, the reset
// pulse length and the restart behaviour are this design's choices: the
// default timeout is one second at the assumed 10 MHz board clock.
module bcf_watchdog #(
  parameter int unsigned TIMEOUT_CYCLES = 10_000_000,
  parameter int unsigned RST_CYCLES     = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       touch,
  output logic       wdt_rst,
  output logic [7:0] expired_cnt
);

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);
  localparam int unsigned RW = $clog2(RST_CYCLES + 1);

  logic [TW-1:0] timer;
  logic [RW-1:0] rst_left;

  assign wdt_rst = (rst_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer       <= '0;
      rst_left    <= '0;
      expired_cnt <= '0;
    end else if (touch) begin
      timer    <= '0;
      rst_left <= '0;
    end else if (rst_left != '0) begin
      rst_left <= rst_left - 1'b1;
    end else if (timer == TW'(TIMEOUT_CYCLES - 1)) begin
      timer    <= '0;
      rst_left <= RW'(RST_CYCLES);
      if (expired_cnt != 8'hFF) expired_cnt <= expired_cnt + 1'b1;
    end else begin
      timer <= timer + 1'b1;
    end
  end

endmodule
