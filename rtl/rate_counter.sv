// rate_counter: saturating event counter, latched on a collection tick and
// read out as one byte.
//
// The counter adds one in every clock in which inc is high and stops at its
// all-ones value. On latch (a one-clock tick: 8 Hz for the particle detector
// counters, 1 Hz for the detector interface card counters) the count is copied
// to count_q and the counter restarts; an event in the latch clock is counted
// in the new interval. out8 is the byte the processor reads:
//   COMPRESS = 1: dcb_pkg::compress8(count_q), the quasi-logarithmic code
//   COMPRESS = 0: the 8 most significant bits of count_q (used for the
//                 live-time counters, whose readout is their 8 MSBs)
// A counter of 8 bits or fewer is read out unchanged.
//
// The widths, the latch rate and "compressed to 8 bits" follow the register
// descriptions; the compression law, saturation and restart on latch are this
// design's own choices.
module rate_counter
  import dcb_pkg::*;
#(
  parameter int unsigned WIDTH    = 16,
  parameter bit          COMPRESS = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  input  logic             latch,
  output logic [WIDTH-1:0] count_q,
  output logic [7:0]       out8
);

  localparam logic [WIDTH-1:0] MAXV = '1;

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      count_q <= '0;
    end else if (latch) begin
      count_q <= cnt;
      cnt     <= WIDTH'(inc);
    end else if (inc && cnt != MAXV) begin
      cnt <= cnt + 1'b1;
    end
  end

  generate
    if (WIDTH <= 8) begin : g_narrow
      assign out8 = 8'(count_q);
    end else if (COMPRESS) begin : g_comp
      assign out8 = compress8(24'(count_q));
    end else begin : g_msb
      assign out8 = count_q[WIDTH-1 -: 8];
    end
  endgenerate

endmodule
