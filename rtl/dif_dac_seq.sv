// dif_dac_seq: DAC programming sequencer of a detector interface card.
//
// A write to port XC (wr, one clock, with the 16-bit word) latches bits 11:0 as
// the DAC data word and bit 14 as SELA; both hold until the next write. Bits
// 12, 13 and 15 choose which active-low strobes are then issued: data strobe 0
// (threshold DAC), data strobe 1 and the pulser DAC write strobe. After one
// clock of data set-up the chosen strobes go low together for STROBE_CYCLES
// clocks (300 ns: 3 clocks of the assumed 10 MHz board clock) and return high.
// A write that arrives while a sequence runs is ignored. busy is high from the
// clock after the write until the strobes return high.
//
// The data/SELA latching, the strobe selection bits, the active-low polarity
// and the 300 ns width follow the card's register map; the set-up clock and the
// busy rule are this design's choices.
module dif_dac_seq #(
  parameter int unsigned STROBE_CYCLES = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [15:0] word,
  output logic [11:0] dac_data,
  output logic        sela,
  output logic        ds0_n,
  output logic        ds1_n,
  output logic        pdac_wr_n,
  output logic        busy
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STROBE} state_t;

  localparam int unsigned CW = $clog2(STROBE_CYCLES + 1);

  state_t        state;
  logic [2:0]    which;   // {pulser DAC, strobe 1, strobe 0}
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      which    <= '0;
      left     <= '0;
      dac_data <= '0;
      sela     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (wr) begin
          dac_data <= word[11:0];
          sela     <= word[14];
          which    <= {word[15], word[13], word[12]};
          state    <= S_SETUP;
        end
        S_SETUP: begin
          left  <= CW'(STROBE_CYCLES);
          state <= S_STROBE;
        end
        S_STROBE: begin
          if (left == CW'(1)) state <= S_IDLE;
          left <= left - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign ds0_n     = !(state == S_STROBE && which[0]);
  assign ds1_n     = !(state == S_STROBE && which[1]);
  assign pdac_wr_n = !(state == S_STROBE && which[2]);

endmodule
