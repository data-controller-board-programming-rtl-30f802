// dif_regs: register file of one detector interface card (DIF) on the 16-bit
// IDPU backplane bus.
//
// A card answers at ports X0-XF, X being its CARD_ID (0-8), and also takes
// broadcast writes at F0. Registers (reset value 0 throughout):
//   port  read                                   write
//   X0    event word bits 31:16                  general: bit0 spare output, bit1
//                                                AFE power, bit2 test pulser power,
//                                                bit3 enable overcurrent shutdown
//   X1    event word bits 15:0 (reading it       global: bit0 event request enable,
//         releases the event)                    bit1 pulser enable, bits3:2 test
//                                                mode, bits7:4 test mode energy
//   X2    fast rate word 0                       front detector enables (6 bits)
//   X3    fast rate word 1 (0 for cards 0-2)     front decimation parameters
//   X4-X8 once-per-second counter words          X4 rear enables, X5 rear
//         (from dif_counters)                    decimation, X7 bit0 clear the
//                                                latched shutdown, X8 pulser rate
//   XC    status (below)                         DAC programming word (16 bits)
//   F0    -                                      analog mux select: bits7:4 card
//                                                id, bit3 mux (1 AMUXENB1, 0
//                                                AMUXENB0), bits2:0 mux address
// Status word: {global[7:0], rear event enable, front event enable, test pulser
// power, shutdown input 1, shutdown input 0, overcurrent latched, overcurrent
// shutdown enable, AFE power}.
//
// The overcurrent latch is set while either AFE shutdown input is high and is
// cleared by the X7 pulse; with shutdown enabled (X0 bit 3) a latched
// overcurrent removes AFE power. The event request etr is raised while an event
// is waiting and event requests are enabled. The fast rate words are captured
// on each collect_tick. Writes take effect at the end of the bus write clock;
// dac_wr and clr_shutdown are one-clock pulses in that same clock. Read data is
// combinational and zero when the card is not addressed.
//
// The register layout follows the card's register map. The power-off action of
// the shutdown enable, the select-or-deselect response to F0 (a card whose id
// does not match turns both mux enables off), the event hand-off on the X1 read
// and the event request condition are this design's choices.
module dif_regs
  import dcb_pkg::*;
#(
  parameter logic [3:0] CARD_ID = 4'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  idpu_req_t   idpu,
  output logic [15:0] rdata,
  // data sources
  input  logic [31:0] event_word,
  input  logic        event_valid,
  output logic        event_pop,
  input  logic [31:0] fast_rate,
  input  logic        collect_tick,
  input  logic [15:0] cnt_word [5],   // X4..X8
  input  logic [1:0]  afe_shdn,
  // controls
  output logic        spare_out,
  output logic        afe_pwr,
  output logic        tp_pwr,
  output logic        oc_latched,
  output logic        etr,
  output logic        pulser_en,
  output logic [1:0]  test_mode,
  output logic [3:0]  test_energy,
  output logic [5:0]  front_en,
  output logic [7:0]  front_dec,
  output logic [5:0]  rear_en,
  output logic [7:0]  rear_dec,
  output logic [3:0]  pulser_sel,
  output logic        clr_shutdown,
  output logic        dac_wr,
  output logic [15:0] dac_word,
  output logic [1:0]  amux_enb,
  output logic [2:0]  amux_addr
);

  logic       me, bc;
  logic [3:0] reg_a;
  assign me    = (idpu.addr[7:4] == CARD_ID);
  assign bc    = (idpu.addr == {IO_BCAST, 4'h0});
  assign reg_a = idpu.addr[3:0];

  logic       wr;
  assign wr = idpu.wr && me;

  logic [3:0]  general;
  logic [7:0]  global_r;
  logic [31:0] fr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      general    <= '0;
      global_r   <= '0;
      front_en   <= '0;
      front_dec  <= '0;
      rear_en    <= '0;
      rear_dec   <= '0;
      pulser_sel <= '0;
      oc_latched <= 1'b0;
      amux_enb   <= '0;
      amux_addr  <= '0;
      fr_q       <= '0;
    end else begin
      if (wr) begin
        case (reg_a)
          4'h0: general    <= idpu.wdata[3:0];
          4'h1: global_r   <= idpu.wdata[7:0];
          4'h2: front_en   <= idpu.wdata[5:0];
          4'h3: front_dec  <= idpu.wdata[7:0];
          4'h4: rear_en    <= idpu.wdata[5:0];
          4'h5: rear_dec   <= idpu.wdata[7:0];
          4'h8: pulser_sel <= idpu.wdata[3:0];
          default: ;
        endcase
      end
      if (idpu.wr && bc) begin
        if (idpu.wdata[7:4] == CARD_ID) begin
          amux_enb  <= idpu.wdata[3] ? 2'b10 : 2'b01;
          amux_addr <= idpu.wdata[2:0];
        end else begin
          amux_enb  <= 2'b00;
        end
      end
      if (|afe_shdn)         oc_latched <= 1'b1;
      else if (clr_shutdown) oc_latched <= 1'b0;
      if (collect_tick) fr_q <= fast_rate;
    end
  end

  assign clr_shutdown = wr && reg_a == 4'h7 && idpu.wdata[0];
  assign dac_wr       = wr && reg_a == 4'hC;
  assign dac_word     = idpu.wdata;
  assign event_pop    = idpu.rd && me && reg_a == 4'h1 && event_valid;

  assign spare_out   = general[0];
  assign afe_pwr     = general[1] && !(general[3] && oc_latched);
  assign tp_pwr      = general[2];
  assign etr         = event_valid && global_r[0];
  assign pulser_en   = global_r[1];
  assign test_mode   = global_r[3:2];
  assign test_energy = global_r[7:4];

  logic [15:0] status;
  assign status = {global_r, rear_en[0], front_en[0], general[2], afe_shdn[1],
                   afe_shdn[0], oc_latched, general[3], afe_pwr};

  always_comb begin
    rdata = '0;
    if (me) begin
      case (reg_a)
        4'h0: rdata = event_word[31:16];
        4'h1: rdata = event_word[15:0];
        4'h2: rdata = fr_q[31:16];
        4'h3: rdata = (CARD_ID < 4'd3) ? 16'h0000 : fr_q[15:0];
        4'h4: rdata = cnt_word[0];
        4'h5: rdata = cnt_word[1];
        4'h6: rdata = cnt_word[2];
        4'h7: rdata = cnt_word[3];
        4'h8: rdata = cnt_word[4];
        4'hC: rdata = status;
        default: rdata = '0;
      endcase
    end
  end

endmodule
