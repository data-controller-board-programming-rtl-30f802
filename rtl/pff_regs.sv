// pff_regs: registers of the packet formatter at I/O ports C0-CF, with its
// time base (pff_timebase) inside.
//
//   port   read                              write
//   C0     control register readback         control: bit0 memory test mode,
//                                            bit1 memory bank (address bit 14),
//                                            bit2 telemetry inhibit, bits6:4 timer
//                                            rate (8 Hz << n), bit7 internal timer
//   C1     status: bit0 timer, bit1 one      pulses: bit0/1/2 clear the timer,
//          second, bit2 DMA end-of-process   one second and DMA EOP interrupts,
//          interrupts (latched), bit6        bit7 clear all packet collection
//          RRECRDYF input, bit7 SAFE input   error flags
//   C2     packet collection error flags     -
//   C3     0 (spare)                         -
//   C4-C7  seconds bytes 0..3                seconds bytes 0..3
//   C8-CD  instrument header bytes 1..6      instrument header bytes 1..6
//   CE     subseconds bits 11:4              -
//   CF     subseconds bits 19:12             -
// Error flag bits: 0 event memory full, 1 event long packet, 2 fast rate memory
// full, 3 fast rate long packet, 4 monitor rate memory full, 5 monitor rate long
// packet, 6 ADP short packet, 7 ADP long packet; each is set by a one-clock
// pulse on err_set from the packet collection logic.
//
// All registers clear at reset. Set events win over a clear in the same clock.
// The latched interrupt flags are brought out as irq[2:0]; the header bytes as
// header[0..5] for the telemetry formatter. Writes take effect at the end of
// the io.wr clock; read data is combinational. The register layout follows the
// board's register map; set-over-clear priority and zero for unused bits are
// this design's choices.
module pff_regs
  import dcb_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 10,
  parameter int unsigned US_PER_SEC = 1_000_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  io_req_t         io,
  output logic [7:0]      rdata,
  // inputs
  input  logic            sc_1mhz,
  input  logic            sc_1hz,
  input  logic            dma_eop,
  input  logic            rrecrdyf,
  input  logic            safe,
  input  logic [7:0]      err_set,
  // control outputs
  output logic            test_mode,
  output logic            mem_bank,
  output logic            tlm_inhibit,
  output logic [2:0]      irq,
  output logic [7:0]      header [6],
  // time base outputs
  output logic            tick_1mhz,
  output logic            tick_1hz,
  output logic            tick_8hz,
  output logic [31:0]     seconds,
  output logic [19:0]     subsec
);

  logic       sel, wr;
  logic [3:0] reg_a;
  assign sel   = (io.addr[7:4] == IO_PFF);
  assign reg_a = io.addr[3:0];
  assign wr    = io.wr && sel;

  logic [7:0] ctrl;
  logic [2:0] flags;
  logic [7:0] errs;
  logic       timer_tick;

  assign test_mode   = ctrl[0];
  assign mem_bank    = ctrl[1];
  assign tlm_inhibit = ctrl[2];
  assign irq         = flags;

  logic [3:0] sec_we;
  always_comb begin
    sec_we = '0;
    if (wr && reg_a >= 4'h4 && reg_a <= 4'h7) sec_we[reg_a[1:0]] = 1'b1;
  end

  pff_timebase #(.CLK_PER_US(CLK_PER_US), .US_PER_SEC(US_PER_SEC)) u_tb (
    .clk, .rst_n,
    .int_mode  (ctrl[7]),
    .sc_1mhz, .sc_1hz,
    .timer_sel (ctrl[6:4]),
    .sec_we,
    .sec_wdata (io.wdata),
    .tick_1mhz, .tick_1hz, .tick_8hz,
    .timer_tick,
    .subsec, .seconds
  );

  logic [2:0] flag_set, flag_clr;
  assign flag_set = {dma_eop, tick_1hz, timer_tick};
  assign flag_clr = (wr && reg_a == 4'h1) ? io.wdata[2:0] : 3'b000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl  <= '0;
      flags <= '0;
      errs  <= '0;
      for (int i = 0; i < 6; i++) header[i] <= '0;
    end else begin
      if (wr && reg_a == 4'h0) ctrl <= io.wdata;
      if (wr && reg_a >= 4'h8 && reg_a <= 4'hD) header[3'(reg_a - 4'h8)] <= io.wdata;
      flags <= (flags & ~flag_clr) | flag_set;
      if (wr && reg_a == 4'h1 && io.wdata[7]) errs <= err_set;
      else                                    errs <= errs | err_set;
    end
  end

  always_comb begin
    rdata = '0;
    if (sel) begin
      case (reg_a)
        4'h0: rdata = ctrl;
        4'h1: rdata = {safe, rrecrdyf, 3'b000, flags};
        4'h2: rdata = errs;
        4'h4: rdata = seconds[7:0];
        4'h5: rdata = seconds[15:8];
        4'h6: rdata = seconds[23:16];
        4'h7: rdata = seconds[31:24];
        4'h8, 4'h9, 4'hA, 4'hB, 4'hC, 4'hD: rdata = header[3'(reg_a - 4'h8)];
        4'hE: rdata = subsec[11:4];
        4'hF: rdata = subsec[19:12];
        default: rdata = '0;
      endcase
    end
  end

endmodule
