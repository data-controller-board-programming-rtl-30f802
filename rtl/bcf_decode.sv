// bcf_decode: 8085 address latch and memory / I/O decode of the bus controller.
//
// The low address byte, multiplexed on AD[7:0], is captured while ALE is high
// and held for the rest of the bus cycle; together with A[15:8] it forms the
// latched address la. Memory cycles (iom = 0) are decoded into ROM and RAM
// selects following the board's memory map: the 8K ROM sits once at 0000-1FFF
// and the 32K RAM is aliased twice in the 64K space (RAM address = la[14:0]).
// While the ROM is powered (rom_on, from the power switch register) reads of
// 0000-1FFF go to ROM and all writes go to RAM; with the ROM off every access
// goes to RAM.
//
// I/O cycles (iom = 1) produce an io_req_t: the port address la[7:0], the data
// byte on AD[7:0], and one-clock wr and rd strobes in the first clock in
// which WR_n or RD_n is low (registers take the write at the end of it). Register blocks decode la[7:4] themselves. The DMA
// controller (port nibble D) is an external part and gets its own chip select.
// io_rd_cycle is high for the whole of an I/O read whose data this board's
// logic supplies (every nibble except D), for steering the AD bus.
//
// Timing: all bus inputs are sampled on clk, which is assumed to be fast
// enough that ALE, RD_n and WR_n each last at least one clock. The strobes of
// the 8085 are treated as synchronous to clk; this synchronous sampling is this
// design's choice. Two assertions at the end of the module check the bus
// rules in simulation: RD_n and WR_n never low together, and never both memory
// chip selects active.
module bcf_decode
  import dcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // 8085 bus
  input  logic        ale,
  input  logic [7:0]  ad_in,
  input  logic [7:0]  a_hi,
  input  logic        iom,      // 1 = I/O cycle, 0 = memory cycle
  input  logic        rd_n,
  input  logic        wr_n,
  // from the power switch register
  input  logic        rom_on,
  // latched address and memory selects
  output logic [15:0] la,
  output logic        rom_cs_n,
  output logic        ram_cs_n,
  output logic        rom_pwr,
  // DMA controller chip select (I/O nibble D)
  output logic        dma_cs_n,
  // I/O access for the register blocks
  output io_req_t     io,
  output logic        io_rd_cycle
);

  logic [7:0] alat;
  logic       rd_n_q, wr_n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alat   <= '0;
      rd_n_q <= 1'b1;
      wr_n_q <= 1'b1;
    end else begin
      if (ale) alat <= ad_in;
      rd_n_q <= rd_n;
      wr_n_q <= wr_n;
    end
  end

  assign la = {a_hi, alat};

  logic mem_rd, mem_wr, rom_hit;
  assign mem_rd  = !iom && !rd_n;
  assign mem_wr  = !iom && !wr_n;
  assign rom_hit = rom_on && (la <= ROM_LAST);

  assign rom_cs_n = !(mem_rd && rom_hit);
  assign ram_cs_n = !(mem_wr || (mem_rd && !rom_hit));
  assign rom_pwr  = rom_on;

  logic io_cyc;
  assign io_cyc   = iom && (!rd_n || !wr_n);
  assign dma_cs_n = !(io_cyc && alat[7:4] == IO_DMA);

  assign io.addr  = alat;
  assign io.wdata = ad_in;
  assign io.wr    = iom && !wr_n && wr_n_q;
  assign io.rd    = iom && !rd_n && rd_n_q;

  assign io_rd_cycle = iom && !rd_n && (alat[7:4] != IO_DMA);

  // Bus rules checked in simulation: the 8085 never has RD_n and WR_n low
  // together, and the ROM and RAM are never selected at the same time.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) rd_n || wr_n)
    else $error("bcf_decode: RD_n and WR_n low together");
  a_one_memory: assert property (@(posedge clk) disable iff (!rst_n) rom_cs_n || ram_cs_n)
    else $error("bcf_decode: ROM and RAM selected together");

endmodule
