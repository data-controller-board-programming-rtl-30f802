// idpu_bridge: carries 8-bit processor I/O cycles onto the 16-bit IDPU
// backplane bus, and holds the bus extension register at port B2.
//
// Port nibbles 0-A (detector interface cards, aspect data processor, power
// controller) and F (broadcast) are backplane ports. A processor write to one
// of them becomes a backplane write of {ext_wr, processor byte}, where ext_wr
// is the byte last written to B2. A processor read returns the low byte of the
// backplane read data; in the read strobe clock the high byte is captured in
// ext_rd, which the processor then reads at B2. The two directions therefore
// use two separate bytes: a write to B2 never changes what B2 reads back.
//
// Timing: idpu.wr / idpu.rd are the processor strobes passed through in the
// same clock; rdata is combinational from the backplane read data. The 16-bit
// widening through an 8-bit extension register follows the register map;
// keeping the read and write bytes separate is this design's choice.
module idpu_bridge
  import dcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  io_req_t     io,
  output logic [7:0]  rdata,
  output idpu_req_t   idpu,
  input  logic [15:0] idpu_rdata
);

  logic       bp, ext_sel;
  logic [7:0] ext_wr, ext_rd;

  assign bp      = is_backplane(io.addr[7:4]);
  assign ext_sel = (io.addr == {IO_BCF, 4'h2});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_wr <= '0;
      ext_rd <= '0;
    end else begin
      if (io.wr && ext_sel) ext_wr <= io.wdata;
      if (io.rd && bp)      ext_rd <= idpu_rdata[15:8];
    end
  end

  assign idpu.addr  = io.addr;
  assign idpu.wdata = {ext_wr, io.wdata};
  assign idpu.wr    = io.wr && bp;
  assign idpu.rd    = io.rd && bp;

  always_comb begin
    if (bp)           rdata = idpu_rdata[7:0];
    else if (ext_sel) rdata = ext_rd;
    else              rdata = '0;
  end

endmodule
