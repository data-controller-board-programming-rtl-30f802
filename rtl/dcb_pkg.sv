// dcb_pkg: types and constants shared by the data controller board logic.
//
// The processor side of the board is an 8085 whose 256-byte I/O space is split
// by its upper address nibble between subsystems (0-8 detector interface cards,
// 9 aspect data processor, A power controller, B bus controller registers,
// C packet formatter registers, D DMA controller, E packet formatter memory test
// mode, F backplane broadcast). Inside the design an I/O access is carried as
// an io_req_t: the latched port address, the write byte and one-cycle write and
// read strobes. The 16-bit backplane bus (IDPU bus) uses idpu_req_t.
//
// compress8() is the 8-bit quasi-logarithmic count compression used for the
// rate counters. The compression law is this design's own choice: values below
// 16 are sent unchanged; above that the byte holds a 4-bit exponent E (1..15)
// and the 4 bits M below the leading one, so the count is about (16+M) << (E-1).
// Counts of 2^19 and above saturate at 8'hFF.
package dcb_pkg;

  // One I/O access from the processor, as seen by a register block.
  typedef struct packed {
    logic [7:0] addr;   // latched port address
    logic [7:0] wdata;  // processor write byte
    logic       wr;     // one-cycle write strobe
    logic       rd;     // one-cycle read strobe (for read side effects)
  } io_req_t;

  // One access on the 16-bit IDPU backplane bus.
  typedef struct packed {
    logic [7:0]  addr;  // [7:4] card/subsystem, [3:0] register
    logic [15:0] wdata; // {bus extension byte, processor byte}
    logic        wr;    // one-cycle write strobe
    logic        rd;    // one-cycle read strobe
  } idpu_req_t;

  // I/O space decode, upper address nibble.
  localparam logic [3:0] IO_ADP      = 4'h9;
  localparam logic [3:0] IO_PWR      = 4'hA;
  localparam logic [3:0] IO_BCF      = 4'hB;
  localparam logic [3:0] IO_PFF      = 4'hC;
  localparam logic [3:0] IO_DMA      = 4'hD;
  localparam logic [3:0] IO_PFTEST   = 4'hE;
  localparam logic [3:0] IO_BCAST    = 4'hF;

  // Memory map: the 8K ROM occupies 0000-1FFF when it is powered.
  localparam logic [15:0] ROM_LAST = 16'h1FFF;

  // True for the I/O nibbles that are carried on the IDPU backplane.
  function automatic logic is_backplane(input logic [3:0] nib);
    return (nib <= IO_PWR) || (nib == IO_BCAST);
  endfunction

  function automatic logic [7:0] compress8(input logic [23:0] v);
    logic [4:0]  p;
    logic [23:0] sh;
    logic [3:0]  e;
    p = '0;
    for (int i = 0; i < 24; i++)
      if (v[i]) p = 5'(i);
    if (v < 24'd16)      return v[7:0];
    else if (p >= 5'd19) return 8'hFF;
    else begin
      e  = 4'(p - 5'd3);
      sh = v >> (p - 5'd4);
      return {e, sh[3:0]};
    end
  endfunction

endpackage
