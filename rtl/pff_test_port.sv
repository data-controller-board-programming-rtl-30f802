// pff_test_port: processor access to the packet formatter memory in memory
// test mode (I/O ports E8-ED).
//
//   port   read                                  write
//   E8-EB  low byte of the memory word at the    E8 test data low byte
//          test address; the high byte is        E9 test data high byte
//          captured in the same read             EA test address bits 7:0
//                                                EB test address bits 13:8 (data 5:0)
//   EC-EF  the captured high byte                ED write the test data word to
//                                                   memory at the test address
// The memory address is {bank, test address[13:0]}, bank being bit 1 of the
// packet formatter control register. The port reads the memory continuously at
// that address (mem_addr), so the word is ready one clock after the address is
// written. Memory data is returned and the write strobe issued only while test
// mode (control bit 0) is set; the data and address registers can always be
// written. mem_we is a one-clock strobe, registered one clock after io.wr.
//
// The register layout follows the board's register map, which lists the
// captured high byte both at "EC-EF" and at ED; this design returns it for
// every read of EC-EF. Reading the memory as zero outside test mode is this
// design's choice.
module pff_test_port
  import dcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  io_req_t     io,
  output logic [7:0]  rdata,
  input  logic        test_mode,
  input  logic        bank,
  output logic [14:0] mem_addr,
  output logic [15:0] mem_wdata,
  output logic        mem_we,
  input  logic [15:0] mem_rdata
);

  logic       sel, wr;
  logic [3:0] reg_a;
  assign sel   = (io.addr[7:4] == IO_PFTEST);
  assign reg_a = io.addr[3:0];
  assign wr    = io.wr && sel;

  logic [7:0]  dlo, dhi, alo, hi_q;
  logic [5:0]  ahi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dlo    <= '0;
      dhi    <= '0;
      alo    <= '0;
      ahi    <= '0;
      hi_q   <= '0;
      mem_we <= 1'b0;
    end else begin
      mem_we <= wr && reg_a == 4'hD && test_mode;
      if (wr) begin
        case (reg_a)
          4'h8: dlo <= io.wdata;
          4'h9: dhi <= io.wdata;
          4'hA: alo <= io.wdata;
          4'hB: ahi <= io.wdata[5:0];
          default: ;
        endcase
      end
      if (io.rd && sel && reg_a[3:2] == 2'b10 && test_mode) hi_q <= mem_rdata[15:8];
    end
  end

  assign mem_addr  = {bank, ahi, alo};
  assign mem_wdata = {dhi, dlo};

  always_comb begin
    rdata = '0;
    if (sel && test_mode) begin
      if (reg_a[3:2] == 2'b10)      rdata = mem_rdata[7:0];
      else if (reg_a[3:2] == 2'b11) rdata = hi_q;
    end
  end

endmodule
