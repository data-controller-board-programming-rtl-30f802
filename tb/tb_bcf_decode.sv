// tb_bcf_decode: self-checking test of the 8085 address latch and decode.
// Runs 8085-style bus cycles (ALE with the low address on AD, then RD_n or
// WR_n with other data on AD) and checks: the latched address, ROM/RAM chip
// selects for reads and writes with the ROM powered and unpowered across the
// whole 64K space, the DMA chip select, and that each I/O cycle gives exactly
// one read or write strobe carrying the port address and write byte.
module tb_bcf_decode;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ale = 0, iom = 0, rd_n = 1, wr_n = 1, rom_on = 1;
  logic [7:0] ad_in = 0, a_hi = 0;
  logic [15:0] la;
  logic rom_cs_n, ram_cs_n, rom_pwr, dma_cs_n, io_rd_cycle;
  io_req_t io;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [7:0] last_wr_addr, last_wr_data, last_rd_addr;

  bcf_decode dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (io.wr) begin n_wr++; last_wr_addr = io.addr; last_wr_data = io.wdata; end
    if (io.rd) begin n_rd++; last_rd_addr = io.addr; end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one bus cycle; returns chip selects seen in the middle of the strobe
  task automatic cycle(input bit io_c, input bit is_wr, input logic [15:0] a,
                       input logic [7:0] d, output bit rom_sel, output bit ram_sel,
                       output bit dma_sel);
    @(negedge clk);
    ale = 1; iom = io_c; ad_in = a[7:0]; a_hi = a[15:8];
    @(negedge clk);
    ale = 0; ad_in = is_wr ? d : 8'($urandom);
    if (is_wr) wr_n = 0; else rd_n = 0;
    @(negedge clk);
    check("la", la, a);
    rom_sel = !rom_cs_n; ram_sel = !ram_cs_n; dma_sel = !dma_cs_n;
    check("rd_cycle", io_rd_cycle, io_c && !is_wr && a[7:4] != 4'hD);
    @(negedge clk);
    wr_n = 1; rd_n = 1;
    @(negedge clk);
    check("idle rom", rom_cs_n, 1);
    check("idle ram", ram_cs_n, 1);
  endtask

  initial begin
    bit r, m, dm;
    int wr0, rd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // memory map with the ROM powered and unpowered
    for (int on = 1; on >= 0; on--) begin
      rom_on = on[0];
      for (int k = 0; k < 40; k++) begin
        logic [15:0] a;
        a = (k < 8) ? 16'(k * 16'h2000 + (k % 2) * 16'h1FFF) : 16'($urandom);
        cycle(0, 0, a, 0, r, m, dm);
        check("rom rd", r, on && a < 16'h2000);
        check("ram rd", m, !(on && a < 16'h2000));
        check("dma mem", dm, 0);
        cycle(0, 1, a, 8'h5A, r, m, dm);
        check("rom wr", r, 0);
        check("ram wr", m, 1);
      end
    end
    check("rom_pwr", rom_pwr, 0);
    // I/O cycles: strobe count, address, data, DMA select
    for (int k = 0; k < 60; k++) begin
      logic [7:0] p, dd;
      p = (k < 16) ? {4'(k), 4'(k)} : 8'($urandom);
      dd = 8'($urandom);
      wr0 = n_wr; rd0 = n_rd;
      cycle(1, 1, {p, p}, dd, r, m, dm);
      check("one wr strobe", n_wr - wr0, 1);
      check("no rd strobe", n_rd - rd0, 0);
      check("wr addr", last_wr_addr, p);
      check("wr data", last_wr_data, dd);
      check("io no rom", r, 0);
      check("io no ram", m, 0);
      check("dma cs", dm, p[7:4] == 4'hD);
      wr0 = n_wr; rd0 = n_rd;
      cycle(1, 0, {p, p}, 0, r, m, dm);
      check("one rd strobe", n_rd - rd0, 1);
      check("no wr strobe", n_wr - wr0, 0);
      check("rd addr", last_rd_addr, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
