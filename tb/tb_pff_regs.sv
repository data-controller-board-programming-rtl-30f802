// tb_pff_regs: self-checking test of the packet formatter registers C0-CF,
// with a reduced second (CLK_PER_US = 2, US_PER_SEC = 1024). Checks the
// control register and its outputs, the latched timer, one-second and DMA
// end-of-process flags and their individual clears, the status inputs, the
// error flags and their common clear, seconds read/write, the header bytes,
// the subseconds readback after a known time, and the unused port C3.
module tb_pff_regs;
  import dcb_pkg::*;
  localparam int CPU = 2, UPS = 1024;
  logic clk = 0, rst_n = 0;
  io_req_t io = '0;
  logic [7:0] rdata;
  logic sc_1mhz = 0, sc_1hz = 0, dma_eop = 0, rrecrdyf = 0, safe = 0;
  logic [7:0] err_set = 0;
  logic test_mode, mem_bank, tlm_inhibit;
  logic [2:0] irq;
  logic [7:0] header [6];
  logic tick_1mhz, tick_1hz, tick_8hz;
  logic [31:0] seconds;
  logic [19:0] subsec;
  int checks = 0, failures = 0;

  pff_regs #(.CLK_PER_US(CPU), .US_PER_SEC(UPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); io.addr = a; io.wdata = d; io.wr = 1;
    @(negedge clk); io.wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); io.addr = a; io.rd = 1;
    #1 d = rdata;
    @(negedge clk); io.rd = 0;
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'hC0, d); check("ctrl reset", d, 0);
    rd(8'hC1, d); check("status reset", d, 0);
    // control register (spacecraft clocks idle, so no time passes)
    wr(8'hC0, 8'h07); rd(8'hC0, d); check("ctrl rb", d, 8'h07);
    check("test mode", test_mode, 1); check("bank", mem_bank, 1); check("inhibit", tlm_inhibit, 1);
    wr(8'hC0, 8'h02); check("test mode off", test_mode, 0); check("bank only", mem_bank, 1);
    // status inputs
    rrecrdyf = 1; safe = 0; rd(8'hC1, d); check("rrecrdyf", d, 8'h40);
    rrecrdyf = 0; safe = 1; rd(8'hC1, d); check("safe", d, 8'h80);
    safe = 0;
    // DMA EOP flag
    @(negedge clk); dma_eop = 1; @(negedge clk); dma_eop = 0;
    rd(8'hC1, d); check("eop flag", d, 8'h04); check("irq eop", irq, 3'b100);
    wr(8'hC1, 8'h03); rd(8'hC1, d); check("eop kept", d, 8'h04);
    wr(8'hC1, 8'h04); rd(8'hC1, d); check("eop cleared", d, 8'h00);
    // error flags
    for (int b = 0; b < 8; b++) begin
      @(negedge clk); err_set = 8'(1 << b); @(negedge clk); err_set = 0;
      rd(8'hC2, d); check("err accumulate", d, (1 << (b + 1)) - 1);
    end
    wr(8'hC1, 8'h7F); rd(8'hC2, d); check("errs kept", d, 8'hFF);
    wr(8'hC1, 8'h80); rd(8'hC2, d); check("errs cleared", d, 8'h00);
    // seconds and headers
    wr(8'hC4, 8'h11); wr(8'hC5, 8'h22); wr(8'hC6, 8'h33); wr(8'hC7, 8'h44);
    check("seconds", seconds, 32'h44332211);
    rd(8'hC4, d); check("sec0", d, 8'h11); rd(8'hC7, d); check("sec3", d, 8'h44);
    for (int h = 0; h < 6; h++) wr(8'hC8 + 8'(h), 8'hA0 + 8'(h));
    for (int h = 0; h < 6; h++) begin
      rd(8'hC8 + 8'(h), d); check("header rb", d, 8'hA0 + 8'(h));
      check("header out", header[h], 8'hA0 + 8'(h));
    end
    rd(8'hC3, d); check("C3", d, 0);
    // internal timer, fastest rate: 1024 Hz -> period UPS/8>>7 = 1 us here
    wr(8'hC0, 8'hF0);
    repeat (CPU * 4) @(negedge clk);
    rd(8'hC1, d); check("timer flag", d[0], 1);
    wr(8'hC0, 8'h80);  // 8 Hz: period UPS/8 us
    wr(8'hC1, 8'h01); rd(8'hC1, d); check("timer cleared", d[0], 0);
    // one second: wait for it and check seconds, flag and subseconds
    while (!tick_1hz) @(negedge clk);
    @(negedge clk);
    check("seconds +1", seconds, 32'h44332212);
    rd(8'hC1, d); check("second flag", d[1], 1);
    check("timer flag again", d[0], 1);
    wr(8'hC1, 8'h02); rd(8'hC1, d); check("second cleared", d[1], 0);
    repeat (CPU * 300 - 6) @(negedge clk);
    rd(8'hCE, d); check("subsec lo", d, 8'((300 >> 4) & 8'hFF));
    rd(8'hCF, d); check("subsec hi", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
