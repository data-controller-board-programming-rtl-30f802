// tb_pff_test_port: self-checking test of the packet formatter memory test
// port (E8-ED). A testbench memory with one clock of read latency stands in
// for the packet formatter memory. Checks: no memory write and zero read data
// outside test mode; writes of random words through E8/E9/EA/EB/ED land at
// {bank, address} with the right data; reads of E8-EB return the low byte and
// capture the high byte for EC-EF; both banks are used.
module tb_pff_test_port;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 0;
  io_req_t io = '0;
  logic [7:0] rdata;
  logic test_mode = 0, bank = 0;
  logic [14:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  logic mem_we;
  logic [15:0] mem [32768];
  int checks = 0, failures = 0, n_we = 0;

  pff_test_port dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (mem_we) begin mem[mem_addr] <= mem_wdata; n_we++; end
    mem_rdata <= mem[mem_addr];
  end

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
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); io.addr = a; io.rd = 1;
    #1 d = rdata;
    @(negedge clk); io.rd = 0;
  endtask

  task automatic set_addr(input logic [13:0] a);
    wr(8'hEA, a[7:0]); wr(8'hEB, {2'b11, a[13:8]});
  endtask

  initial begin
    logic [7:0] d;
    logic [15:0] words [64];
    logic [14:0] addrs [64];
    for (int i = 0; i < 32768; i++) mem[i] = 16'(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // outside test mode nothing reaches the memory
    set_addr(14'h0123); wr(8'hE8, 8'h11); wr(8'hE9, 8'h22); wr(8'hED, 0);
    check("no write outside test mode", n_we, 0);
    rd(8'hE8, d); check("no read outside test mode", d, 0);
    test_mode = 1;
    for (int i = 0; i < 64; i++) begin
      bank = i[0];
      addrs[i] = {bank, 14'(i * 257 + $urandom_range(0, 200))};
      words[i] = 16'($urandom);
      set_addr(addrs[i][13:0]);
      wr(8'hE8, words[i][7:0]); wr(8'hE9, words[i][15:8]); wr(8'hED, 8'h00);
      check("mem_addr", mem_addr, addrs[i]);
    end
    check("write strobes", n_we, 64);
    for (int i = 63; i >= 0; i--) begin
      logic [7:0] hi;
      bank = addrs[i][14];
      set_addr(addrs[i][13:0]);
      rd(8'hE8 + 8'(i % 4), d);
      check("low byte", d, words[i][7:0]);
      rd(8'hED, hi);
      check("high byte", hi, words[i][15:8]);
      rd(8'hEC + 8'((i + 1) % 4), hi);
      check("high byte EC-EF", hi, words[i][15:8]);
      check("memory word", mem[addrs[i]], words[i]);
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
