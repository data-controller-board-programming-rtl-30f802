// tb_idpu_bridge: self-checking test of the 8-to-16-bit backplane bridge.
// A small model of a backplane slave returns a 16-bit word that depends on the
// port address. The test checks that backplane ports (0-A, F) and only those
// produce backplane strobes, that writes carry {B2 byte, processor byte}, that
// reads return the low byte and leave the high byte readable at B2, and that a
// write to B2 does not change what B2 reads back.
module tb_idpu_bridge;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 0;
  io_req_t io = '0;
  logic [7:0] rdata;
  idpu_req_t idpu;
  logic [15:0] idpu_rdata;
  int checks = 0, failures = 0;
  int n_bwr = 0, n_brd = 0;
  logic [15:0] last_bw;

  idpu_bridge dut (.*);

  // slave model: read word is a fixed function of the address
  assign idpu_rdata = {~idpu.addr, idpu.addr ^ 8'h5A};

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (idpu.wr) begin n_bwr++; last_bw = idpu.wdata; end
    if (idpu.rd) n_brd++;
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
    rd(8'hB2, d); check("ext reset", d, 0);
    for (int n = 0; n < 16; n++) begin
      logic [7:0] p, hi, lo;
      int w0, r0;
      bit bp;
      p = {4'(n), 4'($urandom)};
      bp = (n <= 10) || (n == 15);
      hi = 8'($urandom); lo = 8'($urandom);
      wr(8'hB2, hi);
      w0 = n_bwr; r0 = n_brd;
      wr(p, lo);
      check("bp write strobe", n_bwr - w0, bp);
      if (bp) check("bp write word", last_bw, {hi, lo});
      rd(p, d);
      check("bp read strobe", n_brd - r0, bp);
      if (p != 8'hB2) check("bp read low", d, bp ? 8'(p ^ 8'h5A) : 8'h00);
      rd(8'hB2, d);
      if (bp) check("ext captured", d, 8'(~p));
      wr(8'hB2, 8'h77);
      rd(8'hB2, d);
      if (bp) check("ext not overwritten", d, 8'(~p));
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
