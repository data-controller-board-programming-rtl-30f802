// tb_pf_memory: self-checking test of the 32K x 16 packet formatter memory at
// its full size. Writes a word pattern computed from the address to every
// location, reads all back with the one-clock latency, then overwrites a
// random subset and checks it against a testbench copy.
module tb_pf_memory;
  localparam int DEPTH = 32768;
  logic clk = 0, we = 0;
  logic [14:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  pf_memory dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input int a);
    return 16'(a * 40503 + 16'h1D0F);
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = 15'(a); wdata = pat(a); shadow[a] = pat(a);
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk); we = $urandom_range(0, 1); addr = 15'(a); wdata = 16'($urandom);
      if (we) shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 15'(a);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0h: got %0h expected %0h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
