// cpu8085_model: behavioural model of the 8085 bus, for testbenches only.
// Each task runs one bus cycle clocked by clk: a clock with ALE high and the
// low address byte on AD, then three clocks with RD_n or WR_n low (write data
// on AD for writes), then one idle clock. For an I/O cycle the port address is
// also put on A[15:8], as the 8085 does. io_rd returns the byte the board
// drives (ad_out) and checks that the board drives the bus (ad_oe); mem_sel
// reports the ROM and RAM chip selects seen during a memory cycle.
module cpu8085_model (
  input  logic       clk,
  output logic       ale,
  output logic [7:0] ad,
  output logic [7:0] a_hi,
  output logic       iom,
  output logic       rd_n,
  output logic       wr_n,
  input  logic [7:0] ad_out,
  input  logic       ad_oe,
  input  logic       rom_cs_n,
  input  logic       ram_cs_n
);
  int bus_errors = 0;

  initial begin
    ale = 0; ad = 0; a_hi = 0; iom = 0; rd_n = 1; wr_n = 1;
  end

  task automatic cycle(input bit io_c, input bit is_wr, input logic [15:0] a,
                       input logic [7:0] d, output logic [7:0] q,
                       output bit rom_sel, output bit ram_sel);
    @(negedge clk);
    ale = 1; iom = io_c; ad = a[7:0]; a_hi = a[15:8];
    @(negedge clk);
    ale = 0; ad = is_wr ? d : 8'h00;
    if (is_wr) wr_n = 0; else rd_n = 0;
    @(negedge clk);
    @(negedge clk);
    rom_sel = !rom_cs_n; ram_sel = !ram_cs_n;
    q = ad_out;
    if (io_c && !is_wr && a[7:4] != 4'hD && !ad_oe) bus_errors++;
    @(negedge clk);
    rd_n = 1; wr_n = 1;
  endtask

  task automatic io_wr(input logic [7:0] p, input logic [7:0] d);
    logic [7:0] q; bit r, m;
    cycle(1, 1, {p, p}, d, q, r, m);
  endtask

  task automatic io_rd(input logic [7:0] p, output logic [7:0] q);
    bit r, m;
    cycle(1, 0, {p, p}, 8'h00, q, r, m);
  endtask

  task automatic mem_sel(input bit is_wr, input logic [15:0] a, output bit rom_sel,
                         output bit ram_sel);
    logic [7:0] q;
    cycle(0, is_wr, a, 8'h00, q, rom_sel, ram_sel);
  endtask
endmodule
