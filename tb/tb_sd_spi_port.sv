// tb_sd_spi_port: Z80 I/O cycles to port 0x03 must set MOSI/SCK/CS from
// data bits 0..2, other ports must not; reads of port 0x01 must return MISO
// in bit 0 with the bus driven, and no other read may drive the bus.
//
// Port numbers from the design description, bit positions this design's own.
module tb_sd_spi_port;
  logic clk = 0, rst = 1;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0, rd_data;
  logic zx_iorq_n = 1, zx_rd_n = 1, zx_wr_n = 1, zx_m1_n = 1;
  logic rd_oe, sd_mosi, sd_sck, sd_cs_n, sd_miso = 0;
  int checks = 0, failures = 0;
  always #143 clk = ~clk;
  sd_spi_port dut (.clk, .rst, .zx_a, .zx_d, .zx_iorq_n, .zx_rd_n, .zx_wr_n, .zx_m1_n,
                   .rd_data, .rd_oe, .sd_mosi, .sd_sck, .sd_cs_n, .sd_miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic io_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge clk); zx_a <= a; zx_d <= d;
    @(posedge clk); zx_iorq_n <= 0; zx_wr_n <= 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk); zx_iorq_n <= 1; zx_wr_n <= 1;
  endtask

  task automatic io_rd(input logic [15:0] a, output logic [7:0] d, output logic oe);
    @(posedge clk); zx_a <= a;
    @(posedge clk); zx_iorq_n <= 0; zx_rd_n <= 0;
    @(posedge clk); @(posedge clk); #1;
    d = rd_data; oe = rd_oe;
    @(negedge clk); zx_iorq_n <= 1; zx_rd_n <= 1;
  endtask

  logic [2:0] st;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(sd_cs_n && !sd_sck && sd_mosi, "reset state");
    st = 3'b101;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] d, rd;
      logic oe;
      logic [15:0] a;
      d = 8'($urandom);
      a = {8'($urandom), (n % 3 == 0) ? 8'($urandom) : 8'h03};
      io_wr(a, d);
      if (a[7:0] == 8'h03) st = {d[2], d[1], d[0]};
      @(posedge clk); #1;
      check({sd_cs_n, sd_sck, sd_mosi} == st, $sformatf("pins after write %h to %h", d, a));
      sd_miso = 1'($urandom);
      a = {8'($urandom), (n % 4 == 0) ? 8'h01 : 8'($urandom)};
      io_rd(a, rd, oe);
      if (a[7:0] == 8'h01) check(oe && rd == {7'b0, sd_miso}, "miso read");
      else                 check(!oe, "no drive on other ports");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
