// sd_spi_port: SD card SPI lines bit-banged by the Z80 through I/O ports.
//
// There is no SPI controller: the Z80 runs the protocol itself. An I/O write
// to port 0x03 (low address byte) sets the three output lines from data
// bits 0 (MOSI), 1 (SCK) and 2 (CS, active low). An I/O read of port 0x01
// returns the MISO line in bit 0 (other bits 0) and raises rd_oe so the
// board drives the data bus. Writes are sampled on rising Z80 clock edges
// while IORQ and WR are low; interrupt acknowledge cycles are ignored.
// After reset the card is deselected (CS high, SCK low, MOSI high).
// rd_data is the MISO pin itself in bit 0 and constant zeros above it: the
// port is a plain path from the pin to the bus, so those bits stay idle.
//
// From the document: the two port numbers, MOSI/SCK/CS from a port-3 write
// and MISO from a port-1 read. Own choices: the bit positions and full
// decoding of the low address byte.
module sd_spi_port (
  input  logic        clk,          // Z80 clock
  input  logic        rst,
  input  logic [15:0] zx_a,
  input  logic [7:0]  zx_d,
  input  logic        zx_iorq_n,
  input  logic        zx_rd_n,
  input  logic        zx_wr_n,
  input  logic        zx_m1_n,
  output logic [7:0]  rd_data,
  output logic        rd_oe,
  output logic        sd_mosi,
  output logic        sd_sck,
  output logic        sd_cs_n,
  input  logic        sd_miso
);
  logic io;
  assign io      = !zx_iorq_n && zx_m1_n;
  assign rd_oe   = io && !zx_rd_n && (zx_a[7:0] == 8'h01);
  assign rd_data = {7'b0, sd_miso};

  always_ff @(posedge clk) begin
    if (rst) begin
      sd_mosi <= 1'b1;
      sd_sck  <= 1'b0;
      sd_cs_n <= 1'b1;
    end else if (io && !zx_wr_n && zx_a[7:0] == 8'h03) begin
      sd_mosi <= zx_d[0];
      sd_sck  <= zx_d[1];
      sd_cs_n <= zx_d[2];
    end
  end
endmodule
