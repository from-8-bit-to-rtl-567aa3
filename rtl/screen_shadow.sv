// screen_shadow: shadow copy of the Spectrum screen memory.
//
// The add-on cannot read the computer's video RAM, so it watches the Z80
// bus. Every memory cycle (read or write) whose address has A15..A13 = 010,
// i.e. 0x4000-0x5FFF, has its data byte copied into a dual-port block RAM
// at the same 13-bit offset. Bitmap (6144 bytes) and attributes (768 bytes)
// therefore sit at their Spectrum offsets 0x0000-0x1AFF; the 13-bit address
// reserves 8 KB. The write port runs on the Z80 clock and samples the bus on
// every rising edge while MREQ and RD or WR are low; the last sample of a
// cycle (T3) carries valid data and wins. The read port runs on the pixel
// clock with one cycle of latency.
//
// From the document: the address window, the capture of both reads and
// writes, the dual-port RAM and the clock of the write port. Own choice: the
// sampling on every CPU clock edge of the cycle.
module screen_shadow #(
  parameter int unsigned AW = 13
) (
  input  logic          zx_clk,
  input  logic [15:0]   zx_a,
  input  logic [7:0]    zx_d,
  input  logic          zx_mreq_n,
  input  logic          zx_rd_n,
  input  logic          zx_wr_n,
  input  logic          clk_pix,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);
  logic [7:0] mem [2**AW];

  logic hit;
  assign hit = !zx_mreq_n && (!zx_rd_n || !zx_wr_n) && (zx_a[15:13] == 3'b010);

  always_ff @(posedge zx_clk)
    if (hit) mem[zx_a[AW-1:0]] <= zx_d;

  always_ff @(posedge clk_pix)
    rd_data <= mem[rd_addr];
endmodule
