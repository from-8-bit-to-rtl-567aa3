// rom_ctrl: boot ROM and ROM switching for the add-on.
//
// After reset the add-on is in boot mode: it disables the computer's own ROM
// (rom_dis, which drives the ROM's read-enable line) and answers Z80 memory
// reads below 0x4000 itself from a ROM of 2**ROM_AW bytes in block RAM
// (mirrored over the 16 KB), which holds the SD-card loader program. The
// loader leaves boot mode by writing a value with bit 0 set to I/O port 0x07
// (low address byte); from then on the computer's ROM is used again.
//
// TR-DOS entry: an opcode fetch (MREQ, RD and M1 low) from 0x3D00-0x3DFF
// outside boot mode raises romcs, which selects the floppy unit's TR-DOS ROM
// in place of the built-in one; romcs stays high until an opcode fetch from
// 0x4000 or above. romcs is asserted combinationally during the trapping
// fetch itself and then held by a flag.
//
// Strobes are synchronised to the pixel clock for the state; rd_oe and the
// combinational part of romcs use the raw strobes. The ROM is read every
// pixel clock from the live address, one clock of latency.
//
// From the document: boot ROM in internal BRAM replacing the built-in ROM at
// power-on, the 0x3D00-0x3DFF fetch trap with RD and M1 that raises ROMCS.
// Own choices: ROM size, the exit port and the trap release (as in the Beta
// Disk interface). The loader's code is software and is loaded from
// INIT_FILE (hex, one byte per line); with no file the ROM is all zeros.
module rom_ctrl #(
  parameter int unsigned ROM_AW    = 12,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,          // pixel clock
  input  logic        rst,
  input  logic [15:0] zx_a,
  input  logic [7:0]  zx_d,
  input  logic        zx_mreq_n,
  input  logic        zx_iorq_n,
  input  logic        zx_rd_n,
  input  logic        zx_wr_n,
  input  logic        zx_m1_n,
  output logic [7:0]  rd_data,
  output logic        rd_oe,
  output logic        rom_dis,
  output logic        romcs,
  output logic        boot_mode,
  output logic        trdos
);
  logic [7:0] rom [2**ROM_AW];
  initial begin
    for (int i = 0; i < 2**ROM_AW; i++) rom[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) rd_data <= rom[zx_a[ROM_AW-1:0]];

  logic [1:0] mreq_s, iorq_s, rd_s, wr_s, m1_s;
  always_ff @(posedge clk) begin
    mreq_s <= {mreq_s[0], !zx_mreq_n};
    iorq_s <= {iorq_s[0], !zx_iorq_n};
    rd_s   <= {rd_s[0],   !zx_rd_n};
    wr_s   <= {wr_s[0],   !zx_wr_n};
    m1_s   <= {m1_s[0],   !zx_m1_n};
  end

  logic fetch_s, fetch_raw, trap_raw;
  assign fetch_s   = mreq_s[1] && rd_s[1] && m1_s[1];
  assign fetch_raw = !zx_mreq_n && !zx_rd_n && !zx_m1_n;
  assign trap_raw  = fetch_raw && (zx_a[15:8] == 8'h3D) && !boot_mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      boot_mode <= 1'b1;
      trdos     <= 1'b0;
    end else begin
      if (iorq_s[1] && wr_s[1] && !m1_s[1] && zx_a[7:0] == 8'h07 && zx_d[0])
        boot_mode <= 1'b0;
      if (fetch_s && !boot_mode && zx_a[15:8] == 8'h3D)
        trdos <= 1'b1;
      else if (fetch_s && zx_a[15:14] != 2'b00)
        trdos <= 1'b0;
    end
  end

  assign romcs   = trdos || trap_raw;
  assign rom_dis = boot_mode || romcs;
  assign rd_oe   = boot_mode && !zx_mreq_n && !zx_rd_n && (zx_a[15:14] == 2'b00);
endmodule
