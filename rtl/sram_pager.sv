// sram_pager: 512 KB memory expansion with Spectrum 128 style paging.
//
// The external 512 KB SRAM (19 address bits) is split into 32 banks of
// 16 KB. The Z80's RAM area is served from it: 0x4000-0x7FFF is bank 5,
// 0x8000-0xBFFF bank 2 and 0xC000-0xFFFF the paged bank. The paging register
// is written at port 0x7FFD (I/O write with A15 = 0 and A1 = 0): bits 2..0
// and 7..6 form the 5-bit bank {d7, d6, d2, d1, d0}, bit 3 the screen select
// and bit 4 the ROM select (kept for software, not used here), bit 5 locks
// the register until reset.
//
// The module runs on the pixel clock. The Z80 strobes pass two synchronising
// flip-flops; address and data are stable while a strobe is low, so they are
// sampled directly. A memory cycle at 0x4000 or above starts an SRAM access:
//   read:  SRAM address and OE driven in the first clock, data latched at the
//          end of the second (two pixel clocks, 79 ns, for a 45 ns SRAM),
//          then driven onto the Z80 data bus while RD stays low;
//   write: address, data and WE driven for two clocks, then WE released.
// int_ram_dis is high during any Z80 memory read at 0x4000 or above, so the
// board can keep the computer's own RAM off the data bus; writes also reach
// that RAM, which keeps the computer's own video output working.
//
// From the document: 512 KB SRAM expansion with a paging system, reads in two
// pixel clocks. Own choices (not given there): the port and bit layout (the
// Spectrum 128 port with two extra bank bits as in common 512 KB clones), the
// memory map and the bus hand-over signal.
module sram_pager (
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
  output logic        int_ram_dis,
  output logic [18:0] sram_a,
  output logic [7:0]  sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [7:0]  sram_dq_i,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic [7:0]  page_reg
);
  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_WR1, S_WR2, S_DONE} state_e;
  state_e st;

  logic [1:0] mreq_s, iorq_s, rd_s, wr_s, m1_s;   // synchronised, active high
  logic       io_wr_q;
  logic       locked;
  logic       have_data;

  always_ff @(posedge clk) begin
    mreq_s <= {mreq_s[0], !zx_mreq_n};
    iorq_s <= {iorq_s[0], !zx_iorq_n};
    rd_s   <= {rd_s[0],   !zx_rd_n};
    wr_s   <= {wr_s[0],   !zx_wr_n};
    m1_s   <= {m1_s[0],   !zx_m1_n};
  end

  logic mem_rd, mem_wr, io_wr, in_ram;
  assign in_ram = zx_a[15:14] != 2'b00;
  assign mem_rd = mreq_s[1] && rd_s[1] && in_ram;
  assign mem_wr = mreq_s[1] && wr_s[1] && in_ram;
  assign io_wr  = iorq_s[1] && wr_s[1] && !m1_s[1];

  logic [4:0] bank;
  always_comb begin
    unique case (zx_a[15:14])
      2'b01:   bank = 5'd5;
      2'b10:   bank = 5'd2;
      default: bank = {page_reg[7:6], page_reg[2:0]};
    endcase
  end

  // paging register
  always_ff @(posedge clk) begin
    if (rst) begin
      page_reg <= '0;
      locked   <= 1'b0;
      io_wr_q  <= 1'b0;
    end else begin
      io_wr_q <= io_wr;
      if (io_wr && !io_wr_q && !zx_a[15] && !zx_a[1] && !locked) begin
        page_reg <= zx_d;
        locked   <= zx_d[5];
      end
    end
  end

  // SRAM access
  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      sram_a     <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      rd_data    <= '0;
      have_data  <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: begin
          have_data <= 1'b0;
          if (mem_rd) begin
            sram_a    <= {bank, zx_a[13:0]};
            sram_ce_n <= 1'b0;
            sram_oe_n <= 1'b0;
            st        <= S_RD1;
          end else if (mem_wr) begin
            sram_a     <= {bank, zx_a[13:0]};
            sram_dq_o  <= zx_d;
            sram_dq_oe <= 1'b1;
            sram_ce_n  <= 1'b0;
            sram_we_n  <= 1'b0;
            st         <= S_WR1;
          end
        end
        S_RD1: st <= S_RD2;
        S_RD2: begin
          rd_data   <= sram_dq_i;
          have_data <= 1'b1;
          sram_ce_n <= 1'b1;
          sram_oe_n <= 1'b1;
          st        <= S_DONE;
        end
        S_WR1: st <= S_WR2;
        S_WR2: begin
          sram_we_n <= 1'b1;
          st        <= S_DONE;
        end
        default: begin        // S_DONE: wait for the Z80 cycle to end
          sram_ce_n  <= 1'b1;
          sram_dq_oe <= 1'b0;
          if (!mreq_s[1]) st <= S_IDLE;
        end
      endcase
    end
  end

  assign int_ram_dis = !zx_mreq_n && !zx_rd_n && in_ram;
  assign rd_oe       = int_ram_dis && have_data;
endmodule
