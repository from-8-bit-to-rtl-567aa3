// zx_hdmi_top: FPGA add-on for a ZX Spectrum clone on the Z80 bus.
//
// The board sits on the computer's floppy connector, which carries the Z80
// bus. It watches the bus, rebuilds the picture from a shadow of the screen
// memory and sends it, scaled 2x and framed by the border colour, as
// 640x480 @ 60 Hz HDMI with the computer's sound embedded. It also adds a
// YM2149 sound chip, a bit-banged SD card port, 512 KB of paged SRAM and a
// boot ROM.
//
// Clock domains:
//   zx_clk   the Z80 clock (3.5 MHz): bus snooping into the screen shadow,
//            PSG, port 0xFE, SD port, audio mixing and 48 kHz sampling;
//   clk_ser  the 125.798 MHz serial clock from the PLL: TMDS serializer;
//   clk_pix  clk_ser / 5 (25.16 MHz), made by the serializer: raster,
//            pixel fetch, scaler, HDMI encoding and packets, I2S, SRAM and ROM
//            control.
// Audio samples cross from zx_clk to clk_pix in an asynchronous FIFO. The
// border colour and the hq2x switch are static signals and cross through
// two flip-flops each. rst is asynchronous to everything; each domain gets
// its own synchronised copy.
//
// Video path (clk_pix): video_timing -> hq2x_scaler, which fetches source
// pixels through zx_pixel_fetch from screen_shadow -> zx_palette ->
// hdmi_tx (with hdmi_packet_picker) -> hdmi_serializer.
// The Z80 data bus is driven (zx_d_oe) by the boot ROM, the SRAM, the PSG or
// the SD port when one of them answers a read; an assertion checks that
// never more than one does. TMDS lanes 0..2 are the data
// channels and lane 3 the clock; rise/fall go to DDR output cells.
// Status outputs of the blocks (event pulses, page_reg, boot_mode, trdos,
// the FIFO's full flag) are left unconnected here; they serve testbenches
// and debugging. A sample arriving at a full FIFO is dropped, which cannot
// happen while the packet picker drains 4 samples per line.
//
// Follows the design description: the three clock domains, the shadow-screen
// video path with optional hq2x, HDMI audio from a 48 kHz FIFO, the PSG, SD
// port, SRAM paging and boot/TR-DOS ROM control. Own choices: clock-domain
// assignment of each block, reset synchronisers, bus-driver priority.
module zx_hdmi_top #(
  parameter int unsigned ZX_CLK_HZ = 3500000,
  parameter int unsigned PIX_HZ    = 25160000,
  parameter int unsigned AUDIO_HZ  = 48000
) (
  input  logic        clk_ser,
  input  logic        rst,
  input  logic        hq2x_en,
  // Z80 bus
  input  logic        zx_clk,
  input  logic [15:0] zx_a,
  input  logic [7:0]  zx_d_i,
  output logic [7:0]  zx_d_o,
  output logic        zx_d_oe,
  input  logic        zx_mreq_n,
  input  logic        zx_iorq_n,
  input  logic        zx_rd_n,
  input  logic        zx_wr_n,
  input  logic        zx_m1_n,
  output logic        rom_dis,
  output logic        romcs,
  output logic        int_ram_dis,
  // SRAM
  output logic [18:0] sram_a,
  output logic [7:0]  sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [7:0]  sram_dq_i,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  // SD card
  output logic        sd_mosi,
  output logic        sd_sck,
  output logic        sd_cs_n,
  input  logic        sd_miso,
  // HDMI
  output logic        clk_pix,
  output logic [3:0]  tmds_rise,
  output logic [3:0]  tmds_fall,
  // I2S
  output logic        i2s_bclk,
  output logic        i2s_lrclk,
  output logic        i2s_data
);
  import zx_pkg::*;

  // ------------------------------------------------------------ resets
  logic [1:0] rst_ser_s, rst_pix_s, rst_zx_s;
  logic rst_ser, rst_pix, rst_zx;
  always_ff @(posedge clk_ser or posedge rst)
    if (rst) rst_ser_s <= 2'b11;
    else     rst_ser_s <= {rst_ser_s[0], 1'b0};
  always_ff @(posedge clk_pix or posedge rst)
    if (rst) rst_pix_s <= 2'b11;
    else     rst_pix_s <= {rst_pix_s[0], 1'b0};
  always_ff @(posedge zx_clk or posedge rst)
    if (rst) rst_zx_s <= 2'b11;
    else     rst_zx_s <= {rst_zx_s[0], 1'b0};
  assign rst_ser = rst_ser_s[1];
  assign rst_pix = rst_pix_s[1];
  assign rst_zx  = rst_zx_s[1];

  // ------------------------------------------------------------ Z80 clock domain
  logic [12:0] shadow_raddr;
  logic [7:0]  shadow_rdata;
  screen_shadow u_shadow (
    .zx_clk, .zx_a, .zx_d(zx_d_i), .zx_mreq_n, .zx_rd_n, .zx_wr_n,
    .clk_pix, .rd_addr(shadow_raddr), .rd_data(shadow_rdata)
  );

  logic       beeper;
  logic [2:0] border_zx;
  ula_port_snoop u_ula (
    .clk(zx_clk), .rst(rst_zx), .zx_a, .zx_d(zx_d_i), .zx_iorq_n, .zx_wr_n, .zx_m1_n,
    .beeper, .border(border_zx)
  );

  logic [7:0] psg_rd, ch_a, ch_b, ch_c;
  logic       psg_oe;
  ym2149 u_psg (
    .clk(zx_clk), .rst(rst_zx), .zx_a, .zx_d(zx_d_i), .zx_iorq_n, .zx_rd_n, .zx_wr_n, .zx_m1_n,
    .rd_data(psg_rd), .rd_oe(psg_oe), .ch_a, .ch_b, .ch_c
  );

  logic [7:0] sd_rd;
  logic       sd_oe;
  sd_spi_port u_sd (
    .clk(zx_clk), .rst(rst_zx), .zx_a, .zx_d(zx_d_i), .zx_iorq_n, .zx_rd_n, .zx_wr_n, .zx_m1_n,
    .rd_data(sd_rd), .rd_oe(sd_oe), .sd_mosi, .sd_sck, .sd_cs_n, .sd_miso
  );

  logic signed [15:0] mix_l, mix_r;
  audio_mixer u_mix (
    .clk(zx_clk), .rst(rst_zx), .beeper, .ch_a, .ch_b, .ch_c, .left(mix_l), .right(mix_r)
  );

  logic fs_tick;
  frac_tick #(.NUM(AUDIO_HZ), .DEN(ZX_CLK_HZ)) u_fs (.clk(zx_clk), .rst(rst_zx), .tick(fs_tick));

  logic        fifo_full, fifo_empty, fifo_rd;
  logic [31:0] fifo_rdata;
  async_fifo #(.WIDTH(32), .DEPTH(4)) u_afifo (
    .wclk(zx_clk), .wrst(rst_zx), .wr(fs_tick), .wdata({mix_l, mix_r}), .full(fifo_full),
    .rclk(clk_pix), .rrst(rst_pix), .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty)
  );

  // ------------------------------------------------------------ pixel clock domain
  logic [9:0] q0, q1, q2;
  hdmi_serializer u_ser (
    .clk_ser, .rst(rst_ser), .clk_pix, .q0, .q1, .q2, .rise(tmds_rise), .fall(tmds_fall)
  );

  logic [2:0] border_s1, border_s2;
  logic [1:0] hq_s;
  always_ff @(posedge clk_pix) begin
    border_s1 <= border_zx;
    border_s2 <= border_s1;
    hq_s      <= {hq_s[0], hq2x_en};
  end

  vid_timing_t t_raw, t_scaled;
  logic        frame_start;
  video_timing u_timing (.clk_pix, .rst(rst_pix), .t(t_raw), .frame_start);

  logic       f_req;
  logic [7:0] f_sx, f_sy;
  zx_color_t  f_pix, scaled_pix;
  logic       f_valid, smooth_event;
  zx_pixel_fetch u_fetch (
    .clk_pix, .rst(rst_pix), .frame_tick(frame_start), .req(f_req), .sx(f_sx), .sy(f_sy),
    .mem_addr(shadow_raddr), .mem_data(shadow_rdata), .pix(f_pix), .pix_valid(f_valid)
  );

  hq2x_scaler u_scaler (
    .clk_pix, .rst(rst_pix), .hq2x_en(hq_s[1]), .border({1'b0, border_s2}), .t_in(t_raw),
    .fetch_req(f_req), .fetch_sx(f_sx), .fetch_sy(f_sy), .fetch_pix(f_pix),
    .t_out(t_scaled), .pix_out(scaled_pix), .smooth_event
  );

  logic [23:0] rgb;
  zx_palette u_pal (.idx(scaled_pix), .rgb);

  hdmi_packet_t pkt0, pkt1;
  logic         island_start;
  logic [31:0]  last_sample;
  logic         ev_audio, ev_acr, ev_avi, ev_aif;
  hdmi_packet_picker #(.AUDIO_CTS(PIX_HZ / 1000)) u_pick (
    .clk_pix, .rst(rst_pix), .frame_start, .island_start,
    .fifo_empty, .fifo_rdata, .fifo_rd, .pkt0, .pkt1, .last_sample,
    .ev_audio, .ev_acr, .ev_avi, .ev_aif
  );

  hdmi_tx u_tx (
    .clk_pix, .rst(rst_pix), .t(t_scaled), .rgb, .pkt0, .pkt1, .island_start, .q0, .q1, .q2
  );

  logic i2s_frame;
  i2s_tx #(.CLK_HZ(PIX_HZ), .BCLK_HZ(AUDIO_HZ * 32)) u_i2s (
    .clk(clk_pix), .rst(rst_pix), .left(last_sample[31:16]), .right(last_sample[15:0]),
    .bclk(i2s_bclk), .lrclk(i2s_lrclk), .data(i2s_data), .frame_start(i2s_frame)
  );

  logic [7:0] sram_rd, page_reg;
  logic       sram_oe;
  sram_pager u_sram (
    .clk(clk_pix), .rst(rst_pix), .zx_a, .zx_d(zx_d_i), .zx_mreq_n, .zx_iorq_n, .zx_rd_n,
    .zx_wr_n, .zx_m1_n, .rd_data(sram_rd), .rd_oe(sram_oe), .int_ram_dis,
    .sram_a, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n, .page_reg
  );

  logic [7:0] rom_rd;
  logic       rom_oe, boot_mode, trdos;
  rom_ctrl u_rom (
    .clk(clk_pix), .rst(rst_pix), .zx_a, .zx_d(zx_d_i), .zx_mreq_n, .zx_iorq_n, .zx_rd_n,
    .zx_wr_n, .zx_m1_n, .rd_data(rom_rd), .rd_oe(rom_oe), .rom_dis, .romcs, .boot_mode, .trdos
  );

  // ------------------------------------------------------------ data bus
  always_comb begin
    zx_d_oe = rom_oe || sram_oe || psg_oe || sd_oe;
    if (rom_oe)       zx_d_o = rom_rd;
    else if (sram_oe) zx_d_o = sram_rd;
    else if (psg_oe)  zx_d_o = psg_rd;
    else              zx_d_o = sd_rd;
  end

  // Bus rule: the four sources decode disjoint cycles (memory below and above
  // 0x4000, PSG and SD ports), so at most one of them answers a read.
  a_one_driver: assert property (@(posedge clk_pix) disable iff (rst_pix)
    $onehot0({rom_oe, sram_oe, psg_oe, sd_oe}))
    else $error("two sources drive the Z80 data bus");
endmodule
