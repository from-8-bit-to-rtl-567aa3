// tb_zx_hdmi_top: end-to-end test of the add-on at its real parameters.
//
// A Z80 bus model (3.5 MHz, T-state timing) drives the computer side, an
// asynchronous 512 KB SRAM model sits on the memory port, and the SD MISO
// line is driven by the testbench. The HDMI output is recovered from the
// DDR pins: the four lanes are deserialised (aligned on the clock lane's
// 0000011111 pattern) and the three data channels decoded into control
// periods, preambles, guard bands, data islands and video pixels.
//
// Sequence: boot-ROM reads in boot mode; a test picture written to the
// screen (6912 bytes) through ordinary memory writes; border and beeper
// through the ULA port; PSG tone and noise; SD pins and MISO read-back;
// 512 KB paging; leaving boot mode; the TR-DOS trap. Then one whole frame
// is compared pixel by pixel with the expected 640x480 picture (pixel
// doubling), and a frame with hq2x on must contain smoothed pixels.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
//
// Runs with no parameter changes. Expected pixels and packets are computed
// here from the Spectrum screen rules and the HDMI rules, not taken from
// the RTL.
`timescale 1ns/1ps
module tb_zx_hdmi_top;
  logic clk_ser = 0, rst = 1, hq2x_en = 0, zx_clk = 0;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d_i, zx_d_o, tb_d = 0;
  logic zx_d_oe, zx_mreq_n = 1, zx_iorq_n = 1, zx_rd_n = 1, zx_wr_n = 1, zx_m1_n = 1;
  logic rom_dis, romcs, int_ram_dis;
  logic [18:0] sram_a;
  logic [7:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  logic sd_mosi, sd_sck, sd_cs_n, sd_miso = 0;
  logic clk_pix;
  logic [3:0] tmds_rise, tmds_fall;
  logic i2s_bclk, i2s_lrclk, i2s_data;
  int checks = 0, failures = 0;

  always #3.975 clk_ser = ~clk_ser;   // 125.79 MHz
  always #143 zx_clk = ~zx_clk;       // 3.5 MHz

  zx_hdmi_top dut (.*);

  // the data bus: the add-on's value while it drives, else the testbench's
  assign zx_d_i = zx_d_oe ? zx_d_o : tb_d;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ SRAM model
  logic [7:0] mem [1 << 19];
  always_comb sram_dq_i = (!sram_ce_n && !sram_oe_n) ? mem[sram_a] : 8'hzz;
  always @(posedge sram_we_n) if (!sram_ce_n && sram_dq_oe) mem[sram_a] = sram_dq_o;

  // ------------------------------------------------------------ Z80 bus
  task automatic mem_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge zx_clk); zx_a <= a;
    @(negedge zx_clk); zx_mreq_n <= 0; tb_d <= d;
    @(negedge zx_clk); zx_wr_n <= 0;
    @(negedge zx_clk); zx_mreq_n <= 1; zx_wr_n <= 1;
  endtask

  task automatic mem_rd(input logic [15:0] a, input bit m1, output logic [7:0] d, output logic oe);
    @(posedge zx_clk); zx_a <= a; zx_m1_n <= !m1;
    @(negedge zx_clk); zx_mreq_n <= 0; zx_rd_n <= 0;
    @(posedge zx_clk); @(posedge zx_clk); #1;
    d = zx_d_o; oe = zx_d_oe;
    @(negedge zx_clk); zx_mreq_n <= 1; zx_rd_n <= 1; zx_m1_n <= 1;
  endtask

  task automatic io_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge zx_clk); zx_a <= a; tb_d <= d;
    @(posedge zx_clk); zx_iorq_n <= 0; zx_wr_n <= 0;
    @(posedge zx_clk); @(posedge zx_clk);
    @(negedge zx_clk); zx_iorq_n <= 1; zx_wr_n <= 1;
  endtask

  task automatic io_rd(input logic [15:0] a, output logic [7:0] d, output logic oe);
    @(posedge zx_clk); zx_a <= a;
    @(posedge zx_clk); zx_iorq_n <= 0; zx_rd_n <= 0;
    @(posedge zx_clk); @(posedge zx_clk); #1;
    d = zx_d_o; oe = zx_d_oe;
    @(negedge zx_clk); zx_iorq_n <= 1; zx_rd_n <= 1;
  endtask

  // ------------------------------------------------------------ expected picture
  logic [7:0] scr [6912];
  logic [2:0] border_col = 3'd1;

  function automatic logic [23:0] pal(input logic [3:0] c);
    logic [7:0] on;
    on = c[3] ? 8'hFF : 8'hD7;
    return {c[1] ? on : 8'h00, c[2] ? on : 8'h00, c[0] ? on : 8'h00};
  endfunction

  function automatic logic [3:0] src_pix(input int x, input int y);
    logic [7:0] bm, at;
    int ba;
    ba = ((y >> 6) << 11) | ((y & 7) << 8) | (((y >> 3) & 7) << 5) | (x >> 3);
    bm = scr[ba];
    at = scr[6144 + (y >> 3) * 32 + (x >> 3)];
    return {at[6], bm[7 - (x & 7)] ? at[2:0] : at[5:3]};
  endfunction

  function automatic logic [23:0] expect_rgb(input int px, input int ln);
    if (px >= 64 && px < 576 && ln >= 48 && ln < 432)
      return pal(src_pix((px - 64) / 2, (ln - 48) / 2));
    return pal({1'b0, border_col});
  endfunction

  // ------------------------------------------------------------ TMDS receiver
  localparam logic [9:0] TERC4 [16] = '{10'b1010011100, 10'b1001100011, 10'b1011100100,
    10'b1011100010, 10'b0101110001, 10'b0100011110, 10'b0110001110, 10'b0100111100,
    10'b1011001100, 10'b0100111001, 10'b0110011100, 10'b1011000110, 10'b1010001110,
    10'b1001110001, 10'b0101100011, 10'b1011000011};
  localparam logic [9:0] CTRL [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  function automatic logic [7:0] decode(input logic [9:0] s);
    logic [7:0] b, o;
    b = s[9] ? ~s[7:0] : s[7:0];
    o[0] = b[0];
    for (int i = 1; i < 8; i++) o[i] = s[8] ? (b[i] ^ b[i-1]) : ~(b[i] ^ b[i-1]);
    return o;
  endfunction
  function automatic int ctrl_dec(input logic [9:0] s);
    for (int i = 0; i < 4; i++) if (CTRL[i] == s) return i;
    return -1;
  endfunction
  function automatic int terc4_dec(input logic [9:0] s);
    for (int i = 0; i < 16; i++) if (TERC4[i] == s) return i;
    return -1;
  endfunction

  // what the main sequence wants checked in the next frame
  int frame_mode = 0;          // 0 none, 1 exact (pixel doubling), 2 count smoothing
  int cur_mode = 0;
  int frames = 0, frames_exact = 0, frames_smooth = 0;
  int n_vid_px = 0, n_px_ok = 0, n_border_px = 0, n_smoothed = 0, n_lines_bad = 0;
  int n_islands = 0, n_aud = 0, n_acr = 0, n_avi = 0, n_aif = 0, n_bad_island = 0, n_vpre = 0;
  int n_audio_nonzero = 0, n_audio_change = 0, n_vsync = 0;
  logic [15:0] last_left;

  logic [3:0][19:0] acc;
  int phase = -1;
  logic [9:0] sym [3];
  bit have_sym = 0;
  always @(negedge clk_ser) begin
    for (int l = 0; l < 4; l++) acc[l] = {tmds_fall[l], tmds_rise[l], acc[l][19:2]};
    have_sym = 0;
    if (phase < 0) begin
      if (acc[3] == 20'b0000011111_0000011111) phase = 0;
    end else begin
      phase++;
      if (phase % 5 == 0) begin
        for (int l = 0; l < 3; l++) sym[l] = acc[l][19:10];
        have_sym = 1;
      end
    end
  end

  // period tracking
  int pre_len = 0, pre_kind = 0;   // 1 video, 2 data island
  int gb_cnt = 0, px = 0, line = -1000, dk = 0;
  bit in_video = 0, in_island = 0, prev_vs = 0;
  logic [31:0] hb;
  logic [3:0][63:0] sb;
  always @(negedge clk_ser) if (have_sym) begin
    int c0, c1, c2, t0, t1, t2;
    bit vs;
    c0 = ctrl_dec(sym[0]); c1 = ctrl_dec(sym[1]); c2 = ctrl_dec(sym[2]);
    if (in_video) begin
      if (c0 >= 0) begin
        in_video = 0;
        if (px != 640) n_lines_bad++;
        line++;
      end else begin
        logic [23:0] rgb, e;
        rgb = {decode(sym[2]), decode(sym[1]), decode(sym[0])};
        if (cur_mode != 0 && line >= 0 && line < 480 && px < 640) begin
          e = expect_rgb(px, line);
          n_vid_px++;
          if (cur_mode == 1) begin
            if (rgb == e) n_px_ok++;
            else if (failures < 30) $display("pixel %0d,%0d got %h want %h", px, line, rgb, e);
            check(rgb == e, "video pixel");
          end else begin
            if (rgb != e) n_smoothed++;
          end
          if (!(px >= 64 && px < 576 && line >= 48 && line < 432) && rgb == e) n_border_px++;
        end
        px++;
      end
    end
    if (!in_video) begin
      if (c0 >= 0 && c1 >= 0 && c2 >= 0) begin
        // control period
        vs = c0[1];
        if (vs && !prev_vs) begin
          n_vsync++;
          // a frame ends at the vertical sync
          if (cur_mode == 1 && line == 480) frames_exact++;
          if (cur_mode == 2 && line == 480) frames_smooth++;
          frames++;
          cur_mode = frame_mode;
          frame_mode = 0;                  // a request covers one frame
          line = -1000;
        end
        if (!vs && prev_vs) line = -33;      // 33 lines of back porch follow
        prev_vs = vs;
        if (c1 == 1 && c2 == 0) begin
          if (pre_kind != 1) pre_len = 0;
          pre_kind = 1; pre_len++;
        end else if (c1 == 1 && c2 == 1) begin
          if (pre_kind != 2) pre_len = 0;
          pre_kind = 2; pre_len++;
        end else begin
          pre_kind = 0; pre_len = 0;
        end
        if (line < 0 && line > -1000 && pre_kind == 0 && c0 >= 0 && px != 0) begin
          px = 0;
        end
        gb_cnt = 0;
        in_island = 0;
      end else if (pre_kind == 1 && pre_len == 8) begin
        // video guard band, two symbols
        gb_cnt++;
        if (sym[0] == 10'b1011001100 && sym[1] == 10'b0100110011 && sym[2] == 10'b1011001100) begin
          if (gb_cnt == 2) begin
            in_video = 1; px = 0; pre_kind = 0; pre_len = 0; n_vpre++;
            if (line < 0) line = 0;
          end
        end
      end else if (pre_kind == 2 && pre_len == 8) begin
        // data island: 2 guard, 64 packet symbols, 2 guard
        t0 = terc4_dec(sym[0]); t1 = terc4_dec(sym[1]); t2 = terc4_dec(sym[2]);
        if (dk < 2 || dk >= 66) begin
          if (!(sym[1] == 10'b0100110011 && sym[2] == 10'b0100110011 && t0 >= 0)) n_bad_island++;
        end else begin
          int pk;
          pk = dk - 2;
          if (t0 < 0 || t1 < 0 || t2 < 0) n_bad_island++;
          hb[pk % 32] = t0[2];
          for (int k = 0; k < 4; k++) begin
            sb[k][2 * (pk % 32)] = t1[k];
            sb[k][2 * (pk % 32) + 1] = t2[k];
          end
          if (pk % 32 == 31) begin
            n_islands++;
            case (hb[7:0])
              8'h02: begin
                n_aud++;
                if (hb[8]) begin
                  if (sb[0][23:8] != 16'h0) n_audio_nonzero++;
                  if (sb[0][23:8] != last_left) n_audio_change++;
                  last_left = sb[0][23:8];
                end
              end
              8'h01: begin
                n_acr++;
                check({sb[0][11:8], sb[0][23:16], sb[0][31:24]} == 20'd25160 &&
                      {sb[0][35:32], sb[0][47:40], sb[0][55:48]} == 20'd6144, "ACR N and CTS");
              end
              8'h82: n_avi++;
              8'h84: n_aif++;
              8'h00: ;
              default: n_bad_island++;
            endcase
          end
        end
        dk++;
        if (dk == 68) begin pre_kind = 0; pre_len = 0; dk = 0; end
      end
      if (pre_kind != 2) dk = 0;
    end
  end

  // ------------------------------------------------------------ I2S receiver
  int n_i2s_frames = 0, n_i2s_nonzero = 0;
  logic [31:0] i2s_sh;
  logic i2s_lr_q = 0;
  always @(posedge i2s_bclk) begin
    i2s_sh = {i2s_sh[30:0], i2s_data};
    if (i2s_lr_q && !i2s_lrclk) begin
      n_i2s_frames++;
      if (i2s_sh != 0) n_i2s_nonzero++;
    end
    i2s_lr_q = i2s_lrclk;
  end

  // ------------------------------------------------------------ RAM hand-over
  int n_ram_dis = 0, n_ram_dis_bad = 0;
  always @(posedge zx_clk) if (int_ram_dis) begin
    n_ram_dis++;
    if (zx_a < 16'h4000 || zx_mreq_n || zx_rd_n) n_ram_dis_bad++;
  end

  // ------------------------------------------------------------ SD
  int n_sd_edges = 0;
  always @(posedge sd_sck) if (!sd_cs_n) n_sd_edges++;

  // ------------------------------------------------------------ main sequence
  int n_boot_reads = 0, n_page_ok = 0, n_psg_ok = 0, n_sd_ok = 0, n_trap = 0, n_boot_exit = 0,
      n_screen_writes = 0, n_hq_events = 0;

  initial begin
    logic [7:0] d;
    logic oe;
    for (int i = 0; i < (1 << 19); i++) mem[i] = 8'(i ^ (i >> 9));
    for (int i = 0; i < 6144; i++) scr[i] = 8'($urandom);
    for (int i = 0; i < 768; i++) begin
      scr[6144 + i] = 8'($urandom) & 8'h7F;          // no flashing cells
      if (i % 5 == 0) scr[6144 + i] = 8'h47;         // bright white ink on black
    end
    // some solid and diagonal shapes for the smoothing
    for (int y = 0; y < 64; y++)
      for (int xb = 0; xb < 32; xb++)
        scr[((y >> 6) << 11) | ((y & 7) << 8) | (((y >> 3) & 7) << 5) | xb] =
          8'hFF >> ((y + xb * 8) % 8);
    repeat (20) @(posedge zx_clk);
    rst = 0;
    repeat (20) @(posedge zx_clk);
    // ---- boot mode: ROM area served by the add-on
    check(rom_dis && !romcs, "boot mode disables the computer ROM");
    for (int a = 0; a < 16; a++) begin
      mem_rd(16'(a * 1000), a % 2 == 0, d, oe);
      if (oe && d == 8'h00) n_boot_reads++;
    end
    // ---- screen
    for (int i = 0; i < 6912; i++) begin
      mem_wr(16'h4000 + 16'(i), scr[i]);
      n_screen_writes++;
    end
    // ---- border and beeper
    io_wr(16'h00FE, 8'({3'b000, 1'b1, 1'b0, border_col}));
    // ---- PSG: tone A, noise on C, fixed levels
    begin
      logic [7:0] regs [14] = '{8'd60, 8'd0, 8'd90, 8'd0, 8'd0, 8'd1, 8'd5, 8'b00011100,
                                8'd15, 8'd12, 8'd10, 8'd0, 8'd0, 8'd0};
      for (int r = 0; r < 14; r++) begin
        io_wr(16'hFFFD, 8'(r));
        io_wr(16'hBFFD, regs[r]);
      end
      for (int r = 0; r < 14; r++) begin
        io_wr(16'hFFFD, 8'(r));
        io_rd(16'hFFFD, d, oe);
        if (oe && d == regs[r]) n_psg_ok++;
      end
    end
    // ---- SD card port
    io_wr(16'h0003, 8'b000);                       // CS low, SCK low, MOSI 0
    check(!sd_cs_n && !sd_sck && !sd_mosi, "SD pins");
    for (int b = 0; b < 8; b++) begin
      io_wr(16'h0003, 8'({1'b0, 1'b0, 1'(b)}));
      io_wr(16'h0003, 8'({1'b0, 1'b1, 1'(b)}));
      sd_miso = b[0];
      io_rd(16'h0001, d, oe);
      if (oe && d[0] == b[0]) n_sd_ok++;
    end
    io_wr(16'h0003, 8'b101);                       // CS high
    check(sd_cs_n, "SD deselect");
    // ---- paging
    for (int b = 0; b < 32; b += 5) begin
      io_wr(16'h7FFD, {2'(b >> 3), 3'b000, 3'(b)});
      mem_wr(16'hC100, 8'(b * 3 + 1));
      mem_rd(16'hC100, 0, d, oe);
      if (mem[{5'(b), 14'h0100}] == 8'(b * 3 + 1) && oe && d == 8'(b * 3 + 1))
        n_page_ok++;
      else $display("paging bank %0d: stored %h read %h oe %b", b, mem[{5'(b), 14'h0100}], d, oe);
    end
    mem_rd(16'h4005, 0, d, oe);
    check(oe && d == scr[5], "screen bytes also stored in bank 5");
    // ---- leave boot mode, TR-DOS trap
    io_wr(16'h0007, 8'h01);
    mem_rd(16'h0000, 1, d, oe);
    if (!oe && !rom_dis) n_boot_exit++;
    mem_rd(16'h3D13, 1, d, oe);
    @(posedge zx_clk); #1;
    if (romcs && rom_dis) n_trap++;
    mem_rd(16'h8000, 1, d, oe);
    @(posedge zx_clk); #1;
    check(!romcs, "TR-DOS released");
    // ---- beeper toggling while the picture is checked
    fork
      begin
        frame_mode = 1;
        wait (frames_exact >= 1);
        hq2x_en = 1;
        @(frames);                       // let the switch settle for a frame
        frame_mode = 2;
        wait (frames_smooth >= 1);
      end
      begin
        while (frames_smooth < 1) begin
          io_wr(16'h00FE, 8'({3'b000, 1'b1, 1'b0, border_col}));
          repeat (400) @(posedge zx_clk);
          io_wr(16'h00FE, 8'({3'b000, 1'b0, 1'b0, border_col}));
          repeat (400) @(posedge zx_clk);
        end
      end
      begin
        while (frames_smooth < 1) begin
          @(posedge clk_pix);
          if (dut.u_scaler.smooth_event) n_hq_events++;
        end
      end
    join
    // ---- mechanisms
    check(n_boot_reads == 16, $sformatf("boot ROM reads %0d", n_boot_reads));
    check(n_screen_writes == 6912, "screen writes");
    check(n_psg_ok == 14, $sformatf("PSG read-back %0d", n_psg_ok));
    check(n_sd_ok == 8 && n_sd_edges == 8, $sformatf("SD %0d %0d", n_sd_ok, n_sd_edges));
    check(n_page_ok == 7, $sformatf("paging %0d", n_page_ok));
    check(n_boot_exit == 1, "boot exit");
    check(n_ram_dis > 0 && n_ram_dis_bad == 0, $sformatf("computer RAM disabled %0d, wrongly %0d", n_ram_dis, n_ram_dis_bad));
    check(n_trap == 1, "TR-DOS trap");
    check(frames_exact >= 1 && n_px_ok == 640 * 480, $sformatf("exact frame: %0d pixels ok", n_px_ok));
    check(n_border_px > 0, "border pixels");
    check(frames_smooth >= 1 && n_smoothed > 100 && n_hq_events > 100,
          $sformatf("hq2x: %0d smoothed pixels, %0d events", n_smoothed, n_hq_events));
    check(n_lines_bad == 0 && n_vpre > 0, $sformatf("video lines: %0d bad", n_lines_bad));
    check(n_vsync >= 3, "vertical syncs");
    check(n_bad_island == 0 && n_islands > 1000, $sformatf("islands %0d bad %0d", n_islands, n_bad_island));
    check(n_aud > 500 && n_acr > 10 && n_avi >= 2 && n_aif >= 2,
          $sformatf("packets aud %0d acr %0d avi %0d aif %0d", n_aud, n_acr, n_avi, n_aif));
    check(n_audio_nonzero > 100 && n_audio_change > 100, $sformatf("audio %0d %0d", n_audio_nonzero, n_audio_change));
    check(n_i2s_frames > 1000 && n_i2s_nonzero > 100, $sformatf("i2s %0d %0d", n_i2s_frames, n_i2s_nonzero));
    $display("frames %0d, islands %0d (audio %0d, ACR %0d, AVI %0d, AIF %0d), smoothed pixels %0d, i2s frames %0d",
             frames, n_islands, n_aud, n_acr, n_avi, n_aif, n_smoothed, n_i2s_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120ms;
    failures++;
    $display("watchdog: frames %0d exact %0d smooth %0d", frames, frames_exact, frames_smooth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
