// tb_hdmi_packet_picker: a FIFO model supplies numbered stereo samples at
// 48 kHz while islands are requested once per 800 clocks and frames start
// every 525 islands. Checks: audio packets carry every sample once and in
// order with the right sample_present bits and even parity; slot 1 sends
// AVI, then Audio InfoFrame after each frame start, and ACR every 32
// islands otherwise, with valid InfoFrame checksums and N/CTS fields.
//
// Expectations come from the HDMI rules (sample packet layout, IEC 60958
// parity and channel status, ACR N/CTS, InfoFrame checksums); the sample
// rate and line timing are the design's.
module tb_hdmi_packet_picker;
  import zx_pkg::*;
  logic clk = 0, rst = 1;
  logic frame_start = 0, island_start = 0, fifo_rd;
  hdmi_packet_t pkt0, pkt1;
  logic [31:0] last_sample;
  logic ev_audio, ev_acr, ev_avi, ev_aif;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  // FIFO model: a large array with free-running read and write counters
  logic [31:0] mem [4096];
  int wp = 0, rp = 0;
  logic fifo_empty;
  logic [31:0] fifo_rdata;
  assign fifo_empty = (wp == rp);
  assign fifo_rdata = mem[rp % 4096];
  always @(posedge clk) if (fifo_rd && !fifo_empty) rp <= rp + 1;

  hdmi_packet_picker dut (.clk_pix(clk), .rst, .frame_start, .island_start, .fifo_empty,
    .fifo_rdata, .fifo_rd, .pkt0, .pkt1, .last_sample, .ev_audio, .ev_acr, .ev_avi, .ev_aif);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] smp(input int n, input bit right);
    return right ? 16'(n * 3 + 1) : 16'(n * 7);
  endfunction

  int produced = 0, expect_n = 0, islands = 0, n_aud = 0, n_acr = 0, n_avi = 0, n_aif = 0;
  int since_frame = 0, since_acr = 0;
  // 48 kHz producer on the 25.16 MHz clock: 48000/25160000 per clock
  int acc = 0;
  always @(posedge clk) if (!rst) begin
    acc += 48000;
    if (acc >= 25160000) begin
      acc -= 25160000;
      mem[wp % 4096] <= {smp(produced, 0), smp(produced, 1)};
      wp <= wp + 1;
      produced++;
    end
  end

  function automatic bit checksum_ok(input hdmi_packet_t p);
    logic [7:0] s;
    s = p.hdr[7:0] + p.hdr[15:8] + p.hdr[23:16];
    for (int k = 0; k < 4; k++) for (int b = 0; b < 7; b++) s += p.sub[k][b*8 +: 8];
    return s == 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int line = 0; line < 1600; line++) begin
      if (line % 525 == 0) begin
        @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
        since_frame = 0;
      end
      repeat (790) @(posedge clk);
      @(negedge clk); island_start = 1; @(negedge clk); island_start = 0;
      @(posedge clk); #1;
      islands++;
      // ---- slot 0
      if (pkt0.hdr[7:0] == PKT_AUD) begin
        int np;
        np = $countones(pkt0.hdr[11:8]);
        n_aud++;
        check(np >= 1 && pkt0.hdr[11:8] == 4'((1 << np) - 1), "sample_present is a prefix");
        for (int k = 0; k < np; k++) begin
          check(pkt0.sub[k][23:8] == smp(expect_n, 0) && pkt0.sub[k][47:32] == smp(expect_n, 1),
                $sformatf("sample %0d order got %h", expect_n, pkt0.sub[k]));
          check(^pkt0.sub[k][23:0] == ^pkt0.sub[k][51:48] && ^pkt0.sub[k][47:24] == ^pkt0.sub[k][55:52],
                "parity even");
          expect_n++;
        end
      end else begin
        check(pkt0 == '0, "null packet in slot 0");
      end
      // ---- slot 1
      since_frame++;
      if (pkt1.hdr[7:0] == PKT_AVI) begin
        n_avi++;
        check(since_frame == 1 && checksum_ok(pkt1) && pkt1.hdr[23:8] == 16'h0D02, "AVI InfoFrame");
        check(pkt1.sub[0][39:32] == 8'd1, "VIC 1");
      end else if (pkt1.hdr[7:0] == PKT_AIF) begin
        n_aif++;
        check(since_frame == 2 && checksum_ok(pkt1) && pkt1.hdr[23:8] == 16'h0A01, "Audio InfoFrame");
      end else if (pkt1.hdr[7:0] == PKT_ACR) begin
        n_acr++;
        for (int k = 0; k < 4; k++)
          check({pkt1.sub[k][11:8], pkt1.sub[k][23:16], pkt1.sub[k][31:24]} == 20'd25160 &&
                {pkt1.sub[k][35:32], pkt1.sub[k][47:40], pkt1.sub[k][55:48]} == 20'd6144, "ACR N/CTS");
        check(since_acr <= 33, "ACR period");
        since_acr = 0;
      end else begin
        check(pkt1 == '0, "null packet in slot 1");
      end
      since_acr++;
    end
    check(n_avi == 4 && n_aif == 4, $sformatf("infoframes %0d %0d", n_avi, n_aif));
    check(n_acr >= 1600 / 33, $sformatf("acr packets %0d", n_acr));
    check(expect_n + (wp - rp) + 4 >= produced && expect_n > 2000, $sformatf("samples %0d of %0d", expect_n, produced));
    check(n_aud > 1000, "audio packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
