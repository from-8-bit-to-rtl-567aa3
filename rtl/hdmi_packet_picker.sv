// hdmi_packet_picker: chooses and builds the packets of each data island.
//
// Every data island carries two packets, latched when island_start pulses
// and held until the next island:
//   pkt0  an Audio Sample packet with the 1..4 stereo samples collected
//         since the previous island, or a Null packet when none arrived;
//   pkt1  by priority: AVI InfoFrame and Audio InfoFrame once per frame
//         (flagged at frame_start), Audio Clock Regeneration (N, CTS) every
//         ACR_PERIOD islands, else a Null packet.
// Samples are popped from a show-ahead FIFO (rd strobe, data valid with
// !empty) into a 4-entry collector whenever it has room. A 16-bit sample is
// sent as the top 16 bits of the 24-bit IEC 60958 sample word; each sample
// carries the channel status bit of its frame (a 192-frame block stating
// 48 kHz), the block-start flag B and even parity. With one island per line
// (31.47 kHz) and 48 kHz audio, about 1.5 samples wait per island.
// last_sample holds the most recent popped sample for the I2S output.
// The ev_* outputs pulse when a packet of that type is latched.
//
// From the document: packet picking for audio samples and Audio Clock
// Regeneration, 48 kHz two-channel PCM, the HDMI core's place in the
// design. Own choices: the schedule, the InfoFrame contents (RGB, 4:3,
// VIC 1, two channels) and N = 6144 with CTS = f_pixel * N / (128 * 48000).
module hdmi_packet_picker
  import zx_pkg::*;
#(
  parameter int unsigned AUDIO_N    = 6144,
  parameter int unsigned AUDIO_CTS  = 25160,
  parameter int unsigned ACR_PERIOD = 32
) (
  input  logic         clk_pix,
  input  logic         rst,
  input  logic         frame_start,
  input  logic         island_start,
  input  logic         fifo_empty,
  input  logic [31:0]  fifo_rdata,   // {left[15:0], right[15:0]}
  output logic         fifo_rd,
  output hdmi_packet_t pkt0,
  output hdmi_packet_t pkt1,
  output logic [31:0]  last_sample,
  output logic         ev_audio,
  output logic         ev_acr,
  output logic         ev_avi,
  output logic         ev_aif
);
  // ------------------------------------------------------------ helpers
  function automatic hdmi_packet_t infoframe(input logic [7:0] hb0, input logic [7:0] hb1,
                                             input logic [7:0] hb2, input logic [13*8-1:0] pb);
    hdmi_packet_t p;
    logic [7:0]   sum;
    logic [7:0]   b [28];
    sum = hb0 + hb1 + hb2;
    for (int i = 0; i < 13; i++) sum = sum + pb[i*8 +: 8];
    for (int i = 0; i < 28; i++) b[i] = '0;
    b[0] = 8'(-sum);
    for (int i = 1; i <= 13; i++) b[i] = pb[(i-1)*8 +: 8];
    p.hdr = {hb2, hb1, hb0};
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 7; k++) p.sub[s][k*8 +: 8] = b[s*7 + k];
    return p;
  endfunction

  function automatic hdmi_packet_t acr_packet();
    hdmi_packet_t p;
    logic [19:0] n, cts;
    n   = 20'(AUDIO_N);
    cts = 20'(AUDIO_CTS);
    p.hdr = {8'h00, 8'h00, PKT_ACR};
    for (int s = 0; s < 4; s++)
      p.sub[s] = {n[7:0], n[15:8], {4'h0, n[19:16]}, cts[7:0], cts[15:8], {4'h0, cts[19:16]}, 8'h00};
    return p;
  endfunction

  // IEC 60958 channel status: only bit 25 set (sampling frequency 48 kHz).
  function automatic logic cs_bit(input logic [7:0] frame);
    return frame == 8'd25;
  endfunction

  localparam hdmi_packet_t NULL_PKT = '0;

  // ------------------------------------------------------------ collector
  logic [3:0][31:0] buf_s;
  logic [2:0]       nbuf;
  logic [7:0]       fcnt;            // IEC 60958 frame number 0..191
  logic             avi_due, aif_due, acr_due;
  logic [$clog2(ACR_PERIOD+1)-1:0] acr_cnt;

  assign fifo_rd = !fifo_empty && (nbuf < 3'd4) && !island_start && !rst;

  // Audio Sample packet from the first n collector entries, the first of
  // which is IEC 60958 frame number f0.
  function automatic hdmi_packet_t audio_packet(input logic [3:0][31:0] smp,
                                                input logic [2:0] n, input logic [7:0] f0);
    hdmi_packet_t p;
    logic [7:0]   fr;
    logic [23:0]  sl, sr;
    logic         cb;
    p     = '0;
    p.hdr = {8'h00, 8'h00, PKT_AUD};
    for (int k = 0; k < 4; k++) begin
      fr = 8'((32'(f0) + 32'(k)) % 192);
      sl = {smp[k][31:16], 8'h00};
      sr = {smp[k][15:0], 8'h00};
      cb = cs_bit(fr);
      if (3'(k) < n) begin
        p.hdr[8 + k]  = 1'b1;                 // sample_present.spk
        p.hdr[20 + k] = (fr == 8'd0);         // B.k, start of a 192-frame block
        p.sub[k] = {^{sr, cb}, cb, 1'b0, 1'b0,     // P_R C_R U_R V_R
                    ^{sl, cb}, cb, 1'b0, 1'b0,     // P_L C_L U_L V_L
                    sr, sl};
      end
    end
    return p;
  endfunction

  hdmi_packet_t aud;
  assign aud = audio_packet(buf_s, nbuf, fcnt);

  always_ff @(posedge clk_pix) begin
    if (rst) begin
      nbuf        <= '0;
      buf_s       <= '0;
      fcnt        <= '0;
      avi_due     <= 1'b1;
      aif_due     <= 1'b1;
      acr_due     <= 1'b1;
      acr_cnt     <= '0;
      pkt0        <= NULL_PKT;
      pkt1        <= NULL_PKT;
      last_sample <= '0;
      {ev_audio, ev_acr, ev_avi, ev_aif} <= '0;
    end else begin
      {ev_audio, ev_acr, ev_avi, ev_aif} <= '0;
      if (frame_start) begin
        avi_due <= 1'b1;
        aif_due <= 1'b1;
      end
      if (fifo_rd) begin
        buf_s[nbuf[1:0]] <= fifo_rdata;
        nbuf             <= nbuf + 3'd1;
        last_sample      <= fifo_rdata;
      end
      if (island_start) begin
        // slot 0: audio
        if (nbuf != '0) begin
          pkt0     <= aud;
          ev_audio <= 1'b1;
          fcnt     <= 8'((32'(fcnt) + 32'(nbuf)) % 192);
        end else begin
          pkt0 <= NULL_PKT;
        end
        nbuf <= '0;
        // slot 1: InfoFrames, clock regeneration
        if (acr_cnt == ($bits(acr_cnt))'(ACR_PERIOD - 1)) begin
          acr_cnt <= '0;
          acr_due <= 1'b1;
        end else begin
          acr_cnt <= acr_cnt + 1'b1;
        end
        if (avi_due) begin
          pkt1    <= infoframe(PKT_AVI, 8'h02, 8'h0D, {64'h0, 8'h00, 8'h01, 8'h00, 8'h18, 8'h00});
          avi_due <= 1'b0;
          ev_avi  <= 1'b1;
        end else if (aif_due) begin
          pkt1    <= infoframe(PKT_AIF, 8'h01, 8'h0A, {64'h0, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01});
          aif_due <= 1'b0;
          ev_aif  <= 1'b1;
        end else if (acr_due) begin
          pkt1    <= acr_packet();
          acr_due <= 1'b0;
          ev_acr  <= 1'b1;
        end else begin
          pkt1 <= NULL_PKT;
        end
      end
    end
  end
endmodule
