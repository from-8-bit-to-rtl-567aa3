// hdmi_tx: HDMI period sequencer and the three TMDS data channels.
//
// From the raster position it decides, for every pixel clock, which HDMI
// period is on the link and what each channel encodes:
//   active video       ch0 = blue, ch1 = green, ch2 = red, 8b/10b coded;
//   video preamble     8 clocks before a visible line's guard band,
//                      CTL0..3 = 1,0,0,0;
//   video guard band   the last 2 clocks of the line before a visible line;
//   data island        on every line at DI_START: 8 clocks preamble
//                      (CTL0..3 = 1,0,1,0), 2 clocks guard band, two 32-clock
//                      packets (pkt0 then pkt1), 2 clocks guard band;
//   control            otherwise; ch0 carries {vsync, hsync}.
// In a data island channel 0 sends TERC4 {bit3, header bit, vsync, hsync},
// where bit3 is 0 only on the first packet clock of the island; channels 1
// and 2 send the subpacket nibbles. island_start pulses in the first
// preamble clock so that the packet picker can latch the two packets.
// Symbols are registered in the encoders: q0..q2 follow the inputs by one
// clock.
//
// From the document: the three periods (video, control, data island), the
// preamble and guard bands, TERC4 for data islands and the channel split of
// the HDMI specification, the module structure of the HDMI core (packet picker, packet
// assembler, TMDS channels, serializer). Own choices: island position and
// size (two packets per line) and the preamble placement.
module hdmi_tx
  import zx_pkg::*;
#(
  parameter int unsigned DI_START = H_ACTIVE + 4
) (
  input  logic         clk_pix,
  input  logic         rst,
  input  vid_timing_t  t,
  input  logic [23:0]  rgb,
  input  hdmi_packet_t pkt0,
  input  hdmi_packet_t pkt1,
  output logic         island_start,
  output logic [9:0]   q0,
  output logic [9:0]   q1,
  output logic [9:0]   q2
);
  localparam int unsigned DI_LEN = 8 + 2 + 64 + 2;

  logic       next_vis, vpre, vgb;
  logic [9:0] dk;
  logic       in_di, dpre, dgb, dpkt;
  logic [5:0] pk;           // packet clock 0..63
  hdmi_packet_t cur;
  logic       hdr_bit;
  logic [3:0] n1, n2;

  always_comb begin
    next_vis = (t.cy < 10'(V_ACTIVE - 1)) || (t.cy == 10'(V_TOTAL - 1));
    vgb  = next_vis && (t.cx >= 10'(H_TOTAL - 2));
    vpre = next_vis && (t.cx >= 10'(H_TOTAL - 10)) && (t.cx < 10'(H_TOTAL - 2));
    dk    = t.cx - 10'(DI_START);
    in_di = (t.cx >= 10'(DI_START)) && (dk < 10'(DI_LEN));
    dpre  = in_di && (dk < 10'd8);
    dgb   = in_di && ((dk == 10'd8) || (dk == 10'd9) || (dk >= 10'(DI_LEN - 2)));
    dpkt  = in_di && !dpre && !dgb;
    pk    = 6'(dk - 10'd10);
    cur   = pk[5] ? pkt1 : pkt0;
    island_start = (t.cx == 10'(DI_START));
  end

  hdmi_packet_assembler u_asm (
    .pkt(cur), .idx(pk[4:0]), .hdr_bit(hdr_bit), .ch1_nib(n1), .ch2_nib(n2)
  );

  tmds_mode_e m0, m12;
  logic [1:0] c0, c1, c2;
  logic [3:0] t0;
  always_comb begin
    c0  = {t.vs, t.hs};
    c1  = 2'b00;
    c2  = 2'b00;
    t0  = {1'b1, 1'b1, t.vs, t.hs};
    m0  = TM_CTRL;
    m12 = TM_CTRL;
    if (t.de) begin
      m0 = TM_VIDEO;  m12 = TM_VIDEO;
    end else if (vgb) begin
      m0 = TM_VGUARD; m12 = TM_VGUARD;
    end else if (vpre) begin
      c1 = 2'b01;                          // CTL0 = 1, CTL1 = 0
      c2 = 2'b00;                          // CTL2 = 0, CTL3 = 0
    end else if (dpre) begin
      c1 = 2'b01;                          // CTL0 = 1, CTL1 = 0
      c2 = 2'b01;                          // CTL2 = 1, CTL3 = 0
    end else if (dgb) begin
      m0 = TM_TERC4;  m12 = TM_DGUARD;
    end else if (dpkt) begin
      m0  = TM_TERC4; m12 = TM_TERC4;
      t0  = {pk != 6'd0, hdr_bit, t.vs, t.hs};
    end
  end

  tmds_encoder #(.CHANNEL(0)) u_ch0 (.clk_pix, .rst, .mode(m0),  .d(rgb[7:0]),   .c(c0), .t4(t0), .q(q0));
  tmds_encoder #(.CHANNEL(1)) u_ch1 (.clk_pix, .rst, .mode(m12), .d(rgb[15:8]),  .c(c1), .t4(n1), .q(q1));
  tmds_encoder #(.CHANNEL(2)) u_ch2 (.clk_pix, .rst, .mode(m12), .d(rgb[23:16]), .c(c2), .t4(n2), .q(q2));
endmodule
