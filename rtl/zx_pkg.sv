// zx_pkg: types and constants shared by the ZX Spectrum HDMI add-on.
//
// zx_color_t is the 4-bit Spectrum colour used on the whole scaled video
// path: {bright, green, red, blue}, the same bit meaning as a Spectrum
// attribute's ink or paper field plus its BRIGHT bit. vid_timing_t bundles
// the raster position and sync/enable of one pixel clock so that the video
// pipeline can delay them as one value. The TMDS enums select what a TMDS
// channel sends in a given pixel clock (HDMI periods).
//
// The 640x480 constants are the VESA values for the mode the design uses;
// the colour type follows the Spectrum's {bright, g, r, b} attribute bits;
// the packet struct follows the HDMI data island packet (3 header bytes,
// four 7-byte subpackets). The names and grouping are this design's own.
package zx_pkg;

  typedef logic [3:0] zx_color_t;   // {bright, g, r, b}

  typedef struct packed {
    logic [9:0] cx;     // column, 0..H_TOTAL-1 (active first)
    logic [9:0] cy;     // line,   0..V_TOTAL-1 (active first)
    logic       hs;     // horizontal sync, active high inside the design
    logic       vs;     // vertical sync, active high inside the design
    logic       de;     // active video
  } vid_timing_t;

  // What one TMDS channel encodes in a pixel clock.
  typedef enum logic [2:0] {
    TM_CTRL   = 3'd0,   // control period, 2 control bits
    TM_VIDEO  = 3'd1,   // 8b/10b video data with DC balancing
    TM_TERC4  = 3'd2,   // data island payload, 4 bits
    TM_VGUARD = 3'd3,   // video leading guard band
    TM_DGUARD = 3'd4    // data island guard band (channels 1 and 2)
  } tmds_mode_e;

  // 640x480 @ 60 Hz raster (pixel clock about 25.16 MHz).
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FP     = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_TOTAL  = 800;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FP     = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_TOTAL  = 525;

  // HDMI packet types used by the packet picker.
  localparam logic [7:0] PKT_NULL = 8'h00;
  localparam logic [7:0] PKT_ACR  = 8'h01;
  localparam logic [7:0] PKT_AUD  = 8'h02;
  localparam logic [7:0] PKT_AVI  = 8'h82;
  localparam logic [7:0] PKT_AIF  = 8'h84;

  typedef struct packed {
    logic [23:0]      hdr;   // HB2, HB1, HB0 (HB0 in bits 7:0)
    logic [3:0][55:0] sub;   // four subpackets, SB0 in bits 7:0 of each
  } hdmi_packet_t;

endpackage
