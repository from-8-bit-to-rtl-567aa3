// video_timing: 640x480 @ 60 Hz raster generator.
//
// Two counters run on the pixel clock: cx over 800 clocks per line and cy
// over 525 lines per frame. Active video comes first in both (cx < 640,
// cy < 480), then front porch, sync and back porch (16/96/48 clocks,
// 10/2/33 lines, the standard DMT 640x480 timing). All outputs are decoded
// from the registered counters and change together, packed in a vid_timing_t. Syncs are
// active high here; the TMDS control period carries them as data. frame_start
// pulses for the first pixel of a frame.
//
// From the document: the video mode and its pixel clock. Own choice: the
// counter origin at the first active pixel and the synchronous reset.
module video_timing
  import zx_pkg::*;
(
  input  logic        clk_pix,
  input  logic        rst,
  output vid_timing_t t,
  output logic        frame_start
);
  logic [9:0] cx, cy;

  always_ff @(posedge clk_pix) begin
    if (rst) begin
      cx <= '0;
      cy <= '0;
    end else if (cx == 10'(H_TOTAL - 1)) begin
      cx <= '0;
      cy <= (cy == 10'(V_TOTAL - 1)) ? '0 : cy + 10'd1;
    end else begin
      cx <= cx + 10'd1;
    end
  end

  always_comb begin
    t.cx = cx;
    t.cy = cy;
    t.de = (cx < 10'(H_ACTIVE)) && (cy < 10'(V_ACTIVE));
    t.hs = (cx >= 10'(H_ACTIVE + H_FP)) && (cx < 10'(H_ACTIVE + H_FP + H_SYNC));
    t.vs = (cy >= 10'(V_ACTIVE + V_FP)) && (cy < 10'(V_ACTIVE + V_FP + V_SYNC));
    frame_start = (cx == '0) && (cy == '0);
  end
endmodule
