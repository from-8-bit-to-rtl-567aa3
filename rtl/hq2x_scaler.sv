// hq2x_scaler: 2x upscaler (hq2x-style smoothing or pixel doubling) for the
// 256x192 Spectrum picture inside the 640x480 frame.
//
// The scaled picture (512x384) is centred: it starts at column H_OFF and
// line V_OFF. Source row k is shown on output lines V_OFF+2k and V_OFF+2k+1.
// Work is organised in line pairs. Pair L starts at the first pixel of line
// V_OFF-4+2L (L = 0..SRC_H). During pair L the scaler
//   * streams source row L from the shadow screen (one pixel fetch every 4
//     pixel clocks) and stores it in the 2-line input buffer inbuf, and
//   * computes output row L-1 from the 3x3 neighbourhoods made of rows L-2
//     and L-1 (read back from inbuf) and the row L pixels arriving now, and
//     writes its four output pixels per source pixel into one half of the
//     4-line output buffer outbuf.
// The other half of outbuf is being displayed at the same time (row L-2),
// so the two halves alternate. A run lasts (SRC_W+2)*4 = 1032 clocks, less
// than the 1600 clocks of a line pair.
//
// Neighbourhood window (w4 = P, the centre):
//     w0 w1 w2
//     w3 w4 w5
//     w6 w7 w8
// Each neighbour is compared with P; the "different" flags form an 8-bit
// pattern index into the 256-entry table hq_table, whose entry says which of
// the four output corners are smoothed. A smoothed corner takes the colour
// of the two edge neighbours that meet at it (w1/w3 top left, w1/w5 top
// right, w7/w3 bottom left, w7/w5 bottom right) when those two are similar to
// each other; any other corner repeats P. With hq2x_en low all corners repeat
// P, which is plain pixel doubling. Image edges repeat the border pixels.
//
// Colour similarity: each channel is expanded to a level (0 off, 2 on,
// 3 on and bright) and two colours are similar when the sum of the absolute
// channel differences is at most SIM_THRESH.
//
// Output: t_out and pix_out are t_in and the output colour delayed by two
// clocks (one for the outbuf read, one register). Outside the picture the
// border colour is sent.
//
// From the document: 2x scaling at a 4-bit colour depth ({bright,g,r,b}),
// a 2-line inbuf (512 entries), a 4-line outbuf (2048 entries), a 256-entry
// pattern table, one source pixel per 4 pixel clocks, a run-time switch
// between hq2x and pixel doubling, an RGB-space difference metric instead of
// YUV. Own choices: the table contents (an edge rule of the Scale2x kind
// expressed as 4 corner bits per entry, not the published hq2x blend table,
// because blends cannot be shown in 4-bit colour anyway), the pair schedule,
// the similarity levels and the border colour.
module hq2x_scaler
  import zx_pkg::*;
#(
  parameter int unsigned SRC_W      = 256,
  parameter int unsigned SRC_H      = 192,
  parameter int unsigned H_OFF      = 64,
  parameter int unsigned V_OFF      = 48,
  parameter int unsigned SIM_THRESH = 1
) (
  input  logic        clk_pix,
  input  logic        rst,
  input  logic        hq2x_en,
  input  zx_color_t   border,
  input  vid_timing_t t_in,
  // source pixel fetch
  output logic        fetch_req,
  output logic [7:0]  fetch_sx,
  output logic [7:0]  fetch_sy,
  input  zx_color_t   fetch_pix,
  // scaled output
  output vid_timing_t t_out,
  output zx_color_t   pix_out,
  output logic        smooth_event   // a smoothed corner was written
);
  localparam int unsigned XW = $clog2(SRC_W);
  localparam int unsigned JW = $clog2(SRC_W + 2);
  localparam int unsigned LW = $clog2(SRC_H + 1);

  // ---------------------------------------------------------------- tables
  function automatic logic [3:0] corner_rule(input logic [7:0] idx);
    logic d1, d3, d5, d7;
    d1 = idx[1]; d3 = idx[3]; d5 = idx[4]; d7 = idx[6];
    return {d7 & d5 & !d1 & !d3,    // bottom right
            d7 & d3 & !d1 & !d5,    // bottom left
            d1 & d5 & !d3 & !d7,    // top right
            d1 & d3 & !d5 & !d7};   // top left
  endfunction

  logic [3:0] hq_table [256];
  initial begin
    for (int i = 0; i < 256; i++) hq_table[i] = corner_rule(8'(i));
  end

  function automatic logic [1:0] lvl(input logic on, input logic br);
    return on ? (br ? 2'd3 : 2'd2) : 2'd0;
  endfunction

  function automatic logic [1:0] adiff(input logic [1:0] a, input logic [1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic logic similar(input zx_color_t a, input zx_color_t b);
    logic [3:0] sad;
    sad = 4'(adiff(lvl(a[2], a[3]), lvl(b[2], b[3])))
        + 4'(adiff(lvl(a[1], a[3]), lvl(b[1], b[3])))
        + 4'(adiff(lvl(a[0], a[3]), lvl(b[0], b[3])));
    return (a == b) || (sad <= 4'(SIM_THRESH));
  endfunction

  // ---------------------------------------------------------------- buffers
  zx_color_t inbuf  [2*SRC_W];
  zx_color_t outbuf [8*SRC_W];

  // ---------------------------------------------------------------- sequencer
  logic          run;
  logic [LW-1:0] pair;        // L
  logic [JW-1:0] slot;        // j
  logic [1:0]    ph;

  logic [9:0] rel;
  logic       start;
  assign rel   = t_in.cy - 10'(V_OFF - 4);
  assign start = (t_in.cx == '0) && (t_in.cy >= 10'(V_OFF - 4))
              && (rel < 10'(2 * (SRC_H + 1))) && !rel[0];

  always_ff @(posedge clk_pix) begin
    if (rst) begin
      run  <= 1'b0;
      pair <= '0;
      slot <= '0;
      ph   <= '0;
    end else if (start) begin
      run  <= 1'b1;
      pair <= LW'(rel[9:1]);
      slot <= '0;
      ph   <= '0;
    end else if (run) begin
      ph <= ph + 2'd1;
      if (ph == 2'd3) begin
        if (slot == JW'(SRC_W + 1)) run <= 1'b0;
        slot <= slot + 1'b1;
      end
    end
  end

  logic stream_ok;   // row `pair` exists in the source
  logic col_ok;      // slot is a real source column
  assign stream_ok = pair < LW'(SRC_H);
  assign col_ok    = slot < JW'(SRC_W);

  assign fetch_req = run && (ph == 2'd0) && col_ok && stream_ok;
  assign fetch_sx  = 8'(slot);
  assign fetch_sy  = 8'(pair);

  // ---------------------------------------------------------------- inbuf
  logic [XW:0] in_raddr;
  zx_color_t   in_q, mid_new, top_new;
  assign in_raddr = (ph == 2'd0) ? {~pair[0], XW'(slot)} : {pair[0], XW'(slot)};

  always_ff @(posedge clk_pix) begin
    in_q <= inbuf[in_raddr];
    if (run && ph == 2'd1) mid_new <= in_q;      // row L-1
    if (run && ph == 2'd2) top_new <= in_q;      // row L-2
    if (run && ph == 2'd3 && col_ok && stream_ok)
      inbuf[{pair[0], XW'(slot)}] <= fetch_pix;  // row L
  end

  // ---------------------------------------------------------------- window
  zx_color_t w [9];
  zx_color_t col_top, col_bot;
  logic      first_row, last_row;
  assign first_row = (pair == LW'(1));
  assign last_row  = (pair == LW'(SRC_H));
  assign col_top   = first_row ? mid_new : top_new;
  assign col_bot   = last_row  ? mid_new : fetch_pix;

  always_ff @(posedge clk_pix) begin
    if (run && ph == 2'd3) begin
      if (slot == '0) begin
        w[0] <= col_top; w[1] <= col_top; w[2] <= col_top;
        w[3] <= mid_new; w[4] <= mid_new; w[5] <= mid_new;
        w[6] <= col_bot; w[7] <= col_bot; w[8] <= col_bot;
      end else begin
        w[0] <= w[1]; w[3] <= w[4]; w[6] <= w[7];
        w[1] <= w[2]; w[4] <= w[5]; w[7] <= w[8];
        if (col_ok) begin
          w[2] <= col_top; w[5] <= mid_new; w[8] <= col_bot;
        end
      end
    end
  end

  // ---------------------------------------------------------------- corners
  logic [7:0] pat;
  logic [3:0] flags;
  zx_color_t  corner [4];
  always_comb begin
    pat = {!similar(w[8], w[4]), !similar(w[7], w[4]), !similar(w[6], w[4]),
           !similar(w[5], w[4]), !similar(w[3], w[4]), !similar(w[2], w[4]),
           !similar(w[1], w[4]), !similar(w[0], w[4])};
    flags = hq2x_en ? hq_table[pat] : 4'b0000;
    corner[0] = (flags[0] && similar(w[1], w[3])) ? w[1] : w[4];
    corner[1] = (flags[1] && similar(w[1], w[5])) ? w[1] : w[4];
    corner[2] = (flags[2] && similar(w[7], w[3])) ? w[7] : w[4];
    corner[3] = (flags[3] && similar(w[7], w[5])) ? w[7] : w[4];
  end

  logic          wr_en;
  logic [LW-1:0] crow;       // output row being computed, L-1
  logic [XW-1:0] cx_src;     // its source column, j-2
  assign crow   = pair - 1'b1;
  assign cx_src = XW'(slot - JW'(2));
  assign wr_en  = run && (slot >= JW'(2)) && (pair != '0) && (pair <= LW'(SRC_H));

  always_ff @(posedge clk_pix) begin
    if (wr_en) outbuf[{crow[0], ph[1], cx_src, ph[0]}] <= corner[ph];
  end

  always_ff @(posedge clk_pix) begin
    if (rst) smooth_event <= 1'b0;
    else     smooth_event <= wr_en && (corner[ph] != w[4]);
  end

  // ---------------------------------------------------------------- display
  logic [9:0] ox, oy;
  logic       in_area;
  assign ox = t_in.cx - 10'(H_OFF);
  assign oy = t_in.cy - 10'(V_OFF);
  assign in_area = (t_in.cx >= 10'(H_OFF)) && (t_in.cx < 10'(H_OFF + 2*SRC_W))
                && (t_in.cy >= 10'(V_OFF)) && (t_in.cy < 10'(V_OFF + 2*SRC_H));

  zx_color_t   out_q;
  vid_timing_t t1;
  logic        area1;
  always_ff @(posedge clk_pix) begin
    out_q   <= outbuf[{oy[1], oy[0], ox[XW:0]}];
    t1      <= t_in;
    area1   <= in_area;
    t_out   <= t1;
    pix_out <= area1 ? out_q : border;
  end
endmodule
