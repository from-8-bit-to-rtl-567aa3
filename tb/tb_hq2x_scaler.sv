// tb_hq2x_scaler: the scaler runs on the full 640x480 raster from
// video_timing. A fetch model answers each source-pixel request three
// clocks later from a test picture (diagonal stripes, solid areas and
// random pixels). The testbench computes the expected 512x384 picture with
// its own model of the smoothing rule and checks every output pixel, the
// border colour around the picture and the two-clock delay of the timing.
// Frame 1 runs with smoothing on, frame 2 with plain pixel doubling.
module tb_hq2x_scaler;
  import zx_pkg::*;
  logic clk = 0, rst = 1, hq2x_en = 1;
  zx_color_t border = 4'h5;
  vid_timing_t t, t_out;
  logic frame_start;
  logic fetch_req, smooth_event;
  logic [7:0] fetch_sx, fetch_sy;
  zx_color_t fetch_pix, pix_out;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  video_timing u_t (.clk_pix(clk), .rst, .t, .frame_start);
  hq2x_scaler dut (.clk_pix(clk), .rst, .hq2x_en, .border, .t_in(t), .fetch_req, .fetch_sx,
    .fetch_sy, .fetch_pix, .t_out, .pix_out, .smooth_event);

  zx_color_t src [192][256];
  zx_color_t p1, p2;
  always @(posedge clk) begin
    p1 <= fetch_req ? src[fetch_sy][fetch_sx] : 4'hx;
    p2 <= p1;
    fetch_pix <= p2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- reference model of the scaler
  function automatic int level(input zx_color_t c, input int ch);
    return c[ch] ? (c[3] ? 3 : 2) : 0;
  endfunction
  function automatic bit sim(input zx_color_t a, input zx_color_t b);
    int s = 0;
    for (int ch = 0; ch < 3; ch++) begin
      int d = level(a, ch) - level(b, ch);
      s += (d < 0) ? -d : d;
    end
    return a == b || s <= 1;
  endfunction
  function automatic zx_color_t px(input int x, input int y);
    if (x < 0) x = 0;
    if (x > 255) x = 255;
    if (y < 0) y = 0;
    if (y > 191) y = 191;
    return src[y][x];
  endfunction
  function automatic zx_color_t expect_pix(input int ox, input int oy, input bit smooth);
    int x = ox / 2, y = oy / 2;
    zx_color_t p, n, s, e, wv;
    bit dn, ds, de_, dw;
    p = px(x, y); n = px(x, y - 1); s = px(x, y + 1); wv = px(x - 1, y); e = px(x + 1, y);
    dn = !sim(n, p); ds = !sim(s, p); dw = !sim(wv, p); de_ = !sim(e, p);
    if (!smooth) return p;
    case ({oy % 2 == 1, ox % 2 == 1})
      2'b00: return (dn && dw && !de_ && !ds && sim(n, wv)) ? n : p;
      2'b01: return (dn && de_ && !dw && !ds && sim(n, e)) ? n : p;
      2'b10: return (ds && dw && !dn && !de_ && sim(s, wv)) ? s : p;
      default: return (ds && de_ && !dn && !dw && sim(s, e)) ? s : p;
    endcase
  endfunction

  vid_timing_t th1, th2;
  int n_smooth_ev = 0, n_smoothed_px = 0, n_area = 0, n_border = 0;
  always @(posedge clk) if (smooth_event) n_smooth_ev++;

  initial begin
    for (int y = 0; y < 192; y++)
      for (int x = 0; x < 256; x++) begin
        if (y < 64)       src[y][x] = (((x + y) / 6) % 2) ? 4'h2 : 4'h7;     // diagonal stripes
        else if (y < 128) src[y][x] = (((x - y + 512) / 5) % 2) ? 4'hC : 4'h1;
        else if (y < 160) src[y][x] = 4'($urandom);
        else              src[y][x] = (x < 100) ? 4'h0 : 4'h8;               // black vs bright black
      end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) hq2x_en = (f == 0);
      for (int i = 0; i < 420000; i++) begin
        th2 = th1; th1 = t;
        @(posedge clk); #1;
        if (f > 0 || i > 2) begin
          check(t_out == th2, "timing delay");
          if (t_out.de) begin
            int ox, oy;
            ox = int'(t_out.cx) - 64;
            oy = int'(t_out.cy) - 48;
            if (ox >= 0 && ox < 512 && oy >= 0 && oy < 384) begin
              zx_color_t e;
              e = expect_pix(ox, oy, f == 0);
              n_area++;
              if (e != px(ox / 2, oy / 2)) n_smoothed_px++;
              check(pix_out == e, $sformatf("frame %0d pixel %0d,%0d got %h want %h", f, ox, oy, pix_out, e));
            end else begin
              n_border++;
              check(pix_out == border, "border");
            end
          end
        end
      end
    end
    check(n_area == 2 * 512 * 384 && n_border == 2 * (640 * 480 - 512 * 384) - 3, "area counts");
    check(n_smoothed_px > 1000 && n_smooth_ev > 0, $sformatf("smoothing %0d %0d", n_smoothed_px, n_smooth_ev));
    $display("smoothed output pixels %0d, smooth events %0d", n_smoothed_px, n_smooth_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
