// tb_video_timing: runs two 640x480 frames and checks the raster: 307200
// active pixels and 525 hsync pulses of 96 clocks per frame, a 2-line vsync,
// a frame period of 800*525 clocks, and the sync positions.
//
// Expected counts are the VESA 640x480 timing the design uses.
module tb_video_timing;
  import zx_pkg::*;
  logic clk = 0, rst = 1;
  vid_timing_t t;
  logic frame_start;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;
  video_timing dut (.clk_pix(clk), .rst, .t, .frame_start);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc, last_frame, de_cnt, hs_cnt, hs_len, vs_lines, frames;
  logic hs_q, vs_q;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    frames = 0; last_frame = -1; cyc = 0;
    de_cnt = 0; hs_cnt = 0; hs_len = 0; vs_lines = 0; hs_q = 0; vs_q = 0;
    while (frames < 3) begin
      @(posedge clk); #1;
      cyc++;
      if (frame_start) begin
        if (last_frame >= 0) begin
          check(cyc - last_frame == 800 * 525, "frame period");
          check(de_cnt == 640 * 480, $sformatf("active pixels %0d", de_cnt));
          check(hs_cnt == 525, $sformatf("hsync pulses %0d", hs_cnt));
          check(vs_lines == 2 * 800, $sformatf("vsync clocks %0d", vs_lines));
        end
        last_frame = cyc; frames++;
        de_cnt = 0; hs_cnt = 0; vs_lines = 0;
        check(t.cx == 0 && t.cy == 0 && t.de, "frame start at origin");
      end
      if (t.de) de_cnt++;
      if (t.vs) vs_lines++;
      if (t.hs && !hs_q) begin
        hs_cnt++;
        check(t.cx == 656, $sformatf("hsync start at %0d", t.cx));
        hs_len = 0;
      end
      if (t.hs) hs_len++;
      if (!t.hs && hs_q) check(hs_len == 96, "hsync width");
      if (t.vs && !vs_q) check(t.cy == 490 && t.cx == 0, "vsync start line");
      hs_q = t.hs; vs_q = t.vs;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 800 * 525) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
