// tb_zx_palette: exhaustive check of the 16 Spectrum colours against the
// expected 24-bit values (0xD7 normal, 0xFF bright, red-green-blue order).
//
// The two levels are this design's palette choice.
module tb_zx_palette;
  import zx_pkg::*;
  zx_color_t   idx;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  zx_palette dut (.idx, .rgb);

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [7:0] l;
      logic [23:0] exp_rgb;
      idx = 4'(i);
      #1;
      l = (i >= 8) ? 8'd255 : 8'd215;
      exp_rgb = {((i & 2) != 0) ? l : 8'd0, ((i & 4) != 0) ? l : 8'd0, ((i & 1) != 0) ? l : 8'd0};
      checks++;
      if (rgb !== exp_rgb) begin
        failures++;
        $display("colour %0d: got %06h expected %06h", i, rgb, exp_rgb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
