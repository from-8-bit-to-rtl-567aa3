// tb_zx_pixel_fetch: a random 6912-byte screen in a one-cycle-latency RAM
// model; random pixel requests are checked against a reference decode of
// the Spectrum screen layout (interleaved bitmap rows, 32x24 attributes),
// including the 3-cycle latency and the FLASH swap after 16 frames.
//
// Addresses and colours are worked out from the Spectrum screen layout.
module tb_zx_pixel_fetch;
  import zx_pkg::*;
  logic clk = 0, rst = 1;
  logic frame_tick = 0, req = 0;
  logic [7:0] sx = 0, sy = 0;
  logic [12:0] mem_addr;
  logic [7:0]  mem_data;
  zx_color_t   pix;
  logic        pix_valid;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  zx_pixel_fetch dut (.clk_pix(clk), .rst, .frame_tick, .req, .sx, .sy,
                      .mem_addr, .mem_data, .pix, .pix_valid);

  logic [7:0] screen [8192];
  always_ff @(posedge clk) mem_data <= screen[mem_addr];

  function automatic zx_color_t ref_pix(input int x, input int y, input bit flash);
    int line_addr, attr;
    logic [7:0] b, at;
    bit on;
    // y = 64*third + 8*row_in_third + scanline
    line_addr = (y / 64) * 2048 + (y % 8) * 256 + ((y / 8) % 8) * 32 + x / 8;
    b  = screen[line_addr];
    at = screen[6144 + (y / 8) * 32 + x / 8];
    on = b[7 - (x % 8)];
    if (at[7] && flash) on = !on;
    return {at[6], on ? at[2:0] : at[5:3]};
  endfunction

  task automatic one(input int x, input int y, input bit flash);
    zx_color_t e;
    @(negedge clk); req = 1; sx = 8'(x); sy = 8'(y);
    @(negedge clk); req = 0;
    @(negedge clk);
    checks++;
    if (pix_valid) begin failures++; $display("valid too early"); end
    @(negedge clk);
    e = ref_pix(x, y, flash);
    checks++;
    if (!pix_valid || pix !== e) begin
      failures++;
      $display("(%0d,%0d) got %h v%0d expected %h", x, y, pix, pix_valid, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) screen[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) one($urandom_range(0, 255), $urandom_range(0, 191), 0);
    for (int f = 0; f < 16; f++) begin
      @(negedge clk); frame_tick = 1; @(negedge clk); frame_tick = 0;
    end
    for (int n = 0; n < 400; n++) one($urandom_range(0, 255), $urandom_range(0, 191), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
