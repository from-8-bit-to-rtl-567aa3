// zx_pixel_fetch: reads one Spectrum pixel from the shadow screen memory.
//
// A request names a source pixel (sx 0..255, sy 0..191). The module reads
// the bitmap byte at the Spectrum's interleaved address
// {sy[7:6], sy[2:0], sy[5:3], sx[7:3]} and then the attribute byte at
// 0x1800 + 32*(sy/8) + sx/8 through the one read port of the shadow RAM
// (one cycle latency). The pixel bit selects ink or paper of the attribute;
// a set FLASH bit swaps them while the flash phase is on. The phase toggles
// every FLASH_FRAMES frames. The result is a zx_color_t {bright, g, r, b}.
//
// Timing: req in cycle 0 (the bitmap address is driven combinationally from
// sx/sy in that cycle), attribute address in cycle 1, pix and pix_valid
// registered in cycle 3. A new request may follow every third cycle; the
// scaler issues one every fourth.
//
// From the document: two memory reads per pixel (bitmap and attribute),
// ink/paper/bright/flash interpretation. Own choices: the flash period (the
// Spectrum's usual 16 frames) and the read order.
module zx_pixel_fetch
  import zx_pkg::*;
#(
  parameter int unsigned FLASH_FRAMES = 16
) (
  input  logic        clk_pix,
  input  logic        rst,
  input  logic        frame_tick,   // one pulse per video frame
  input  logic        req,
  input  logic [7:0]  sx,
  input  logic [7:0]  sy,
  output logic [12:0] mem_addr,
  input  logic [7:0]  mem_data,
  output zx_color_t   pix,
  output logic        pix_valid
);
  logic [7:0] sx_q, sy_q, bitmap;
  logic [1:0] stage;            // bit 0: bitmap data on the bus, bit 1: attribute data
  logic       flash_phase;
  logic [$clog2(FLASH_FRAMES+1)-1:0] frame_cnt;

  always_comb begin
    if (req) mem_addr = {sy[7:6], sy[2:0], sy[5:3], sx[7:3]};
    else     mem_addr = 13'h1800 + {3'b000, sy_q[7:3], sx_q[7:3]};
  end

  logic       pbit, ink_sel;
  always_comb begin
    pbit    = bitmap[3'd7 - sx_q[2:0]];
    ink_sel = pbit ^ (mem_data[7] & flash_phase);
  end

  always_ff @(posedge clk_pix) begin
    if (rst) begin
      stage       <= '0;
      pix_valid   <= 1'b0;
      flash_phase <= 1'b0;
      frame_cnt   <= '0;
      pix         <= '0;
      sx_q        <= '0;
      sy_q        <= '0;
      bitmap      <= '0;
    end else begin
      stage     <= {stage[0], req};
      pix_valid <= stage[1];
      if (req) begin
        sx_q <= sx;
        sy_q <= sy;
      end
      if (stage[0]) bitmap <= mem_data;
      if (stage[1]) pix <= {mem_data[6], ink_sel ? mem_data[2:0] : mem_data[5:3]};
      if (frame_tick) begin
        if (frame_cnt == ($bits(frame_cnt))'(FLASH_FRAMES - 1)) begin
          frame_cnt   <= '0;
          flash_phase <= ~flash_phase;
        end else begin
          frame_cnt <= frame_cnt + 1'b1;
        end
      end
    end
  end
endmodule
