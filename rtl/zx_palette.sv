// zx_palette: Spectrum colour to 24-bit RGB.
//
// Purely combinational. Each of the green, red and blue bits of the 4-bit
// colour {bright, g, r, b} turns its 8-bit channel on at 0xD7 (normal) or
// 0xFF (BRIGHT set); a clear bit gives 0. Output order is rgb[23:16] red,
// rgb[15:8] green, rgb[7:0] blue.
//
// From the document: a lookup from the Spectrum's colour and brightness bits
// to rgb[23:0]. Own choice: the two channel levels, which are the ones
// commonly used for the Spectrum palette.
module zx_palette
  import zx_pkg::*;
(
  input  zx_color_t   idx,
  output logic [23:0] rgb
);
  logic [7:0] lvl;
  always_comb begin
    lvl = idx[3] ? 8'hFF : 8'hD7;
    rgb = {idx[1] ? lvl : 8'h00, idx[2] ? lvl : 8'h00, idx[0] ? lvl : 8'h00};
  end
endmodule
