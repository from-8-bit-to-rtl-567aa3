// ula_port_snoop: copies the Spectrum's port 0xFE state for the add-on.
//
// Every I/O write with A0 = 0 goes to the computer's port 0xFE. The add-on
// listens to it: data bit 4 is the beeper (sent to the audio mixer) and bits
// 2..0 the border colour (drawn around the scaled picture). Sampled on rising
// Z80 clock edges while IORQ and WR are low.
//
// From the document: the beeper at bit 4 of 0xXXFE writes. Own choice:
// capturing the border colour from the same write.
module ula_port_snoop (
  input  logic        clk,          // Z80 clock
  input  logic        rst,
  input  logic [15:0] zx_a,
  input  logic [7:0]  zx_d,
  input  logic        zx_iorq_n,
  input  logic        zx_wr_n,
  input  logic        zx_m1_n,
  output logic        beeper,
  output logic [2:0]  border
);
  always_ff @(posedge clk) begin
    if (rst) begin
      beeper <= 1'b0;
      border <= 3'd0;
    end else if (!zx_iorq_n && zx_m1_n && !zx_wr_n && !zx_a[0]) begin
      beeper <= zx_d[4];
      border <= zx_d[2:0];
    end
  end
endmodule
