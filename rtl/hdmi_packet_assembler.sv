// hdmi_packet_assembler: turns one HDMI packet into data island nibbles.
//
// A packet is a 24-bit header and four 56-bit subpackets. Each part gets an
// 8-bit BCH parity byte (generator x^8 + x^7 + x^6 + 1, bits fed LSB first),
// giving a 32-bit header and four 64-bit subpackets. A packet lasts 32 pixel
// clocks; in clock i (0..31) it supplies
//   hdr_bit  = header bit i                         (TMDS channel 0, bit 2)
//   ch1_nib  = bit 2i   of subpackets 3,2,1,0        (TMDS channel 1)
//   ch2_nib  = bit 2i+1 of subpackets 3,2,1,0        (TMDS channel 2)
// The module is combinational; the packet must stay stable for the 32 clocks.
//
// From the document: a packet assembler between packet selection and the
// TMDS channels. Own (from the HDMI specification): the packet layout, BCH
// code and bit order.
module hdmi_packet_assembler
  import zx_pkg::*;
(
  input  hdmi_packet_t pkt,
  input  logic [4:0]   idx,
  output logic         hdr_bit,
  output logic [3:0]   ch1_nib,
  output logic [3:0]   ch2_nib
);
  function automatic logic [7:0] bch(input logic [55:0] data, input int unsigned nbits);
    logic [7:0] e;
    e = '0;
    for (int unsigned i = 0; i < 56; i++)
      if (i < nbits) e = (e >> 1) ^ ((e[0] ^ data[i]) ? 8'b1000_0011 : 8'h00);
    return e;
  endfunction

  logic [31:0]      hdr_full;
  logic [3:0][63:0] sub_full;

  always_comb begin
    hdr_full = {bch({32'h0, pkt.hdr}, 24), pkt.hdr};
    for (int s = 0; s < 4; s++)
      sub_full[s] = {bch(pkt.sub[s], 56), pkt.sub[s]};
    hdr_bit = hdr_full[idx];
    for (int s = 0; s < 4; s++) begin
      ch1_nib[s] = sub_full[s][{idx, 1'b0}];
      ch2_nib[s] = sub_full[s][{idx, 1'b1}];
    end
  end
endmodule
