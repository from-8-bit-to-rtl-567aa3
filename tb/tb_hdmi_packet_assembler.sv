// tb_hdmi_packet_assembler: random packets are sliced over the 32 packet
// clocks; the testbench reassembles header and subpackets from the channel
// bits and checks the data and the BCH parity bytes, the latter computed
// here by polynomial long division over GF(2) (x^8 + x^7 + x^6 + 1,
// reflected bit order), and that the parity of a codeword is zero.
//
// Parity is recomputed here by polynomial division, independently of the
// RTL's loop; the slot layout is the HDMI one.
module tb_hdmi_packet_assembler;
  import zx_pkg::*;
  hdmi_packet_t pkt;
  logic [4:0] idx;
  logic hdr_bit;
  logic [3:0] ch1_nib, ch2_nib;
  int checks = 0, failures = 0;
  hdmi_packet_assembler dut (.pkt, .idx, .hdr_bit, .ch1_nib, .ch2_nib);

  // remainder of m(x) * x^8 / g(x) with the first-sent bit as highest power,
  // returned in the transmission bit order
  function automatic logic [7:0] bch_div(input logic [55:0] data, input int n);
    logic [63:0] poly;
    logic [8:0]  g;
    logic [7:0]  rem, out;
    g = 9'b1_1100_0001;            // x^8 + x^7 + x^6 + 1
    poly = '0;
    for (int i = 0; i < n; i++) poly[n + 7 - i] = data[i];
    for (int i = n + 7; i >= 8; i--)
      if (poly[i]) poly[i -: 9] = poly[i -: 9] ^ g;
    rem = poly[7:0];
    for (int i = 0; i < 8; i++) out[i] = rem[7 - i];
    return out;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [31:0] h;
      logic [3:0][63:0] s;
      pkt.hdr = 24'($urandom);
      for (int k = 0; k < 4; k++) pkt.sub[k] = {24'($urandom), 32'($urandom)};
      if (n == 0) pkt = '0;
      for (int i = 0; i < 32; i++) begin
        idx = 5'(i);
        #1;
        h[i] = hdr_bit;
        for (int k = 0; k < 4; k++) begin
          s[k][2*i]   = ch1_nib[k];
          s[k][2*i+1] = ch2_nib[k];
        end
      end
      checks++;
      if (h[23:0] != pkt.hdr || h[31:24] != bch_div({32'h0, pkt.hdr}, 24)) begin
        failures++;
        $display("header %h ecc %h expected %h", h[23:0], h[31:24], bch_div({32'h0, pkt.hdr}, 24));
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (s[k][55:0] != pkt.sub[k] || s[k][63:56] != bch_div(pkt.sub[k], 56)) begin
          failures++;
          $display("subpacket %0d ecc %h expected %h", k, s[k][63:56], bch_div(pkt.sub[k], 56));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
