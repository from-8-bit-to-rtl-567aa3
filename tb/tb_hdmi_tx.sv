// tb_hdmi_tx: video_timing drives the sequencer with a pattern picture and
// fresh random packets at every island. The testbench decodes every symbol
// of the three channels for two frames and checks it against its own model
// of the line: video pixels, control periods with sync, video preambles and
// guard bands before visible lines, and data islands (preamble, guard bands,
// TERC4 symbols). From the TERC4 symbols it rebuilds both packets of each
// island, including their BCH parity bytes, and compares them.
module tb_hdmi_tx;
  import zx_pkg::*;
  logic clk = 0, rst = 1;
  vid_timing_t t;
  logic frame_start, island_start;
  logic [23:0] rgb;
  hdmi_packet_t pkt0, pkt1;
  logic [9:0] q0, q1, q2;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  video_timing u_t (.clk_pix(clk), .rst, .t, .frame_start);
  hdmi_tx dut (.clk_pix(clk), .rst, .t, .rgb, .pkt0, .pkt1, .island_start, .q0, .q1, .q2);

  assign rgb = {t.cx[7:0] ^ 8'h5A, t.cy[7:0], t.cx[9:2] + t.cy[7:0]};

  function automatic hdmi_packet_t rnd_pkt();
    hdmi_packet_t p;
    p.hdr = 24'($urandom);
    for (int k = 0; k < 4; k++) p.sub[k] = {24'($urandom), 32'($urandom)};
    return p;
  endfunction

  always @(posedge clk)
    if (island_start) begin pkt0 <= rnd_pkt(); pkt1 <= rnd_pkt(); end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] decode(input logic [9:0] s);
    logic [7:0] b, o;
    b = s[9] ? ~s[7:0] : s[7:0];
    o[0] = b[0];
    for (int i = 1; i < 8; i++) o[i] = s[8] ? (b[i] ^ b[i-1]) : ~(b[i] ^ b[i-1]);
    return o;
  endfunction

  function automatic logic [7:0] bch_div(input logic [55:0] data, input int n);
    logic [63:0] poly;
    logic [8:0]  g;
    logic [7:0]  rem, out;
    g = 9'b1_1100_0001;
    poly = '0;
    for (int i = 0; i < n; i++) poly[n + 7 - i] = data[i];
    for (int i = n + 7; i >= 8; i--)
      if (poly[i]) poly[i -: 9] = poly[i -: 9] ^ g;
    rem = poly[7:0];
    for (int i = 0; i < 8; i++) out[i] = rem[7 - i];
    return out;
  endfunction

  localparam logic [9:0] TERC4 [16] = '{10'b1010011100, 10'b1001100011, 10'b1011100100,
    10'b1011100010, 10'b0101110001, 10'b0100011110, 10'b0110001110, 10'b0100111100,
    10'b1011001100, 10'b0100111001, 10'b0110011100, 10'b1011000110, 10'b1010001110,
    10'b1001110001, 10'b0101100011, 10'b1011000011};
  localparam logic [9:0] CTRL [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  function automatic int terc4_dec(input logic [9:0] s);
    for (int i = 0; i < 16; i++) if (TERC4[i] == s) return i;
    return -1;
  endfunction

  // context of the symbol being produced: sampled at the falling edge
  vid_timing_t tn;
  logic [23:0] rgbn;
  hdmi_packet_t p0n, p1n;
  always @(negedge clk) begin tn = t; rgbn = rgb; p0n = pkt0; p1n = pkt1; end

  int n_video = 0, n_islands = 0, n_vpre = 0, n_vgb = 0, n_ctrl = 0;
  hdmi_packet_t ref0, ref1;
  logic [1:0][31:0] hbits;
  logic [1:0][3:0][63:0] sbits;

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2 * 420000) begin
      int cx, cy, dk, pk, i0;
      bit next_vis;
      @(posedge clk); #1;
      cx = int'(tn.cx); cy = int'(tn.cy);
      next_vis = (cy < 479) || (cy == 524);
      dk = cx - 644;
      if (tn.de) begin
        n_video++;
        check({decode(q2), decode(q1), decode(q0)} == rgbn, $sformatf("pixel %0d,%0d", cx, cy));
      end else if (dk >= 0 && dk < 8) begin
        check(q0 == CTRL[{tn.vs, tn.hs}] && q1 == CTRL[1] && q2 == CTRL[1], "island preamble");
      end else if (dk == 8 || dk == 9 || dk == 74 || dk == 75) begin
        check(q0 == TERC4[{2'b11, tn.vs, tn.hs}] && q1 == 10'b0100110011 && q2 == 10'b0100110011,
              $sformatf("island guard band dk=%0d", dk));
      end else if (dk >= 10 && dk < 74) begin
        pk = dk - 10;
        if (pk == 0) begin ref0 = p0n; ref1 = p1n; end
        i0 = terc4_dec(q0);
        check(i0 >= 0 && terc4_dec(q1) >= 0 && terc4_dec(q2) >= 0, "terc4 symbol");
        check(i0[1:0] == {tn.vs, tn.hs} && i0[3] == (pk != 0), "channel 0 sync and first-clock flag");
        hbits[pk / 32][pk % 32] = i0[2];
        for (int k = 0; k < 4; k++) begin
          sbits[pk / 32][k][2 * (pk % 32)]     = 1'(terc4_dec(q1) >> k);
          sbits[pk / 32][k][2 * (pk % 32) + 1] = 1'(terc4_dec(q2) >> k);
        end
        if (pk == 63) begin
          n_islands++;
          for (int s = 0; s < 2; s++) begin
            hdmi_packet_t r;
            r = s ? ref1 : ref0;
            check(hbits[s] == {bch_div({32'h0, r.hdr}, 24), r.hdr}, "packet header");
            for (int k = 0; k < 4; k++)
              check(sbits[s][k] == {bch_div(r.sub[k], 56), r.sub[k]}, "subpacket");
          end
        end
      end else if (next_vis && cx >= 798) begin
        n_vgb++;
        check(q0 == 10'b1011001100 && q1 == 10'b0100110011 && q2 == 10'b1011001100, "video guard band");
      end else if (next_vis && cx >= 790) begin
        n_vpre++;
        check(q0 == CTRL[{tn.vs, tn.hs}] && q1 == CTRL[1] && q2 == CTRL[0], "video preamble");
      end else begin
        n_ctrl++;
        check(q0 == CTRL[{tn.vs, tn.hs}] && q1 == CTRL[0] && q2 == CTRL[0], $sformatf("control %0d,%0d", cx, cy));
      end
    end
    check(n_video == 2 * 640 * 480 - 640 * 0 && n_islands >= 2 * 525 - 1, $sformatf("counts %0d %0d", n_video, n_islands));
    check(n_vgb == 2 * 2 * 480 && n_vpre == 2 * 8 * 480 && n_ctrl > 0, $sformatf("preambles %0d %0d", n_vpre, n_vgb));
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
