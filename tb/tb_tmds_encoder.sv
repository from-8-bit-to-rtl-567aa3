// tb_tmds_encoder: random video bytes are encoded and decoded back by an
// independent TMDS decoder; the running disparity of the emitted stream is
// tracked and must stay within +-10 and return near zero; the control,
// TERC4 and guard band words are compared with the published code tables.
//
// The decoder and code tables are written from the DVI/HDMI coding rules,
// not from the encoder.
module tb_tmds_encoder;
  import zx_pkg::*;
  logic clk = 0, rst = 1;
  tmds_mode_e mode = TM_CTRL;
  logic [7:0] d = 0;
  logic [1:0] c = 0;
  logic [3:0] t4 = 0;
  logic [9:0] q, q1;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;
  tmds_encoder #(.CHANNEL(0)) dut0 (.clk_pix(clk), .rst, .mode, .d, .c, .t4, .q(q));
  tmds_encoder #(.CHANNEL(1)) dut1 (.clk_pix(clk), .rst, .mode, .d, .c, .t4, .q(q1));

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

  function automatic int transitions(input logic [9:0] s);
    int n = 0;
    for (int i = 1; i < 8; i++) if (s[i] != s[i-1]) n++;
    return n;
  endfunction

  localparam logic [9:0] TERC4 [16] = '{10'b1010011100, 10'b1001100011, 10'b1011100100,
    10'b1011100010, 10'b0101110001, 10'b0100011110, 10'b0110001110, 10'b0100111100,
    10'b1011001100, 10'b0100111001, 10'b0110011100, 10'b1011000110, 10'b1010001110,
    10'b1001110001, 10'b0101100011, 10'b1011000011};
  localparam logic [9:0] CTRL [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  int disp, maxdisp, trans_in, trans_out;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    disp = 0; maxdisp = 0; trans_in = 0; trans_out = 0;
    mode = TM_VIDEO;
    for (int n = 0; n < 5000; n++) begin
      logic [7:0] v;
      v = (n % 5 == 0) ? 8'h55 : (n % 7 == 0) ? 8'hFF : 8'($urandom);
      @(negedge clk); d = v;
      @(posedge clk); #1;
      check(decode(q) == v, $sformatf("decode %h -> %h", v, decode(q)));
      for (int i = 0; i < 10; i++) disp += q[i] ? 1 : -1;
      if (disp > maxdisp) maxdisp = disp;
      if (-disp > maxdisp) maxdisp = -disp;
      for (int i = 1; i < 8; i++) if (v[i] != v[i-1]) trans_in++;
      trans_out += transitions(q);
    end
    check(maxdisp <= 10, $sformatf("disparity bound %0d", maxdisp));
    check(trans_out < trans_in, "fewer transitions than the raw data");
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); mode = TM_CTRL; c = 2'(i);
      @(posedge clk); #1;
      check(q == CTRL[i], $sformatf("control %0d", i));
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); mode = TM_TERC4; t4 = 4'(i);
      @(posedge clk); #1;
      check(q == TERC4[i], $sformatf("terc4 %0d", i));
    end
    @(negedge clk); mode = TM_VGUARD;
    @(posedge clk); #1;
    check(q == 10'b1011001100 && q1 == 10'b0100110011, "video guard band");
    @(negedge clk); mode = TM_DGUARD;
    @(posedge clk); #1;
    check(q1 == 10'b0100110011, "data island guard band");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
