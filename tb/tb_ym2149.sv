// tb_ym2149: Z80 I/O cycles program the sound generator through ports
// 0xFFFD/0xBFFD. Checks: register read-back on both read ports, R14/R15
// reading 0xFF, reads at other ports not answered; tone half-period
// 8 * TP * CLK_DIV Z80 clocks at full-scale DAC output; noise producing
// both levels with runs no shorter than the noise period; the sequences of
// envelope levels for four shapes; the fixed amplitude levels.
//
// Expected periods come from the chip's formulas (tone f/(16 TP)), envelope
// shapes from its data sheet.
module tb_ym2149;
  logic clk = 0, rst = 1;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0, rd_data, ch_a, ch_b, ch_c;
  logic zx_iorq_n = 1, zx_rd_n = 1, zx_wr_n = 1, zx_m1_n = 1, rd_oe;
  int checks = 0, failures = 0;
  always #143 clk = ~clk;
  ym2149 dut (.clk, .rst, .zx_a, .zx_d, .zx_iorq_n, .zx_rd_n, .zx_wr_n, .zx_m1_n,
              .rd_data, .rd_oe, .ch_a, .ch_b, .ch_c);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic io_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge clk); zx_a <= a; zx_d <= d;
    @(posedge clk); zx_iorq_n <= 0; zx_wr_n <= 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk); zx_iorq_n <= 1; zx_wr_n <= 1;
  endtask

  task automatic io_rd(input logic [15:0] a, output logic [7:0] d, output logic oe);
    @(posedge clk); zx_a <= a;
    @(posedge clk); zx_iorq_n <= 0; zx_rd_n <= 0;
    @(posedge clk); @(posedge clk); #1;
    d = rd_data; oe = rd_oe;
    @(negedge clk); zx_iorq_n <= 1; zx_rd_n <= 1;
  endtask

  task automatic wr_reg(input int r, input logic [7:0] v);
    io_wr(16'hFFFD, 8'(r));
    io_wr(16'hBFFD, v);
  endtask

  // reference DAC: 255 * 10^(-(31-l)*1.5/20), level 0 silent
  function automatic int dac_ref(input int l);
    if (l == 0) return 0;
    return int'($floor(255.0 * (10.0 ** (-(31 - l) * 1.5 / 20.0)) + 0.5));
  endfunction

  // record the distinct successive values of ch_a for n clocks
  task automatic record(input int n, output int seq[$]);
    seq = {};
    seq.push_back(int'(ch_a));
    repeat (n) begin
      @(posedge clk); #1;
      if (int'(ch_a) != seq[$]) seq.push_back(int'(ch_a));
    end
  endtask

  function automatic void push_dedup(ref int q[$], input int v);
    if (q.size() == 0 || q[$] != v) q.push_back(v);
  endfunction

  task automatic env_test(input logic [7:0] shape, input int n_steps);
    int got[$], exp_seq[$];
    int l;
    bit att, hold, zero;
    // expected level sequence, one value per envelope step
    att = shape[2]; hold = 0; zero = 0;
    for (int s = 0, st = 0; s < n_steps + 2; s++) begin
      l = zero ? 0 : (att ? st : 31 - st);
      push_dedup(exp_seq, dac_ref(l));
      if (!hold) begin
        if (st != 31) st++;
        else if (!shape[3]) begin hold = 1; zero = 1; end
        else if (shape[0]) begin hold = 1; if (shape[1]) att = !att; end
        else begin st = 0; if (shape[1]) att = !att; end
      end
    end
    wr_reg(13, shape);
    @(posedge clk); #1;
    record(n_steps * 32, got);
    // the recording window may end inside a step: it must be a prefix of
    // the expected sequence, at most two steps short of it
    begin
      bit ok;
      ok = got.size() <= exp_seq.size() && got.size() + 3 >= exp_seq.size();
      for (int i = 0; i < got.size() && ok; i++) ok = (got[i] == exp_seq[i]);
      check(ok, $sformatf("envelope shape %h: %0d values, expected %0d", shape, got.size(), exp_seq.size()));
    end
  endtask

  initial begin
    logic [7:0] d;
    logic oe;
    int last, runlen, minrun, half;
    int seen0, seen255, edges;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---- register file
    for (int r = 0; r < 14; r++) wr_reg(r, 8'(r * 17 + 3));
    for (int r = 0; r < 14; r++) begin
      io_wr(16'hFFFD, 8'(r));
      io_rd(16'hFFFD, d, oe);
      check(oe && d == 8'(r * 17 + 3), $sformatf("read back R%0d at FFFD", r));
      io_rd(16'hBFFD, d, oe);
      check(oe && d == 8'(r * 17 + 3), $sformatf("read back R%0d at BFFD", r));
    end
    io_wr(16'hFFFD, 8'd14);
    io_rd(16'hFFFD, d, oe);
    check(oe && d == 8'hFF, "R14 reads FF");
    io_rd(16'h7FFD, d, oe);
    check(!oe, "port 7FFD not answered");
    io_rd(16'hFFFE, d, oe);
    check(!oe, "port FFFE not answered");
    // ---- fixed amplitude levels (all channels on, mixer disabled)
    wr_reg(7, 8'h3F);
    for (int a = 0; a < 16; a++) begin
      wr_reg(8, 8'(a)); wr_reg(9, 8'(15 - a)); wr_reg(10, 8'(a));
      repeat (2) @(posedge clk); #1;
      check(ch_a == 8'(dac_ref(a == 0 ? 0 : 2 * a + 1)) && ch_b == 8'(dac_ref(a == 15 ? 0 : 31 - 2 * a))
            && ch_c == ch_a, $sformatf("amplitude %0d", a));
    end
    // ---- tone on A, period 100
    wr_reg(8, 8'h0F); wr_reg(9, 8'h00); wr_reg(10, 8'h00);
    wr_reg(0, 8'd100); wr_reg(1, 8'd0);
    wr_reg(7, 8'h3E);
    @(posedge clk); last = ch_a; runlen = 0; edges = 0;
    while (edges < 12) begin
      @(posedge clk); #1;
      runlen++;
      if (ch_a != last) begin
        if (edges > 1) check(runlen == 8 * 100 * 2, $sformatf("tone half period %0d", runlen));
        check(ch_a == 0 || ch_a == 255, "tone levels");
        edges++; runlen = 0; last = ch_a;
      end
    end
    // ---- noise on A
    wr_reg(6, 8'd3);
    wr_reg(7, 8'h37);
    @(posedge clk); last = ch_a; runlen = 0; edges = 0; minrun = 1 << 30; seen0 = 0; seen255 = 0;
    repeat (60000) begin
      @(posedge clk); #1;
      runlen++;
      if (ch_a == 0) seen0++;
      if (ch_a == 255) seen255++;
      if (ch_a != last) begin
        if (edges > 0 && runlen < minrun) minrun = runlen;
        edges++; runlen = 0; last = ch_a;
      end
    end
    check(seen0 > 10000 && seen255 > 10000 && edges > 100, $sformatf("noise %0d %0d %0d", seen0, seen255, edges));
    check(minrun == 16 * 3 * 2, $sformatf("noise shortest run %0d", minrun));
    // ---- envelope: period 2 (a step every 8 * 2 * 2 = 32 clocks)
    wr_reg(7, 8'h3F);
    wr_reg(11, 8'd2); wr_reg(12, 8'd0);
    wr_reg(8, 8'h10);
    env_test(8'h00, 50);   // decay, then silent
    env_test(8'h0D, 50);   // attack, hold at top
    env_test(8'h0E, 100);  // triangle
    env_test(8'h0B, 50);   // decay, then hold at top
    env_test(8'h08, 100);  // repeated decay (sawtooth)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
