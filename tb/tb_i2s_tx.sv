// tb_i2s_tx: a sample source changes left/right at every frame_start. The
// testbench deserialises data on the rising edges of bclk (I2S: MSB first,
// one bit clock after the lrclk edge, lrclk low for the left word) and
// checks each received pair against the pair latched, checks 32 bit clocks
// per frame and the average bit clock rate.
//
// The bit clock rate checked is 48 kHz x 32 = 1.536 MHz; the framing is
// standard I2S (data one bit after the word-select edge).
module tb_i2s_tx;
  logic clk = 0, rst = 1;
  logic [15:0] left = 0, right = 0;
  logic bclk, lrclk, data, frame_start;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;   // about 25 MHz
  i2s_tx dut (.clk, .rst, .left, .right, .bclk, .lrclk, .data, .frame_start);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] sent [$];
  int n = 0;
  always @(posedge clk) if (frame_start) begin
    sent.push_back({left, right});
    left  <= 16'($urandom);
    right <= 16'($urandom);
    n++;
  end

  int clks = 0;
  always @(posedge clk) clks++;

  initial begin
    logic [31:0] word;
    logic [1:0]  lr_hist;
    int k, frames, bclks, c0;
    repeat (4) @(posedge clk);
    rst <= 0;
    lr_hist = 2'b00; k = -1; frames = 0; bclks = 0; c0 = 0;
    while (frames < 300) begin
      @(posedge bclk);
      if (frames > 0) bclks++;
      // the bit one clock after lrclk has fallen is the left MSB
      if (lr_hist == 2'b10) begin
        if (k == 32) begin
          check(sent.size() > 0 && word == sent[0], $sformatf("frame %0d data %h", frames, word));
          if (sent.size() > 0) void'(sent.pop_front());
          if (frames == 0) c0 = clks;
          frames++;
        end else if (k >= 0) begin
          check(0, $sformatf("frame length %0d", k));
        end else begin
          // first frame seen: it carries the most recently latched pair
          while (sent.size() > 1) void'(sent.pop_front());
        end
        k = 0;
      end
      if (k >= 0 && k < 32) begin
        word[31 - k] = data;
        check(lrclk == (k >= 15 && k <= 30), $sformatf("lrclk at bit %0d", k));
        k++;
      end else if (k >= 0) begin
        k++;
      end
      lr_hist = {lr_hist[0], lrclk};
    end
    // average bit clock: CLK_HZ / BCLK_HZ pixel clocks per bit (16.38)
    begin
      real per;
      per = real'(clks - c0) / real'(bclks);
      check(per > 16.37 && per < 16.39, $sformatf("bit clock period %f", per));
      check(n >= 300, "frame_start pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
