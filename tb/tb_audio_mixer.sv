// tb_audio_mixer: random channel levels and beeper states; checks the ABC
// stereo mix (left = B + C, right = A + B), the scale, the beeper level and
// the offset to signed samples, with one clock of latency.
//
// Expected samples are computed from the ABC rule of the design description
// (A right, C left, B both) and the documented scaling and offset.
module tb_audio_mixer;
  logic clk = 0, rst = 1, beeper = 0;
  logic [7:0] ch_a = 0, ch_b = 0, ch_c = 0;
  logic signed [15:0] left, right;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  audio_mixer dut (.clk, .rst, .beeper, .ch_a, .ch_b, .ch_c, .left, .right);

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      int el, er;
      @(negedge clk);
      ch_a = 8'($urandom); ch_b = 8'($urandom); ch_c = 8'($urandom); beeper = 1'($urandom);
      if (n == 0) begin ch_a = 255; ch_b = 255; ch_c = 255; beeper = 1; end
      el = (ch_b + ch_c) * 32 + (beeper ? 8192 : 0) - 12256;
      er = (ch_a + ch_b) * 32 + (beeper ? 8192 : 0) - 12256;
      @(negedge clk);
      checks += 2;
      if (left != el)  begin failures++; $display("left %0d exp %0d", left, el); end
      if (right != er) begin failures++; $display("right %0d exp %0d", right, er); end
    end
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
