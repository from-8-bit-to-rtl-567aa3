// tb_hdmi_serializer: random 10-bit symbols are presented on the derived
// pixel clock; the testbench collects the rise/fall bit pairs of each lane,
// rebuilds the words (bit 0 first) and compares them, and checks that the
// pixel clock period is five serial clocks and the clock lane sends
// 0000011111.
//
// The bit order (LSB first, rising edge before falling edge) is the one the
// DDR output cells need; the 5:1 clock ratio is the design's.
module tb_hdmi_serializer;
  logic clk_ser = 0, rst = 1, clk_pix;
  logic [9:0] q0 = 0, q1 = 0, q2 = 0;
  logic [3:0] rise, fall;
  int checks = 0, failures = 0;
  always #4 clk_ser = ~clk_ser;
  hdmi_serializer dut (.clk_ser, .rst, .clk_pix, .q0, .q1, .q2, .rise, .fall);

  logic [9:0] hist [$];
  always @(posedge clk_pix) begin
    logic [9:0] a, b, c;
    a = 10'($urandom); b = 10'($urandom); c = 10'($urandom);
    q0 <= a; q1 <= b; q2 <= c;
    hist.push_back(a); hist.push_back(b); hist.push_back(c);
  end

  int ser_cnt = 0, last_pix = -1, words = 0;
  always @(posedge clk_ser) ser_cnt++;
  always @(posedge clk_pix) begin
    if (last_pix >= 0 && !rst) begin
      checks++;
      if (ser_cnt - last_pix != 5) begin failures++; $display("pixel period %0d", ser_cnt - last_pix); end
    end
    last_pix = ser_cnt;
  end

  // collect lanes: find the load point from the clock lane pattern
  logic [3:0][19:0] acc;
  int phase = -1;
  initial begin
    repeat (20) @(posedge clk_ser);
    rst = 0;
    // align: clock lane word starts with 5 zeros then 5 ones -> pairs 00,00,01?,..
    forever begin
      @(negedge clk_ser);
      for (int l = 0; l < 4; l++) acc[l] = {fall[l], rise[l], acc[l][19:2]};
      if (phase < 0) begin
        if (acc[3] == 20'b0000011111_0000011111) phase = 0;
      end else begin
        phase++;
      end
      if (phase > 0 && phase % 5 == 0) begin
        logic [9:0] w [3];
        checks++;
        if (acc[3][19:10] != 10'b0000011111) begin failures++; $display("clock lane %b", acc[3][19:10]); end
        for (int l = 0; l < 3; l++) w[l] = acc[l][19:10];
        // the three words must appear consecutively in the history
        checks++;
        begin
          bit found = 0;
          for (int i = 0; i + 2 < hist.size(); i += 3)
            if (hist[i] == w[0] && hist[i+1] == w[1] && hist[i+2] == w[2]) found = 1;
          if (!found) begin failures++; if (failures < 10) $display("word not sent: %h %h %h", w[0], w[1], w[2]); end
        end
        while (hist.size() > 30) void'(hist.pop_front());
        words++;
        if (words == 2000) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
