// tb_async_fifo: writes a numbered sequence on a 3.5 MHz clock while a
// 25 MHz reader pops at random; every word must arrive once and in order,
// full must stop writes, and the FIFO must report empty when drained.
//
// The expected order is just the write sequence; the clock rates (3.5 MHz
// write, 25.16 MHz read) are those of the design, the traffic pattern is this
// testbench's own.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  logic wr = 0, rd = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  always #143 wclk = ~wclk;
  always #20  rclk = ~rclk;
  async_fifo #(.WIDTH(32), .DEPTH(4)) dut (.wclk, .wrst(rst), .wr, .wdata, .full,
                                           .rclk, .rrst(rst), .rd, .rdata, .empty);
  int sent = 0, got = 0, saw_full = 0;
  bit slow_reader = 1;

  always @(posedge wclk) if (!rst) begin
    if (wr && !full) sent <= sent + 1;
    if (full) saw_full <= saw_full + 1;
  end
  always_comb wdata = 32'(sent) * 32'h9E3779B1;
  always @(negedge wclk) wr <= !rst && sent < 3000 && ($urandom_range(0, 3) != 0);

  always @(negedge rclk) rd <= !rst && ($urandom_range(0, slow_reader ? 60 : 2) == 0);
  always @(posedge rclk) if (!rst && rd && !empty) begin
    checks++;
    if (rdata !== 32'(got) * 32'h9E3779B1) begin
      failures++;
      if (failures < 10) $display("word %0d: got %h", got, rdata);
    end
    got <= got + 1;
  end

  initial begin
    repeat (4) @(posedge wclk);
    rst = 0;
    #300us;
    slow_reader = 0;
    wait (sent == 3000);
    repeat (20) @(posedge wclk);
    checks++;
    if (got != 3000 || !empty) begin failures++; $display("sent %0d got %0d empty %0d", sent, got, empty); end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
