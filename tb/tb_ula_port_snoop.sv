// tb_ula_port_snoop: OUTs to even ports must set border (bits 2..0) and
// beeper (bit 4); odd ports, memory writes and interrupt acknowledge cycles
// (IORQ with M1) must not.
//
// Bit 4 for the beeper follows the Spectrum's port 0xFE.
module tb_ula_port_snoop;
  logic clk = 0, rst = 1;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0;
  logic zx_iorq_n = 1, zx_wr_n = 1, zx_m1_n = 1;
  logic beeper;
  logic [2:0] border;
  int checks = 0, failures = 0;
  always #143 clk = ~clk;
  ula_port_snoop dut (.clk, .rst, .zx_a, .zx_d, .zx_iorq_n, .zx_wr_n, .zx_m1_n, .beeper, .border);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input logic [15:0] a, input logic [7:0] d, input bit iorq, input bit m1);
    @(posedge clk); zx_a <= a; zx_d <= d;
    @(posedge clk); zx_iorq_n <= !iorq; zx_wr_n <= m1; zx_m1_n <= !m1;
    @(posedge clk); @(posedge clk);
    @(negedge clk); zx_iorq_n <= 1; zx_wr_n <= 1; zx_m1_n <= 1;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [2:0] b;
    logic bp;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(border == 0 && !beeper, "reset state");
    b = 0; bp = 0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] a;
      logic [7:0] d;
      int kind;
      a = 16'($urandom); d = 8'($urandom); kind = $urandom_range(0, 3);
      if (kind == 0) a[0] = 0;                       // ULA port write
      cyc(a, d, kind != 3, kind == 2);
      if (kind != 3 && kind != 2 && !a[0]) begin b = d[2:0]; bp = d[4]; end
      check(border == b && beeper == bp, $sformatf("cycle %0d kind %0d port %h", i, kind, a));
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
