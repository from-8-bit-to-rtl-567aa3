// tb_rom_ctrl: the ROM is loaded from tb/rom_test.hex (64 bytes). A Z80 bus
// model checks: boot mode after reset with the computer's ROM disabled and
// reads below 0x4000 answered from the file (mirrored every 4 KB, zero past
// the file); RAM-area reads not answered; no TR-DOS trap in boot mode; an
// OUT to port 0x07 with bit 0 clear keeps boot mode, with bit 0 set ends it;
// then a fetch from 0x3Dxx raises romcs during that fetch and keeps it
// through ROM-area fetches and data reads at 0x3Dxx, a data read at 0x3Dxx
// does not trap, and a fetch at 0x4000 or above releases it.
//
// The trap range and the RD/M1 condition come from the TR-DOS interface
// behaviour; the exit port and the release rule are this design's own.
module tb_rom_ctrl;
  logic zclk = 0, clk = 0, rst = 1;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0, rd_data;
  logic zx_mreq_n = 1, zx_iorq_n = 1, zx_rd_n = 1, zx_wr_n = 1, zx_m1_n = 1;
  logic rd_oe, rom_dis, romcs, boot_mode, trdos;
  int checks = 0, failures = 0;
  always #143 zclk = ~zclk;
  always #20 clk = ~clk;

  rom_ctrl #(.INIT_FILE("tb/rom_test.hex")) dut (.clk, .rst, .zx_a, .zx_d, .zx_mreq_n, .zx_iorq_n,
    .zx_rd_n, .zx_wr_n, .zx_m1_n, .rd_data, .rd_oe, .rom_dis, .romcs, .boot_mode, .trdos);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // memory read or opcode fetch; returns data, rd_oe and romcs at T3
  task automatic mem_rd(input logic [15:0] a, input bit m1, output logic [7:0] d,
                        output logic oe, output logic cs);
    @(posedge zclk); zx_a <= a; zx_m1_n <= !m1;
    @(negedge zclk); zx_mreq_n <= 0; zx_rd_n <= 0;
    @(posedge zclk); @(posedge zclk); #1;
    d = rd_data; oe = rd_oe; cs = romcs;
    @(negedge zclk); zx_mreq_n <= 1; zx_rd_n <= 1; zx_m1_n <= 1;
  endtask

  task automatic io_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge zclk); zx_a <= a; zx_d <= d;
    @(posedge zclk); zx_iorq_n <= 0; zx_wr_n <= 0;
    @(posedge zclk); @(posedge zclk);
    @(negedge zclk); zx_iorq_n <= 1; zx_wr_n <= 1;
  endtask

  function automatic logic [7:0] rom_byte(input int a);
    a = a % 4096;
    return (a < 64) ? 8'((a * 37 + 11) & 255) : 8'h00;
  endfunction

  initial begin
    logic [7:0] d;
    logic oe, cs;
    repeat (4) @(posedge zclk);
    rst <= 0;
    @(posedge zclk); #1;
    check(boot_mode && rom_dis && !romcs, "boot mode after reset");
    for (int i = 0; i < 70; i++) begin
      mem_rd(16'(i), i % 3 == 0, d, oe, cs);
      check(oe && d == rom_byte(i), $sformatf("boot ROM byte %0d", i));
    end
    mem_rd(16'h1005, 0, d, oe, cs);
    check(oe && d == rom_byte(5), "mirror at 0x1005");
    mem_rd(16'h3FC0, 0, d, oe, cs);
    check(oe && d == rom_byte(16'h3FC0), "top of ROM area");
    mem_rd(16'h4000, 0, d, oe, cs);
    check(!oe, "RAM read not answered");
    mem_rd(16'h3D00, 1, d, oe, cs);
    check(!cs && !trdos, "no trap in boot mode");
    io_wr(16'h0007, 8'h00);
    check(boot_mode, "bit 0 clear keeps boot mode");
    io_wr(16'h1F06, 8'h01);
    check(boot_mode, "other port keeps boot mode");
    io_wr(16'h1F07, 8'h01);
    @(posedge zclk); #1;
    check(!boot_mode && !rom_dis && !romcs, "boot mode left");
    mem_rd(16'h0010, 1, d, oe, cs);
    check(!oe && !cs, "computer ROM in use");
    mem_rd(16'h3D2F, 0, d, oe, cs);
    check(!cs && !trdos, "data read at 3Dxx does not trap");
    mem_rd(16'h3D2F, 1, d, oe, cs);
    check(cs, "romcs during the trapping fetch");
    @(posedge zclk); #1;
    check(trdos && romcs && rom_dis, "TR-DOS selected");
    mem_rd(16'h0123, 1, d, oe, cs);
    check(cs && !oe, "stays in TR-DOS for ROM fetches");
    mem_rd(16'h5000, 0, d, oe, cs);
    check(trdos, "stays in TR-DOS for data reads in RAM");
    mem_rd(16'h5CC2, 1, d, oe, cs);
    @(posedge zclk); #1;
    check(!trdos && !romcs && !rom_dis, "fetch from RAM leaves TR-DOS");
    mem_rd(16'h3DFF, 1, d, oe, cs);
    check(cs, "second trap");
    mem_rd(16'hC000, 1, d, oe, cs);
    @(posedge zclk); #1;
    check(!romcs, "second release");
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
