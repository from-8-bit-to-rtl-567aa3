// tb_sram_pager: a Z80 bus model (3.5 MHz, T-state timing of memory and
// I/O cycles) runs against the pager on a 25.16 MHz clock, with an
// asynchronous 512 KB SRAM model. Checks: writes land at {bank, offset} for
// the fixed banks 5 and 2 and for all 32 paged banks; reads return the
// stored byte with the data bus driven and the computer's RAM disabled; the
// SRAM output enable lasts two pixel clocks; ROM-area cycles leave the SRAM
// alone; port 0x7FFD writes page, bit 5 locks until reset, other ports do
// not page.
//
// The bank map follows Spectrum 128 paging; the two-pixel-clock read is
// the design's timing budget, checked as an OE pulse of exactly two pixel
// clocks (79 ns, longer than the SRAM's 45 ns access time).
module tb_sram_pager;
  logic zclk = 0, clk = 0, rst = 1;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0, rd_data, page_reg;
  logic zx_mreq_n = 1, zx_iorq_n = 1, zx_rd_n = 1, zx_wr_n = 1, zx_m1_n = 1;
  logic rd_oe, int_ram_dis;
  logic [18:0] sram_a;
  logic [7:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int checks = 0, failures = 0;
  always #143 zclk = ~zclk;
  always #20 clk = ~clk;

  sram_pager dut (.clk, .rst, .zx_a, .zx_d, .zx_mreq_n, .zx_iorq_n, .zx_rd_n, .zx_wr_n, .zx_m1_n,
    .rd_data, .rd_oe, .int_ram_dis, .sram_a, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n,
    .sram_oe_n, .sram_we_n, .page_reg);

  // ---- SRAM model
  logic [7:0] mem [1 << 19];
  int oe_len = 0, max_oe = 0, ce_in_rom = 0;
  always_comb sram_dq_i = (!sram_ce_n && !sram_oe_n) ? mem[sram_a] : 8'hzz;
  always @(posedge sram_we_n) if (!sram_ce_n && sram_dq_oe) mem[sram_a] = sram_dq_o;
  always @(posedge clk) begin
    if (!sram_oe_n) oe_len++;
    else begin if (oe_len > 0 && oe_len != 2) max_oe = oe_len; oe_len = 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic mem_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge zclk); zx_a <= a;
    @(negedge zclk); zx_mreq_n <= 0; zx_d <= d;
    @(negedge zclk); zx_wr_n <= 0;
    @(negedge zclk); zx_mreq_n <= 1; zx_wr_n <= 1;
  endtask

  task automatic mem_rd(input logic [15:0] a, output logic [7:0] d, output logic oe, output logic dis);
    @(posedge zclk); zx_a <= a;
    @(negedge zclk); zx_mreq_n <= 0; zx_rd_n <= 0;
    @(posedge zclk); @(posedge zclk); #1;
    d = rd_data; oe = rd_oe; dis = int_ram_dis;
    @(negedge zclk); zx_mreq_n <= 1; zx_rd_n <= 1;
  endtask

  task automatic io_wr(input logic [15:0] a, input logic [7:0] d);
    @(posedge zclk); zx_a <= a; zx_d <= d;
    @(posedge zclk); zx_iorq_n <= 0; zx_wr_n <= 0;
    @(posedge zclk); @(posedge zclk);
    @(negedge zclk); zx_iorq_n <= 1; zx_wr_n <= 1;
  endtask

  initial begin
    logic [7:0] d;
    logic oe, dis;
    for (int i = 0; i < (1 << 19); i++) mem[i] = 8'(i * 7 + (i >> 8));
    repeat (4) @(posedge zclk);
    rst <= 0;
    // fixed banks
    mem_wr(16'h4123, 8'hA5);
    check(mem[{5'd5, 14'h0123}] == 8'hA5, "write to bank 5");
    mem_wr(16'h8ABC, 8'h3C);
    check(mem[{5'd2, 14'h0ABC}] == 8'h3C, "write to bank 2");
    mem_rd(16'h4123, d, oe, dis);
    check(d == 8'hA5 && oe && dis, "read bank 5");
    mem_rd(16'h8ABC, d, oe, dis);
    check(d == 8'h3C && oe && dis, "read bank 2");
    // every paged bank
    for (int b = 0; b < 32; b++) begin
      logic [7:0] pv;
      pv = {2'(b >> 3), 3'b000, 3'(b)};
      io_wr(16'h7FFD, pv);
      check(page_reg == pv, $sformatf("page register %0d", b));
      mem_wr(16'hC000 + 16'(b * 5), 8'(b + 100));
      check(mem[{5'(b), 14'(b * 5)}] == 8'(b + 100), $sformatf("write paged bank %0d", b));
      mem_rd(16'hC000 + 16'(b * 5 + 1), d, oe, dis);
      check(d == mem[{5'(b), 14'(b * 5 + 1)}] && oe && dis, $sformatf("read paged bank %0d", b));
    end
    // other banks untouched by the paged window: re-read bank 5 and 2
    mem_rd(16'h4123, d, oe, dis);
    check(d == 8'hA5, "bank 5 unchanged by paging");
    // ROM area: no SRAM cycle, no disable
    fork
      begin
        mem_rd(16'h1234, d, oe, dis);
        check(!oe && !dis, "ROM area read not answered");
      end
      begin
        repeat (40) begin @(posedge clk); if (!sram_ce_n) ce_in_rom++; end
      end
    join
    mem_wr(16'h0100, 8'hEE);
    check(ce_in_rom == 0, "SRAM idle during ROM-area cycles");
    // other I/O ports do not page
    io_wr(16'h7FFD, 8'h03);
    io_wr(16'hFFFD, 8'h05);
    io_wr(16'h7FFF, 8'h06);
    check(page_reg == 8'h03, "only port 7FFD pages");
    // lock
    io_wr(16'h7FFD, 8'h24);
    io_wr(16'h7FFD, 8'h01);
    check(page_reg == 8'h24, "bit 5 locks paging");
    mem_wr(16'hC010, 8'h77);
    check(mem[{5'd4, 14'h0010}] == 8'h77, "locked page still used");
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    io_wr(16'h7FFD, 8'h01);
    check(page_reg == 8'h01, "reset releases the lock");
    check(max_oe == 0, $sformatf("output enable length %0d", max_oe));
    // bus released between cycles
    @(posedge clk); #1;
    check(!rd_oe && !int_ram_dis && sram_ce_n, "idle bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
