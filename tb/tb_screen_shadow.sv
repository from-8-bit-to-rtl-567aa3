// tb_screen_shadow: drives Z80 memory write and read cycles to random
// addresses inside and outside 0x4000-0x5FFF and checks through the
// pixel-clock read port that exactly the screen-area bytes were copied.
//
// The 0x4000-0x5FFF window is the Spectrum's screen; read and write cycles
// both count, as in the design description.
module tb_screen_shadow;
  logic zx_clk = 0, clk_pix = 0;
  logic [15:0] zx_a = 0;
  logic [7:0]  zx_d = 0;
  logic zx_mreq_n = 1, zx_rd_n = 1, zx_wr_n = 1;
  logic [12:0] rd_addr = 0;
  logic [7:0]  rd_data;
  int checks = 0, failures = 0;
  always #143 zx_clk = ~zx_clk;
  always #20  clk_pix = ~clk_pix;

  screen_shadow dut (.zx_clk, .zx_a, .zx_d, .zx_mreq_n, .zx_rd_n, .zx_wr_n,
                     .clk_pix, .rd_addr, .rd_data);

  logic [7:0] model [8192];
  bit         known [8192];

  task automatic mem_cycle(input logic [15:0] a, input logic [7:0] d, input bit wr);
    @(posedge zx_clk); zx_a <= a; zx_d <= d;
    @(negedge zx_clk); zx_mreq_n <= 0; if (!wr) zx_rd_n <= 0;
    @(negedge zx_clk); if (wr) zx_wr_n <= 0;
    @(posedge zx_clk);
    @(negedge zx_clk); zx_mreq_n <= 1; zx_rd_n <= 1; zx_wr_n <= 1;
    if (a[15:13] == 3'b010) begin model[a[12:0]] = d; known[a[12:0]] = 1; end
  endtask

  initial begin
    // fill the window once so every offset is known
    for (int i = 0; i < 8192; i += 97) mem_cycle(16'h4000 + 16'(i), 8'(i * 7), 1);
    for (int n = 0; n < 600; n++) begin
      logic [15:0] a;
      a = 16'($urandom);
      if (n % 3 == 0) a = 16'h4000 | 16'(a[12:0]);
      mem_cycle(a, 8'($urandom), n % 4 != 0);
      // an alias outside the window must not disturb the copy
      mem_cycle({3'b011, a[12:0]}, 8'($urandom), 1);
      mem_cycle({3'b001, a[12:0]}, 8'($urandom), 1);
    end
    for (int i = 0; i < 8192; i++) begin
      if (!known[i]) continue;
      @(negedge clk_pix); rd_addr = 13'(i);
      @(posedge clk_pix); #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        if (failures < 10) $display("offset %0h: got %02h expected %02h", i, rd_data, model[i]);
      end
    end
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
