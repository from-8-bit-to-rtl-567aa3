// async_fifo: dual-clock FIFO for the audio samples.
//
// Carries WIDTH-bit words from the write clock (the Z80 clock, where samples
// are taken at 48 kHz) to the read clock (the pixel clock of the HDMI core).
// DEPTH is a power of two. Read and write pointers have one extra wrap bit
// and cross the clock boundary in Gray code through two flip-flops each.
// full is computed in the write domain, empty in the read domain, both
// pessimistic for two clocks after a change on the other side. The read side
// is show-ahead: rdata is the oldest word whenever empty is low, and rd pops
// it. Writes when full and reads when empty are ignored.
//
// From the document: an asynchronous FIFO for the audio clock-domain
// crossing. Own choices: depth, Gray-pointer structure, show-ahead read.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
      {rgray_w2, rgray_w1} <= '0;
    end else begin
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      if (wr && !full) begin
        mem[wbin[AW-1:0]] <= wdata;
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end

  // read side
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
      {wgray_r2, wgray_r1} <= '0;
    end else begin
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      if (rd && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
endmodule
