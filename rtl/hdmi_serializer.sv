// hdmi_serializer: pixel clock divider and 10:1 DDR serializer.
//
// clk_ser is the 125.798 MHz serial clock. A counter modulo 5 derives the
// pixel clock from it (clk_pix high for 2 of every 5 serial clocks, about
// 25.16 MHz). Once per pixel, at the serial edge where the counter steps from
// 2 to 3 (long after the pixel-domain symbols changed, long before they change
// again), the three 10-bit symbols and the clock pattern 0000011111 are
// loaded into shift registers. Each serial clock then presents two bits per
// lane: rise[] for the rising-edge half of a DDR output cell and fall[] for
// the falling-edge half, bit 0 first, so a symbol leaves in 5 serial clocks
// at an effective 251.6 Mbit/s per lane. Lane 3 is the TMDS clock.
//
// From the document: the 125.798 MHz clock, DDR output doubling it to the
// 10x bit rate, the pixel clock as that clock divided by 5. Own choice: the
// load point; the DDR output cells themselves are device primitives outside
// this module.
module hdmi_serializer (
  input  logic       clk_ser,
  input  logic       rst,
  output logic       clk_pix,
  input  logic [9:0] q0,
  input  logic [9:0] q1,
  input  logic [9:0] q2,
  output logic [3:0] rise,
  output logic [3:0] fall
);
  logic [2:0] cnt;
  logic [3:0][9:0] sh;

  // The divider ignores rst so that the pixel clock keeps running while the
  // pixel-clock domain is held in reset.
  always_ff @(posedge clk_ser) begin
    cnt     <= (cnt >= 3'd4) ? 3'd0 : cnt + 3'd1;
    clk_pix <= (cnt >= 3'd4) || (cnt == 3'd0);
  end

  always_ff @(posedge clk_ser) begin
    if (rst) begin
      sh <= '0;
    end else begin
      if (cnt == 3'd2) begin
        sh <= {10'b0000011111, q2, q1, q0};
      end else begin
        for (int l = 0; l < 4; l++) sh[l] <= {2'b00, sh[l][9:2]};
      end
    end
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      rise[l] = sh[l][0];
      fall[l] = sh[l][1];
    end
  end
endmodule
