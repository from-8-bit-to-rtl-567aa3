// i2s_tx: I2S master transmitter, 16-bit stereo at 48 kHz.
//
// A fractional divider makes the bit clock from the pixel clock
// (2*BCLK_HZ toggles per CLK_HZ clocks, 1.536 MHz from 25.16 MHz, with one
// pixel clock of jitter). A frame is 32 bit-clock slots: slots 0-15 carry the
// left sample and 16-31 the right one, MSB first. Data and word select change
// on the falling edge of bclk; word select is low for the left channel and
// changes one slot before the MSB, as I2S requires. The input sample pair is
// latched at the start of every frame, so lrclk runs at exactly
// BCLK_HZ / 32 = 48 kHz.
//
// From the document: I2S master, 48 kHz, 16 bits per channel, 1.536 MHz bit
// clock, outputs bclk/lrclk/data. Own choices: deriving bclk from the pixel
// clock and the frame latch point.
module i2s_tx #(
  parameter int unsigned CLK_HZ  = 25160000,
  parameter int unsigned BCLK_HZ = 1536000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] left,
  input  logic [15:0] right,
  output logic        bclk,
  output logic        lrclk,
  output logic        data,
  output logic        frame_start   // pulses when a new sample pair is latched
);
  logic tog;
  frac_tick #(.NUM(2 * BCLK_HZ), .DEN(CLK_HZ)) u_tick (.clk, .rst, .tick(tog));

  logic [4:0]  slot;
  logic [31:0] sh;

  always_ff @(posedge clk) begin
    frame_start <= 1'b0;
    if (rst) begin
      bclk  <= 1'b0;
      slot  <= 5'd31;
      sh    <= '0;
      lrclk <= 1'b0;
      data  <= 1'b0;
    end else if (tog) begin
      bclk <= ~bclk;
      if (bclk) begin                  // falling edge: next slot
        slot  <= slot + 5'd1;
        lrclk <= (slot + 5'd1 >= 5'd15) && (slot + 5'd1 <= 5'd30);
        if (slot == 5'd31) begin
          sh          <= {left, right};
          data        <= left[15];
          frame_start <= 1'b1;
        end else begin
          data <= sh[5'd30 - slot];
        end
      end
    end
  end
endmodule
