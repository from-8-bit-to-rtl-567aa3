// audio_mixer: mixes the beeper and the three PSG channels to stereo PCM.
//
// ABC stereo: channel A goes to the right, C to the left and B to both, so
// left = B + C and right = A + B (each a 9-bit sum, at most 510). The sum is
// scaled by 32, the beeper adds BEEP_LEVEL to both sides when its bit is
// set, and the midpoint of the full range (OFFSET) is subtracted to give
// signed 16-bit samples. Registered, one clock of latency.
//
// From the document: ABC mapping and the mixing of the 1-bit beeper with
// the three 8-bit channels into 16-bit left/right PCM. Own choices: the
// scale factors and the offset.
module audio_mixer #(
  parameter int unsigned BEEP_LEVEL = 8192,
  parameter int unsigned OFFSET     = 12256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               beeper,
  input  logic [7:0]         ch_a,
  input  logic [7:0]         ch_b,
  input  logic [7:0]         ch_c,
  output logic signed [15:0] left,
  output logic signed [15:0] right
);
  logic [16:0] l, r;
  always_comb begin
    l = (17'(ch_b) + 17'(ch_c)) * 17'd32 + (beeper ? 17'(BEEP_LEVEL) : 17'd0);
    r = (17'(ch_a) + 17'(ch_b)) * 17'd32 + (beeper ? 17'(BEEP_LEVEL) : 17'd0);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      left  <= '0;
      right <= '0;
    end else begin
      left  <= 16'(l - 17'(OFFSET));
      right <= 16'(r - 17'(OFFSET));
    end
  end
endmodule
