// frac_tick: fractional clock-enable generator.
//
// Adds NUM to an accumulator every clock and subtracts DEN when it would
// reach DEN, pulsing tick in that clock. tick therefore fires NUM times per
// DEN clocks on average, with at most one clock of jitter, e.g. 48000 times
// per 3 500 000 Z80 clocks. NUM must not exceed DEN.
//
// Own helper, not a block of its own in the design description: it stands in
// for separate audio and I2S clocks, which are replaced here by clock enables
// with an exact average rate.
module frac_tick #(
  parameter int unsigned NUM = 48000,
  parameter int unsigned DEN = 3500000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned W = $clog2(DEN) + 1;
  logic [W-1:0] acc;
  logic [W-1:0] sum;
  assign sum  = acc + W'(NUM);
  assign tick = !rst && (sum >= W'(DEN));
  always_ff @(posedge clk) begin
    if (rst)       acc <= '0;
    else if (tick) acc <= sum - W'(DEN);
    else           acc <= sum;
  end
endmodule
