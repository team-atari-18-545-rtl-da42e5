// Clock-enable generator.
//
// The console runs from one master clock at four times the 3.58 MHz colour
// clock (14.318 MHz). This block divides it into two one-clk-wide enables:
// `cc_en`, the colour clock used by ANTIC's display side and GTIA, and
// `phi_en`, the 1.79 MHz CPU cycle, on every second colour clock. `phi2` is
// high in the second half of each CPU cycle, for observing the two-phase
// timing of the original part. The 1.79 MHz / 3.58 MHz ratio follows the
// report; generating enables on one clock instead of separate clocks is this
// design's own choice, so that everything stays in one clock domain.
module clock_gen #(
  parameter int unsigned CC_DIV = 4   // master clocks per colour clock
) (
  input  logic clk,
  input  logic rst_n,
  output logic cc_en,
  output logic phi_en,
  output logic phi2
);
  localparam int unsigned W = $clog2(2 * CC_DIV);
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == W'(2 * CC_DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign cc_en  = (cnt == W'(CC_DIV - 1)) || (cnt == W'(2 * CC_DIV - 1));
  assign phi_en = cnt == W'(2 * CC_DIV - 1);
  assign phi2   = cnt >= W'(CC_DIV);
endmodule
