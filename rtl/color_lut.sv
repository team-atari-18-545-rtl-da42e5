// GTIA colour table: 8-bit colour register value to 24-bit RGB.
//
// The upper four bits select one of 16 hues, bits 3..1 one of 8 luminances
// (bit 0 is ignored), giving the 128 colours of the original chip. Hue 0 is
// the grey scale. For the other hues a luminance level Y = 16 + 34*lum is
// offset per channel by a signed hue vector and clamped to 0..255. The hue
// names (olive, brown, red, purple, blue, green, ...) follow the colour table
// of the report; the numeric vectors and the luminance ramp are this design's
// own approximation, as the report gives names and not RGB values.
// Purely combinational.
module color_lut (
  input  logic [7:0]  color,
  output logic [23:0] rgb
);
  logic signed [9:0] yl, ro, go, bo;

  always_comb begin
    unique case (color[7:4])
      4'd1:    {ro, go, bo} = {10'sd40,  10'sd30,  -10'sd60};  // olive / yellow
      4'd2:    {ro, go, bo} = {10'sd60,  10'sd10,  -10'sd60};  // brown / orange
      4'd3:    {ro, go, bo} = {10'sd70,  -10'sd10, -10'sd50};  // red-orange
      4'd4:    {ro, go, bo} = {10'sd70,  -10'sd30, -10'sd30};  // red
      4'd5:    {ro, go, bo} = {10'sd40,  -10'sd40, 10'sd50};   // purple
      4'd6:    {ro, go, bo} = {10'sd10,  -10'sd40, 10'sd70};   // blue-purple
      4'd7:    {ro, go, bo} = {-10'sd30, -10'sd20, 10'sd70};   // blue
      4'd8:    {ro, go, bo} = {-10'sd50, -10'sd10, 10'sd70};   // blue
      4'd9:    {ro, go, bo} = {-10'sd60, 10'sd10,  10'sd60};   // light blue
      4'd10:   {ro, go, bo} = {-10'sd60, 10'sd30,  10'sd40};   // blue-green
      4'd11:   {ro, go, bo} = {-10'sd50, 10'sd50,  10'sd10};   // green
      4'd12:   {ro, go, bo} = {-10'sd40, 10'sd60,  -10'sd20};  // green
      4'd13:   {ro, go, bo} = {-10'sd20, 10'sd60,  -10'sd40};  // green
      4'd14:   {ro, go, bo} = {10'sd0,   10'sd50,  -10'sd50};  // yellow-green
      4'd15:   {ro, go, bo} = {10'sd50,  10'sd20,  -10'sd60};  // brown / orange
      default: {ro, go, bo} = {10'sd0,   10'sd0,   10'sd0};    // grey
    endcase
    yl = 10'sd16 + 10'sd34 * $signed({7'd0, color[3:1]});
  end

  function automatic logic [7:0] clamp(input logic signed [9:0] v);
    if (v < 0) return 8'd0;
    if (v > 10'sd255) return 8'd255;
    return v[7:0];
  endfunction

  assign rgb = {clamp(yl + ro), clamp(yl + go), clamp(yl + bo)};
endmodule
