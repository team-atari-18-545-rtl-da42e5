// Testbench of color_lut. Checks properties that follow from the colour
// table: hue 0 is grey at every luminance with the expected ramp, every
// channel grows with luminance, bit 0 is ignored, and the named hues lean
// the right way at mid luminance (red hue 4: red strongest; blue hues 7-9:
// blue strongest; green hues 11-13: green strongest; olive hue 1: red and
// green above blue).
module tb_color_lut;
  logic [7:0]  color;
  logic [23:0] rgb, prev;
  int checks = 0, failures = 0;
  color_lut dut (.color, .rgb);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s color=%h rgb=%h", what, color, rgb); end
  endtask

  initial begin
    logic [23:0] even;
    for (int l = 0; l < 8; l++) begin
      color = {4'h0, 3'(l), 1'b0}; #1;
      check("grey", rgb[23:16] == rgb[15:8] && rgb[15:8] == rgb[7:0] && rgb[7:0] == 8'(16 + 34 * l));
    end
    for (int h = 0; h < 16; h++) begin
      for (int l = 0; l < 8; l++) begin
        color = {4'(h), 3'(l), 1'b0}; #1;
        even = rgb;
        color[0] = 1'b1; #1;
        check("bit 0 ignored", rgb == even);
        if (l > 0) check("luminance ramp", rgb[23:16] >= prev[23:16] && rgb[15:8] >= prev[15:8] && rgb[7:0] >= prev[7:0]);
        prev = rgb;
      end
    end
    color = 8'h48; #1; check("red", rgb[23:16] > rgb[15:8] && rgb[23:16] > rgb[7:0]);
    for (int h = 7; h <= 9; h++) begin color = {4'(h), 4'h8}; #1; check("blue", rgb[7:0] > rgb[23:16] && rgb[7:0] > rgb[15:8]); end
    for (int h = 11; h <= 13; h++) begin color = {4'(h), 4'h8}; #1; check("green", rgb[15:8] > rgb[23:16] && rgb[15:8] > rgb[7:0]); end
    color = 8'h18; #1; check("olive", rgb[23:16] > rgb[7:0] && rgb[15:8] > rgb[7:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
