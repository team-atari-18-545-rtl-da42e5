// Testbench of dvi_scan, the 640x480 scan-out. A frame-store model answers
// each read address one clock later with a word derived from the address,
// like the display buffer. Checked over two frames: HSYNC period 800 and low
// for 96 clocks, VSYNC period 800*525 and low for 2 lines, 640 DE clocks on
// each of 480 lines, frame_start once per frame, and every displayed pixel:
// the 320x192 image doubled in both directions and centred with 48 black
// lines above and below.
module tb_dvi_scan;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] raddr;
  logic [31:0] rdata;
  logic [7:0] r, g, b;
  logic hsync_n, vsync_n, de, frame_start;
  int checks = 0, failures = 0;

  dvi_scan dut (.clk_pix(clk), .rst_n, .raddr, .rdata, .r, .g, .b, .hsync_n, .vsync_n, .de, .frame_start);
  always #20 clk = ~clk;
  function automatic logic [31:0] pix(input int a);
    return {8'h00, 8'(a), 8'(a >> 8), 8'(a * 7 + 1)};
  endfunction
  always_ff @(posedge clk) rdata <= pix(int'(raddr));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int t = 0, last_hs = -1, hs_per = 0, hs_low = 0, hs_low_max = 0;
    int last_vs = -1, vs_per = 0, vs_low = 0, vs_low_max = 0;
    int de_line = 0, de_lines = 0, de_bad = 0, x = 0, y = 0, pix_bad = 0, frames = 0;
    logic hs_q = 1'b1, vs_q = 1'b1, de_q = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // skip to the first frame start
    while (!frame_start) @(posedge clk);
    for (t = 0; t < 2 * 800 * 525; t++) begin
      @(posedge clk); #1;
      if (frame_start) frames++;
      if (!hsync_n) hs_low++;
      if (hs_q && !hsync_n) begin
        if (last_hs >= 0 && hs_per == 0) hs_per = t - last_hs;
        if (last_hs >= 0 && t - last_hs != 800) pix_bad++;
        last_hs = t; hs_low = 1;
      end
      if (hs_low > hs_low_max) hs_low_max = hs_low;
      if (!vsync_n && !vs_q) vs_low++;
      if (vs_q && !vsync_n) begin
        if (last_vs >= 0) vs_per = t - last_vs;
        last_vs = t; vs_low = 1;
      end
      if (vs_low > vs_low_max) vs_low_max = vs_low;
      if (de) begin
        logic [23:0] exp;
        de_line++;
        exp = (y >= 48 && y < 48 + 384) ? pix((y - 48) / 2 * 320 + x / 2) : 24'h0;
        if ({r, g, b} !== exp) begin
          if (pix_bad < 5) $display("FAIL pixel %0d,%0d: got %h expected %h", x, y, {r, g, b}, exp);
          pix_bad++;
        end
        x++;
      end
      if (de_q && !de) begin
        if (de_line != 640) de_bad++;
        de_line = 0; de_lines++; x = 0; y++;
        if (y == 480) y = 0;
      end
      hs_q = hsync_n; vs_q = vsync_n; de_q = de;
    end
    check("HSYNC period", hs_per, 800);
    check("HSYNC low clocks", hs_low_max, 96);
    check("VSYNC period", vs_per, 800 * 525);
    check("VSYNC low clocks", vs_low_max, 2 * 800);
    check("DE lines in two frames", de_lines, 960);
    check("lines without 640 DE clocks", de_bad, 0);
    check("pixel and line-period errors", pix_bad, 0);
    check("frame starts", frames, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
