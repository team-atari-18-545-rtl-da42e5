// 640x480 scan-out of the display buffer.
//
// Generates the standard 640x480 60 Hz timing from the 25 MHz pixel clock
// (800 clocks per line: 640 visible, 16 front porch, 96 sync, 48 back
// porch; 525 lines: 480 visible, 10 front porch, 2 sync, 33 back porch;
// both syncs active low) and reads the 320x192 display buffer doubled in
// both directions, i.e. as 640x384, centred with 48 black lines above and
// below. The buffer read is registered, so syncs, blanking and colour are
// delayed one clock to stay aligned. The output is parallel 8-bit RGB with
// syncs and data-enable, to drive an external DVI transmitter chip. The
// resolution and clock follow the report; the centring and the doubling are
// this design's choice (the report does not say how 320x192 is placed).
module dvi_scan #(
  parameter int unsigned SRC_W = 320,
  parameter int unsigned SRC_H = 192,
  localparam int unsigned AW = $clog2(SRC_W * SRC_H)
) (
  input  logic          clk_pix,
  input  logic          rst_n,
  output logic [AW-1:0] raddr,
  input  logic [31:0]   rdata,
  output logic [7:0]    r,
  output logic [7:0]    g,
  output logic [7:0]    b,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          de,
  output logic          frame_start
);
  localparam int unsigned HV = 640, HFP = 16, HS = 96, HBP = 48;
  localparam int unsigned VV = 480, VFP = 10, VS = 2, VBP = 33;
  localparam int unsigned HT = HV + HFP + HS + HBP;
  localparam int unsigned VT = VV + VFP + VS + VBP;
  localparam int unsigned TOP = (VV - 2 * SRC_H) / 2;

  logic [9:0] hc, vc;
  logic       in_img, in_img_q, de_q, hs_q, vs_q;
  logic [9:0] sy;

  always_ff @(posedge clk_pix) begin
    if (!rst_n) begin
      hc <= '0; vc <= '0;
    end else if (hc == 10'(HT - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(VT - 1)) ? 10'd0 : vc + 10'd1;
    end else hc <= hc + 10'd1;
  end

  assign sy     = vc - 10'(TOP);
  assign in_img = hc < 10'(2 * SRC_W) && vc >= 10'(TOP) && vc < 10'(TOP + 2 * SRC_H);
  assign raddr  = in_img ? AW'(32'(sy[9:1]) * SRC_W + 32'(hc[9:1])) : '0;

  always_ff @(posedge clk_pix) begin
    if (!rst_n) begin
      in_img_q <= 1'b0; de_q <= 1'b0; hs_q <= 1'b1; vs_q <= 1'b1;
    end else begin
      in_img_q <= in_img;
      de_q     <= hc < 10'(HV) && vc < 10'(VV);
      hs_q     <= !(hc >= 10'(HV + HFP) && hc < 10'(HV + HFP + HS));
      vs_q     <= !(vc >= 10'(VV + VFP) && vc < 10'(VV + VFP + VS));
    end
  end

  assign r = in_img_q ? rdata[23:16] : 8'd0;
  assign g = in_img_q ? rdata[15:8]  : 8'd0;
  assign b = in_img_q ? rdata[7:0]   : 8'd0;
  assign de = de_q;
  assign hsync_n = hs_q;
  assign vsync_n = vs_q;
  assign frame_start = hc == 10'd0 && vc == 10'd0;
endmodule
