// Testbench of antic. A 64 KB memory model answers DMA reads in the same
// cycle, like the system RAM. A display list at $1000 has 24 blank lines, a
// mode F line with LMS ($2000), a mode F line with a DLI, a mode 2
// character line (charset at $3000) and a mode D line, then JVB back to
// $1000. Screen and charset bytes are random. Over two frames every AN code
// is compared with a model of the display (vertical blank, horizontal
// blank, background, high-resolution pixel pairs, 4-colour pixels). Also
// checked: the number of DMA cycles on the lines that fetch the mode F,
// mode 2 (first and second row) and blank lines, halt_n low exactly in DMA
// cycles, the first display-list fetch address of each frame, one DLI and
// one VBI NMI per frame on the right lines with NMIST, VCOUNT, and WSYNC
// releasing the CPU at colour clock 210.
module tb_antic;
  import atari_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cc_en, phi_en, phi2;
  logic cs = 1'b0, we = 1'b0, lpen_n = 1'b1;
  logic [3:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic dma_req, halt_n, rdy, nmi_n, an_hires;
  logic [15:0] dma_addr;
  logic [7:0] dma_din;
  an_e an;
  logic [7:0] pm_gfx [5];
  logic [8:0] vcnt;
  logic [7:0] hcnt;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;

  clock_gen u_clk (.clk, .rst_n, .cc_en, .phi_en, .phi2);
  antic dut (.clk, .rst_n, .cc_en, .phi_en, .cs, .we, .addr, .din, .dout, .dma_req, .dma_addr,
             .dma_din, .halt_n, .rdy, .nmi_n, .an, .an_hires, .pm_gfx, .lpen_n, .vcnt, .hcnt);
  assign dma_din = mem[dma_addr];
  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic bus_write(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); while (!phi_en) @(negedge clk);
    cs = 1'b1; we = 1'b1; addr = a; din = d;
    @(negedge clk); cs = 1'b0; we = 1'b0;
  endtask
  task automatic bus_read(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk); while (!phi_en) @(negedge clk);
    cs = 1'b1; we = 1'b0; addr = a; #1 d = dout;
    @(negedge clk); cs = 1'b0;
  endtask

  // expected AN code and hires flag at line v, colour clock h
  int cfg = 0;
  localparam int HS = 3, VS = 2;
  function automatic logic [3:0] expect_an(input int v, input int h);
    int j, x;
    logic [7:0] bt, s;
    logic [1:0] p;
    if (v < FIRST_LINE || v >= FIRST_LINE + DISP_LINES) return {1'b0, AN_VSYNC};
    if (h < HBLANK_END || h >= HBLANK_START) return {1'b0, AN_HBLANK};
    if (h < PF_LEFT || h >= PF_LEFT + PF_CC) return {1'b0, AN_BAK};
    x = (h - PF_LEFT) / 4; j = (h - PF_LEFT) % 4;
    if (cfg == 1) begin
      // line 32: mode F, 48-byte line shifted right by HSCROL colour clocks
      if (v == 32) begin
        x = (h - HBLANK_END - HS) / 4; j = (h - HBLANK_END - HS) % 4;
        bt = mem[16'h2000 + x];
        return {1'b1, 1'b1, bt[7 - 2 * j], bt[6 - 2 * j]};
      end
      // lines 33..38: mode 2 rows VS..7; lines 39..41: next mode line, rows 0..VS
      if (v >= 33 && v < 33 + 8 - VS + VS + 1) begin
        int r, base;
        if (v < 33 + 8 - VS) begin r = v - 33 + VS; base = 16'h2030; end
        else begin r = v - (33 + 8 - VS); base = 16'h2058; end
        s = mem[base + x];
        bt = mem[16'h3000 + int'(s[6:0]) * 8 + r];
        return {1'b1, 1'b1, bt[7 - 2 * j], bt[6 - 2 * j]};
      end
      return {1'b0, AN_BAK};
    end
    if (v == 32 || v == 33) begin
      bt = mem[16'h2000 + (v - 32) * 40 + x];
      return {1'b1, 1'b1, bt[7 - 2 * j], bt[6 - 2 * j]};
    end
    if (v >= 34 && v < 42) begin
      s = mem[16'h2050 + x];
      bt = mem[16'h3000 + int'(s[6:0]) * 8 + (v - 34)];
      return {1'b1, 1'b1, bt[7 - 2 * j], bt[6 - 2 * j]};
    end
    if (v == 42 || v == 43) begin
      bt = mem[16'h2078 + x];
      p = {bt[7 - 2 * j], bt[6 - 2 * j]};
      return p == 2'b00 ? {1'b0, AN_BAK} : {1'b0, 1'b1, 2'(p - 2'd1)};
    end
    return {1'b0, AN_BAK};
  endfunction

  int dma_line [262];
  int an_bad = 0, halt_bad = 0, dli_cnt = 0, vbi_cnt = 0, dli_line = -1, vbi_line = -1;
  int dl_first [$];
  bit checking = 0, in_frame_dl = 0;
  logic nmi_q = 1'b1;
  always @(posedge clk) begin
    int h, v;
    if (checking) begin
      if (phi_en && dma_req) dma_line[vcnt]++;
      if (halt_n !== !dma_req) halt_bad++;
      if (phi_en && dma_req && dma_addr[15:12] == 4'h1 && !in_frame_dl) begin
        dl_first.push_back(int'(dma_addr)); in_frame_dl = 1;
      end
      if (vcnt == 0) in_frame_dl = 0;
      if (cc_en) begin
        logic [3:0] e;
        h = hcnt; v = vcnt;
        #1;
        e = expect_an(v, h);
        if ({an_hires, an} !== e) begin
          if (an_bad < 5) $display("FAIL AN line %0d cc %0d: got %b/%b expected %b", v, h, an_hires, an, e);
          an_bad++;
        end
      end
    end
  end

  initial begin
    logic [7:0] d;
    logic [8:0] v0;
    int n;
    foreach (mem[i]) mem[i] = 8'($urandom);
    for (int i = 0; i < 40; i++) mem[16'h2050 + i] = mem[16'h2050 + i] & 8'h7F;
    begin
      logic [7:0] dl [] = '{8'h70, 8'h70, 8'h70, 8'h4F, 8'h00, 8'h20, 8'h8F, 8'h02, 8'h0D,
                             8'h41, 8'h00, 8'h10};
      foreach (dl[i]) mem[16'h1000 + i] = dl[i];
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    bus_write(4'h2, 8'h00);
    bus_write(4'h3, 8'h10);
    bus_write(4'h9, 8'h30);
    bus_write(4'hE, 8'hC0);
    bus_write(4'h0, 8'h22);
    // run one frame to reach the JVB, then check two frames
    while (!(vcnt == 9'd261 && hcnt == 8'd227 && cc_en)) @(posedge clk);
    while (!(vcnt == 9'd261 && hcnt == 8'd227 && cc_en)) @(posedge clk);
    @(posedge clk);
    foreach (dma_line[i]) dma_line[i] = 0;
    checking = 1;
    for (int f = 0; f < 2; f++) begin
      dli_cnt = 0; vbi_cnt = 0;
      for (int c = 0; c < 262 * 228 * 4; c++) begin
        @(posedge clk);
        if (nmi_q && !nmi_n) begin
          if (vcnt >= 200) begin vbi_cnt++; vbi_line = vcnt; end
          else begin dli_cnt++; dli_line = vcnt; end
        end
        nmi_q = nmi_n;
      end
      check("DLI NMIs per frame", dli_cnt, 1);
      check("VBI NMIs per frame", vbi_cnt, 1);
      check("DLI line", dli_line, 33);
      check("VBI line", vbi_line, VBI_LINE);
    end
    checking = 0;
    check("AN code mismatches", an_bad, 0);
    check("halt_n differs from DMA", halt_bad, 0);
    check("DMA cycles fetching mode F LMS line", dma_line[31] / 2, 43);
    check("DMA cycles fetching mode F line", dma_line[32] / 2, 41);
    check("DMA cycles fetching mode 2 row 0", dma_line[33] / 2, 81);
    check("DMA cycles fetching mode 2 row 1", dma_line[34] / 2, 40);
    check("DMA cycles fetching a blank instruction", dma_line[7] / 2, 1);
    check("DMA cycles on a blank line", dma_line[10] / 2, 0);
    check("display list restarts each frame", dl_first.size() >= 2 ? int'(dl_first[0] == 16'h1000 && dl_first[1] == 16'h1000) : 0, 1);
    bus_read(4'hF, d); check("NMIST bits 7,6", d[7:6], 2'b11);
    bus_write(4'hF, 8'h00);
    bus_read(4'hF, d); check("NMIST after NMIRES", d[7:6], 2'b00);
    v0 = vcnt;
    bus_read(4'hB, d); check("VCOUNT", d, int'(vcnt[8:1]));
    // WSYNC
    while (hcnt != 8'd100) @(posedge clk);
    bus_write(4'hA, 8'h00);
    @(posedge clk);
    check("RDY low after WSYNC", rdy, 0);
    v0 = vcnt;
    n = 0;
    while (!rdy && n < 4000) begin @(posedge clk); n++; end
    // RDY rises at the end of colour clock 210, when the counter moves to 211
    check("WSYNC release colour clock", hcnt, 211);
    check("WSYNC release line", vcnt, v0);
    // light pen: a falling edge latches the beam position into PENH/PENV
    while (!(vcnt == 9'd120 && hcnt == 8'd150)) @(posedge clk);
    lpen_n = 1'b0;
    while (hcnt == 8'd150) @(posedge clk);
    repeat (40) @(posedge clk);
    lpen_n = 1'b1;
    bus_read(4'hC, d); check("PENH", d, 150);
    bus_read(4'hD, d); check("PENV", d, 60);
    // second display list at $17FD: it crosses the 1 KB boundary and wraps to
    // $1400; a horizontally scrolled mode F line, then two mode 2 lines with
    // vertical scrolling
    begin
      logic [7:0] dl2 [] = '{8'h70, 8'h70, 8'h70, 8'h5F, 8'h00, 8'h20, 8'h22, 8'h02,
                              8'h41, 8'hFD, 8'h17};
      foreach (dl2[i]) mem[(i < 3) ? 16'h17FD + i : 16'h1400 + i - 3] = dl2[i];
    end
    bus_write(4'h4, 8'(HS));
    bus_write(4'h5, 8'(VS));
    bus_write(4'h2, 8'hFD);
    bus_write(4'h3, 8'h17);
    // the current frame's JVB still jumps to $1000; the next display list
    // start reads DLIST again only after a new frame, so wait two frames
    while (!(vcnt == 9'd261 && hcnt == 8'd227 && cc_en)) @(posedge clk);
    bus_write(4'h2, 8'hFD);
    bus_write(4'h3, 8'h17);
    while (!(vcnt == 9'd261 && hcnt == 8'd227 && cc_en)) @(posedge clk);
    @(posedge clk);
    cfg = 1; an_bad = 0; checking = 1;
    repeat (262 * 228 * 4) @(posedge clk);
    checking = 0;
    check("AN mismatches with fine scrolling", an_bad, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #30000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
