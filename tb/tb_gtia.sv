// Testbench of gtia. An AN-code generator plays ANTIC's part: 262 lines of
// 228 colour clocks with vertical blank, horizontal blank and, in the 160
// playfield colour clocks, random codes; odd lines are high-resolution.
// Two players (one double width, overlapping) and a missile are placed on
// the playfield. Every one of the 61440 display-buffer pixels of a frame is
// compared with a reference model for priority 1 (players over playfield)
// and priority 4 (playfield over players); colours are converted with a
// separate colour-table instance. Also checked: all 16 collision registers
// against the model, HITCLR, the collision output, TRIG and CONSOL, and that
// nothing is written outside the buffer.
module tb_gtia;
  import atari_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cc_en, phi_en, phi2;
  logic cs = 1'b0, we = 1'b0, wr_en = 1'b0;
  logic [4:0] addr = '0;
  logic [7:0] din = '0, dout;
  an_e an = AN_VSYNC;
  logic an_hires = 1'b0;
  logic [7:0] pm_gfx [5];
  logic [3:0] trig_n = 4'b1010;
  logic [2:0] consol_n = 3'b101;
  logic [3:0] consol_out;
  logic buf_we, collision;
  logic [15:0] buf_addr;
  logic [31:0] buf_data;
  int checks = 0, failures = 0;

  clock_gen u_clk (.clk, .rst_n, .cc_en, .phi_en, .phi2);
  gtia dut (.clk, .rst_n, .cc_en, .cs, .we, .wr_en, .addr, .din, .dout, .an, .an_hires, .pm_gfx,
            .trig_n, .consol_n, .consol_out, .buf_we, .buf_addr, .buf_data, .collision);
  always #5 clk = ~clk;

  // reference colour table
  logic [7:0] lut_in = '0;
  logic [23:0] lut_out;
  logic [23:0] lut [256];
  color_lut u_ref (.color(lut_in), .rgb(lut_out));

  logic [7:0] colpm [4], colpf [4], colbk;
  logic [7:0] prior = 8'h01;
  logic [23:0] exp_pix [BUF_W * BUF_H];
  logic [23:0] got_pix [BUF_W * BUF_H];
  logic [3:0] e_mpf [4], e_ppf [4], e_mpl [4], e_ppl [4];
  int bad_addr = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic reg_write(input logic [4:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1'b1; we = 1'b1; wr_en = 1'b1; addr = a; din = d;
    @(negedge clk); cs = 1'b0; we = 1'b0; wr_en = 1'b0;
  endtask
  task automatic reg_read(input logic [4:0] a, output logic [7:0] d);
    @(negedge clk); cs = 1'b1; addr = a; #1 d = dout;
    @(negedge clk); cs = 1'b0;
  endtask

  function automatic logic obj(input int h, input int pos, input int w, input logic [7:0] g, input int nb);
    int d;
    d = h - pos;
    if (d < 0 || d >= nb * w) return 1'b0;
    return g[nb - 1 - d / w];
  endfunction

  function automatic logic [7:0] pick(input logic [3:0] pe, input logic [3:0] pf, input logic [7:0] pfc);
    logic [7:0] pcol, fcol;
    logic has_p, has_f;
    has_p = pe != 0;
    pcol = pe[0] ? colpm[0] : pe[1] ? colpm[1] : pe[2] ? colpm[2] : colpm[3];
    has_f = pf != 0;
    fcol = pf[0] ? colpf[0] : pf[1] ? colpf[1] : pfc;
    if (prior[2]) return has_f ? fcol : has_p ? pcol : colbk;
    return has_p ? pcol : has_f ? fcol : colbk;
  endfunction

  // AN generator and model: (v, h) is the colour clock now on the AN lines
  int v = 0, h = 0;
  always @(posedge clk) begin
    if (cc_en && rst_n) begin
      logic [2:0] c;
      logic hr;
      int nv, nh;
      // model the colour clock being presented now
      if (v >= FIRST_LINE && v < FIRST_LINE + DISP_LINES && h >= PF_LEFT && h < PF_LEFT + PF_CC) begin
        logic [3:0] p, m, pe, pf;
        logic [7:0] pfc_l, pfc_r;
        p[0] = obj(h, 100, 1, 8'hF0, 8); p[1] = obj(h, 102, 2, 8'h81, 8);
        p[2] = 1'b0; p[3] = 1'b0;
        m = 4'b0000; m[1] = obj(h, 150, 1, 8'h03, 2);
        pe = p | m;
        pf = 4'b0000;
        pfc_l = colpf[2]; pfc_r = colpf[2];
        if (an[2]) begin
          if (an_hires) begin
            pf[2] = 1'b1;
            if (an[1]) pfc_l = {colpf[2][7:4], colpf[1][3:0]};
            if (an[0]) pfc_r = {colpf[2][7:4], colpf[1][3:0]};
          end else begin
            pf[an[1:0]] = 1'b1;
            if (an[1:0] == 2'b11) begin pfc_l = colpf[3]; pfc_r = colpf[3]; end
          end
        end
        exp_pix[(v - FIRST_LINE) * BUF_W + 2 * (h - PF_LEFT)]     = lut[pick(pe, pf, pfc_l)];
        exp_pix[(v - FIRST_LINE) * BUF_W + 2 * (h - PF_LEFT) + 1] = lut[pick(pe, pf, pfc_r)];
        for (int i = 0; i < 4; i++) begin
          e_mpf[i] |= {4{m[i]}} & pf;
          e_ppf[i] |= {4{p[i]}} & pf;
          e_mpl[i] |= {4{m[i]}} & p;
          for (int j = 0; j < 4; j++) if (i != j && p[i] && p[j]) e_ppl[i][j] = 1'b1;
        end
      end
      // drive the next colour clock
      nh = (h == CC_PER_LINE - 1) ? 0 : h + 1;
      nv = (h == CC_PER_LINE - 1) ? ((v == LINES - 1) ? 0 : v + 1) : v;
      hr = nv[0];
      if (nv < FIRST_LINE || nv >= FIRST_LINE + DISP_LINES) c = AN_VSYNC;
      else if (nh < HBLANK_END || nh >= HBLANK_START) c = AN_HBLANK;
      else if (nh >= PF_LEFT && nh < PF_LEFT + PF_CC) c = hr ? {1'b1, 2'($urandom)} : 3'($urandom % 8 < 4 ? 0 : 4 + $urandom % 4);
      else c = AN_BAK;
      an <= an_e'(c);
      an_hires <= hr && c[2] && nh >= PF_LEFT && nh < PF_LEFT + PF_CC;
      h = nh; v = nv;
    end
    if (buf_we) begin
      if (int'(buf_addr) >= BUF_W * BUF_H) bad_addr++;
      else got_pix[buf_addr] = buf_data[23:0];
    end
  end

  task automatic run_frame_and_compare(input string what);
    int bad = 0;
    foreach (got_pix[i]) got_pix[i] = 24'hXXXXXX;
    while (!(v == 0 && h == 0)) @(posedge clk);
    @(posedge clk);
    while (!(v == 0 && h == 0)) @(posedge clk);
    repeat (8) @(posedge clk);
    foreach (exp_pix[i])
      if (got_pix[i] !== exp_pix[i]) begin
        if (bad < 5) $display("FAIL %s pixel %0d,%0d: got %h expected %h", what, i % BUF_W, i / BUF_W, got_pix[i], exp_pix[i]);
        bad++;
      end
    check({what, " pixel mismatches"}, bad, 0);
  endtask

  initial begin
    logic [7:0] d;
    for (int i = 0; i < 256; i++) begin lut_in = 8'(i); #1 lut[i] = lut_out; end
    for (int i = 0; i < 5; i++) pm_gfx[i] = 8'h00;
    for (int i = 0; i < 4; i++) begin
      colpm[i] = 8'($urandom); colpf[i] = 8'($urandom);
      e_mpf[i] = 0; e_ppf[i] = 0; e_mpl[i] = 0; e_ppl[i] = 0;
    end
    colbk = 8'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin reg_write(5'h12 + 5'(i), colpm[i]); reg_write(5'h16 + 5'(i), colpf[i]); end
    reg_write(5'h1A, colbk);
    reg_write(5'h00, 8'd100); reg_write(5'h0D, 8'hF0);
    reg_write(5'h01, 8'd102); reg_write(5'h0E, 8'h81); reg_write(5'h09, 8'h01);
    reg_write(5'h05, 8'd150); reg_write(5'h11, 8'h0C);
    reg_write(5'h1B, 8'h01);
    reg_write(5'h1E, 8'h00);
    for (int i = 0; i < 4; i++) begin e_mpf[i] = 0; e_ppf[i] = 0; e_mpl[i] = 0; e_ppl[i] = 0; end
    run_frame_and_compare("priority 1");
    for (int i = 0; i < 4; i++) begin
      reg_read(5'(i), d);      check($sformatf("M%0dPF", i), d, e_mpf[i]);
      reg_read(5'(4 + i), d);  check($sformatf("P%0dPF", i), d, e_ppf[i]);
      reg_read(5'(8 + i), d);  check($sformatf("M%0dPL", i), d, e_mpl[i]);
      reg_read(5'(12 + i), d); check($sformatf("P%0dPL", i), d, e_ppl[i]);
    end
    check("collision output", collision, 1);
    reg_write(5'h1E, 8'h00);
    for (int i = 0; i < 16; i++) begin reg_read(5'(i), d); check("after HITCLR", d, 0); end
    reg_read(5'h10, d); check("TRIG0", d, 0);
    reg_read(5'h11, d); check("TRIG1", d, 1);
    reg_read(5'h1F, d); check("CONSOL keys", d, 8'h05);
    reg_write(5'h1F, 8'h09);
    check("CONSOL output lines", consol_out, 4'h9);
    reg_read(5'h1F, d); check("CONSOL key 0 forced low", d, 8'h04);
    reg_write(5'h1F, 8'h00);
    prior = 8'h04;
    reg_write(5'h1B, 8'h04);
    run_frame_and_compare("priority 4");
    check("writes outside the buffer", bad_addr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
