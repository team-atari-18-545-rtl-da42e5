// GTIA: colour, players and missiles, priority and collision detection.
//
// GTIA receives one AN code per colour clock from ANTIC and turns it into
// pixels. Playfield codes select COLPF0-3, background selects COLBK; in the
// high-resolution modes the two half-clock pixels take the hue of COLPF2
// with the luminance of COLPF1 (bit 1) or COLPF2 (bit 0). Four 8-pixel
// players and four 2-pixel missiles are overlaid from GRAFP0-3/GRAFM at
// horizontal positions HPOSP/HPOSM (in colour clocks) with widths x1, x2 or
// x4 (SIZEP/SIZEM). With GRACTL bits 0/1 set the graphics bytes come from
// ANTIC's player/missile DMA at the start of each line.
//
// Every colour clock all overlaps are recorded in the 60 collision bits
// (missile-playfield, player-playfield, missile-player, player-player),
// cleared by HITCLR. The colour shown is that of the highest priority object
// present, else the background. PRIOR bits 3..0 choose one of the four
// priority orders of the original chip (1: players over playfield,
// 2: P0 P1 PF P2 P3, 4: playfield over players, 8: PF0 PF1 P P2... PF2 PF3);
// other values act as 1. PRIOR bit 4 is the fifth-player mode: the four
// missiles show COLPF3 with playfield-3 priority. Colours go through the
// colour table (color_lut) to 24-bit RGB.
//
// Output: instead of an NTSC signal GTIA writes each pixel straight into the
// 320x192 display buffer, 32 bits per pixel ({8'h00, R, G, B}), as the
// report did: one colour clock is two buffer pixels, written in the two clk
// cycles after the colour clock. Beam position is recovered from the AN
// codes: the end of horizontal blank is colour clock 32 and the playfield
// column 0 is colour clock 48; vertical blank restarts the row count.
// Registers (address bits 4..0) and their bit meanings are those of the
// original chip; the report gives their number (54) and purpose only.
// VDELAY is accepted and ignored; TRIG0-3 read the trigger inputs.
// CONSOL (1F): a write sets the four console output lines `consol_out`
// (bit 3 is the speaker on the original machine). A read gives the three
// console key lines `consol_n` (0 = pressed) in bits 2..0, each forced to 0
// while its output bit is 1, as on the original chip.
module gtia
  import atari_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cc_en,
  // register bus
  input  logic        cs,
  input  logic        we,
  input  logic        wr_en,       // bus write strobe (CPU cycle enable)
  input  logic [4:0]  addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  // from ANTIC
  input  an_e         an,
  input  logic        an_hires,
  input  logic [7:0]  pm_gfx [5],
  // controller triggers, low = pressed
  input  logic [3:0]  trig_n,
  // console keys, low = pressed, and console output lines
  input  logic [2:0]  consol_n,
  output logic [3:0]  consol_out,
  // display buffer write port
  output logic        buf_we,
  output logic [15:0] buf_addr,
  output logic [31:0] buf_data,
  // observation
  output logic        collision    // some collision bit is set
);
  logic [7:0] hposp [4];
  logic [7:0] hposm [4];
  logic [1:0] sizep [4];
  logic [7:0] sizem, grafm, prior, gractl;
  logic [7:0] grafp [4];
  logic [7:0] colpm [4];
  logic [7:0] colpf [4];
  logic [7:0] colbk;
  logic [3:0] mpf [4];
  logic [3:0] ppf [4];
  logic [3:0] mpl [4];
  logic [3:0] ppl [4];
  logic [7:0] h;
  logic [7:0] y;
  logic       first, prev_hb;
  logic       wr;

  assign wr = cs && we && wr_en;

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        hposp[i] <= '0; hposm[i] <= '0; sizep[i] <= '0; grafp[i] <= '0;
        colpm[i] <= '0; colpf[i] <= '0;
      end
      sizem <= '0; grafm <= '0; prior <= '0; gractl <= '0; colbk <= '0;
      consol_out <= '0;
    end else begin
      if (wr) begin
        unique case (addr)
          5'h00, 5'h01, 5'h02, 5'h03: hposp[addr[1:0]] <= din;
          5'h04, 5'h05, 5'h06, 5'h07: hposm[addr[1:0]] <= din;
          5'h08, 5'h09, 5'h0A, 5'h0B: sizep[addr[1:0]] <= din[1:0];
          5'h0C: sizem <= din;
          5'h0D, 5'h0E, 5'h0F, 5'h10: grafp[addr[1:0] - 2'd1] <= din;
          5'h11: grafm <= din;
          5'h12, 5'h13, 5'h14, 5'h15: colpm[addr[1:0] - 2'd2] <= din;
          5'h16, 5'h17, 5'h18, 5'h19: colpf[addr[1:0] - 2'd2] <= din;
          5'h1A: colbk  <= din;
          5'h1B: prior  <= din;
          5'h1D: gractl <= din;
          5'h1F: consol_out <= din[3:0];
          default: ;
        endcase
      end
      // ANTIC player/missile DMA reloads the graphics at the start of a line
      if (cc_en && an == AN_HBLANK && !prev_hb) begin
        if (gractl[0]) grafm <= pm_gfx[0];
        if (gractl[1]) for (int i = 0; i < 4; i++) grafp[i] <= pm_gfx[i + 1];
      end
    end
  end

  always_comb begin
    dout = 8'h00;
    unique case (addr[4:2])
      3'd0: dout = {4'h0, mpf[addr[1:0]]};
      3'd1: dout = {4'h0, ppf[addr[1:0]]};
      3'd2: dout = {4'h0, mpl[addr[1:0]]};
      3'd3: dout = {4'h0, ppl[addr[1:0]]};
      3'd4: dout = {7'd0, trig_n[addr[1:0]]};
      default: dout = (addr == 5'h1F) ? {5'd0, consol_n & ~consol_out[2:0]}
                                      : 8'h0F;  // PAL: NTSC machine
    endcase
  end

  // ---------------------------------------------------------- beam position
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h <= '0; y <= '0; first <= 1'b1; prev_hb <= 1'b0;
    end else if (cc_en) begin
      prev_hb <= an == AN_HBLANK;
      if (an == AN_VSYNC) begin
        y <= '0; first <= 1'b1;
      end else if (an == AN_HBLANK && !prev_hb) begin
        if (first) first <= 1'b0;
        else if (y != 8'hFF) y <= y + 8'd1;
      end
      h <= (an == AN_HBLANK) ? 8'(HBLANK_END) : h + 8'd1;
    end
  end

  // ---------------------------------------------------------- objects
  logic [3:0] p, m, pf;
  logic       visible;

  function automatic logic obj_bit(input logic [7:0] hh, input logic [7:0] pos,
                                   input logic [1:0] size, input logic [7:0] gfx,
                                   input logic [3:0] nbits);
    logic [7:0] d;
    logic [3:0] idx;
    d = hh - pos;
    unique case (size)
      2'b01:   idx = d[4:1];
      2'b11:   idx = d[5:2];
      default: idx = d[3:0];
    endcase
    if (hh < pos || idx >= nbits || (size == 2'b01 && d[7:5] != 0) ||
        (size == 2'b11 && d[7:6] != 0) || ((size == 2'b00 || size == 2'b10) && d[7:4] != 0))
      return 1'b0;
    return gfx[3'(nbits - 4'd1 - idx)];
  endfunction

  always_comb begin
    visible = an[2] || an == AN_BAK;
    for (int i = 0; i < 4; i++) begin
      p[i] = visible && obj_bit(h, hposp[i], sizep[i], grafp[i], 4'd8);
      m[i] = visible && obj_bit(h, hposm[i], sizem[2*i +: 2], {6'd0, grafm[2*i +: 2]}, 4'd2);
    end
    pf = 4'b0000;
    if (an[2]) begin
      if (an_hires) pf[2] = 1'b1;
      else pf[an[1:0]] = 1'b1;
    end
  end

  // ---------------------------------------------------------- collisions
  always_ff @(posedge clk) begin
    if (!rst_n || (wr && addr == 5'h1E)) begin
      for (int i = 0; i < 4; i++) begin mpf[i] <= '0; ppf[i] <= '0; mpl[i] <= '0; ppl[i] <= '0; end
    end else if (cc_en) begin
      for (int i = 0; i < 4; i++) begin
        mpf[i] <= mpf[i] | ({4{m[i]}} & pf);
        ppf[i] <= ppf[i] | ({4{p[i]}} & pf);
        mpl[i] <= mpl[i] | ({4{m[i]}} & p);
        for (int j = 0; j < 4; j++)
          if (i != j && p[i] && p[j]) ppl[i][j] <= 1'b1;
      end
    end
  end

  always_comb begin
    collision = 1'b0;
    for (int i = 0; i < 4; i++) collision = collision | (|mpf[i]) | (|ppf[i]) | (|mpl[i]) | (|ppl[i]);
  end

  // ---------------------------------------------------------- priority
  function automatic logic [7:0] resolve(input logic [3:0] pl, input logic [3:0] mi,
                                         input logic [3:0] pfv, input logic [7:0] pfc);
    logic       g01, g23, f01, f23;
    logic [7:0] c01, c23, cf01, cf23;
    logic [3:0] pe;
    // without fifth player a missile takes its player's colour and rank
    pe  = prior[4] ? pl : (pl | mi);
    g01 = pe[0] | pe[1];
    c01 = pe[0] ? colpm[0] : colpm[1];
    g23 = pe[2] | pe[3];
    c23 = pe[2] ? colpm[2] : colpm[3];
    f01 = pfv[0] | pfv[1];
    cf01 = pfv[0] ? colpf[0] : colpf[1];
    f23 = pfv[2] | pfv[3] | (prior[4] && mi != 4'b0000);
    cf23 = (prior[4] && mi != 4'b0000) ? colpf[3] : pfc;
    unique case (prior[3:0])
      4'b0010: return g01 ? c01 : f01 ? cf01 : f23 ? cf23 : g23 ? c23 : colbk;
      4'b0100: return f01 ? cf01 : f23 ? cf23 : g01 ? c01 : g23 ? c23 : colbk;
      4'b1000: return f01 ? cf01 : g01 ? c01 : g23 ? c23 : f23 ? cf23 : colbk;
      default: return g01 ? c01 : g23 ? c23 : f01 ? cf01 : f23 ? cf23 : colbk;
    endcase
  endfunction

  logic [7:0]  col_l, col_r, pf23c_l, pf23c_r;
  logic [23:0] rgb_l, rgb_r;

  always_comb begin
    if (an_hires && an[2]) begin
      pf23c_l = an[1] ? {colpf[2][7:4], colpf[1][3:0]} : colpf[2];
      pf23c_r = an[0] ? {colpf[2][7:4], colpf[1][3:0]} : colpf[2];
    end else begin
      pf23c_l = pf[3] ? colpf[3] : colpf[2];
      pf23c_r = pf23c_l;
    end
    col_l = resolve(p, m, pf, pf23c_l);
    col_r = resolve(p, m, pf, pf23c_r);
  end

  color_lut u_lut_l (.color(col_l), .rgb(rgb_l));
  color_lut u_lut_r (.color(col_r), .rgb(rgb_r));

  // ---------------------------------------------------------- buffer writes
  logic        pend0, pend1;
  logic [15:0] wa;
  logic [23:0] dr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend0 <= 1'b0; pend1 <= 1'b0; buf_we <= 1'b0; buf_addr <= '0; buf_data <= '0;
      wa <= '0; dr <= '0;
    end else begin
      buf_we <= 1'b0;
      if (cc_en) begin
        pend0 <= visible && h >= 8'(PF_LEFT) && h < 8'(PF_LEFT + PF_CC) && !first && y < 8'(BUF_H);
        wa    <= 16'(y) * 16'(BUF_W) + {7'd0, h - 8'(PF_LEFT), 1'b0};
        buf_data <= {8'h00, rgb_l};
        dr    <= rgb_r;
      end else if (pend0) begin
        pend0 <= 1'b0; pend1 <= 1'b1;
        buf_we <= 1'b1; buf_addr <= wa;
      end else if (pend1) begin
        pend1 <= 1'b0;
        buf_we <= 1'b1; buf_addr <= wa + 16'd1; buf_data <= {8'h00, dr};
      end
    end
  end
endmodule
