// ANTIC: display-list processor and playfield generator.
//
// ANTIC reads a display list from memory by DMA and turns it, scan line by
// scan line, into 3-bit AN playfield codes for GTIA. It takes the bus from
// the CPU for each DMA cycle by holding `halt_n` low for that cycle, makes
// the CPU wait for horizontal blank after a write to WSYNC (`rdy` low), and
// raises display-list (DLI) and vertical-blank (VBI) interrupts on `nmi_n`.
//
// Display list: an instruction's low nibble is the mode. Mode 0 shows
// ((bits 6..4) + 1) blank lines; mode 1 is a jump (bit 6 set: jump and wait
// for vertical blank); modes 2-F are the 6 character and 8 map modes of the
// mode table, with their bytes per line (narrow/normal/wide) and scan lines
// per mode line. Bit 6 of a mode instruction (LMS) loads the memory scan
// counter from the next two bytes; bit 7 requests a DLI at the end of the
// mode line. In character modes each screen byte points into the character
// set at CHBASE; the bitmap byte of the current row is fetched on every scan
// line. All this follows the report and its mode table.
//
// How it works (this design's own structure, the report gives only the two
// FSMs): the DMA sequencer (the "ANTIC FSM") works one line ahead. During
// scan line n it fetches player/missile bytes, the display list, screen data
// and character bitmaps for line n+1 into fetch buffers, one read per CPU
// cycle, each fetch issued in one cycle and captured at the end of it. At
// the end of the line the buffers move to display buffers, from which the
// pixel generator (the "instruction translation FSM") forms one AN code per
// colour clock. In the high-resolution modes 2, 3 and F each colour clock
// carries two pixels: AN = {1, left, right} with `an_hires` set.
//
// AN codes: 000 background, 001 vertical blank, 010 horizontal blank,
// 1pp playfield pp. Registers (address bits 3..0): write 0 DMACTL,
// 1 CHACTL, 2 DLISTL, 3 DLISTH, 4 HSCROL, 5 VSCROL, 7 PMBASE, 9 CHBASE,
// A WSYNC, E NMIEN, F NMIRES; read B VCOUNT, F NMIST. Register addresses and
// bit meanings are those of the original chip; read C PENH, D PENV.
// Fine scrolling: an instruction with bit 4 set fetches the next wider line
// (narrow->normal->wide) and shows it moved right by HSCROL[3:0] colour
// clocks inside the unchanged window. With bit 5 set, the first mode line of
// the scrolled region starts at row VSCROL[3:0] and the first mode line after
// the region ends at that row. The exact pixel offsets are this design's own.
// The display-list counter wraps inside its 1 KB block, hence the jumps
// across 1 KB boundaries that display lists need. Light pen: a falling edge
// on `lpen_n` latches the colour clock into PENH and VCOUNT into PENV.
// Mode 3 shows its rows 8 and 9 blank (no descenders).
// Timing: 228 colour clocks per line, 262 lines; lines 8..199 are displayed.
module antic
  import atari_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cc_en,
  input  logic        phi_en,
  // register bus
  input  logic        cs,
  input  logic        we,
  input  logic [3:0]  addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  // DMA
  output logic        dma_req,      // this CPU cycle belongs to ANTIC
  output logic [15:0] dma_addr,
  input  logic [7:0]  dma_din,
  output logic        halt_n,
  output logic        rdy,
  output logic        nmi_n,
  // to GTIA
  output an_e         an,
  output logic        an_hires,
  output logic [7:0]  pm_gfx [5],   // 0 missiles, 1..4 players 0..3
  // light pen
  input  logic        lpen_n,
  // observation
  output logic [8:0]  vcnt,
  output logic [7:0]  hcnt
);
  typedef enum logic [3:0] {
    F_IDLE, F_PM, F_DLCHK, F_DLW, F_DLDEC, F_JLO, F_JHI, F_JSET,
    F_LLO, F_LHI, F_LSET, F_SCRCHK, F_SCR, F_SCRW, F_CHR, F_DONE
  } fs_e;
  typedef enum logic [2:0] {T_NONE, T_PM, T_DL, T_LO, T_HI, T_SCR, T_CHR} tag_e;

  // registers
  logic [7:0]  dmactl, chactl, hscrol, vscrol, pmbase, chbase, nmien, nmist;
  logic [15:0] dlptr;
  logic [7:0]  penh, penv;
  logic        lpen_q;
  logic        wsync;
  logic [6:0]  cyc;

  // fetch side
  fs_e         fs;
  tag_e        tag;
  logic [5:0]  tidx, k;
  logic [7:0]  instr, lo_byte, hi_byte;
  logic [3:0]  mode;
  logic [4:0]  row, rows_total;
  logic        need_instr, jvb_wait, line_fetch, first_row, vs_prev;
  logic [15:0] msc;
  logic [7:0]  scr_buf [48];
  logic [7:0]  chr_buf [48];
  logic [7:0]  pm_buf [5];
  logic [2:0]  pmi;

  // display side
  logic [7:0]  dsp_buf [48];
  logic [7:0]  dsp_code [48];
  logic [3:0]  dsp_mode;
  logic [4:0]  dsp_row;
  logic        dsp_valid, dsp_dli, dsp_hs;
  logic [3:0]  nmi_cnt;

  // ---------------------------------------------------------- mode table
  function automatic logic [4:0] lines_of(input logic [3:0] m);
    unique case (m)
      4'h2, 4'h4, 4'h6, 4'h8: return 5'd8;
      4'h3:                   return 5'd10;
      4'h5, 4'h7:             return 5'd16;
      4'h9, 4'hA:             return 5'd4;
      4'hB, 4'hD:             return 5'd2;
      default:                return 5'd1;
    endcase
  endfunction

  function automatic logic [5:0] bytes_of(input logic [3:0] m, input logic [1:0] w);
    logic [1:0] cls;   // 0: 40-byte, 1: 20-byte, 2: 10-byte class
    cls = (m == 4'h8 || m == 4'h9) ? 2'd2
        : (m == 4'h6 || m == 4'h7 || m == 4'hA || m == 4'hB || m == 4'hC) ? 2'd1 : 2'd0;
    unique case ({cls, w})
      {2'd0, 2'd1}: return 6'd32;
      {2'd0, 2'd3}: return 6'd48;
      {2'd1, 2'd1}: return 6'd16;
      {2'd1, 2'd3}: return 6'd24;
      {2'd2, 2'd1}: return 6'd8;
      {2'd2, 2'd3}: return 6'd12;
      {2'd1, 2'd2}: return 6'd20;
      {2'd2, 2'd2}: return 6'd10;
      default:      return 6'd40;
    endcase
  endfunction

  function automatic logic is_char(input logic [3:0] m);
    return m >= 4'h2 && m <= 4'h7;
  endfunction

  logic [5:0] nbytes;
  logic [2:0] crow;
  logic [15:0] chr_addr, pm_addr;
  logic [8:0] fline;
  logic       in_fetch_window, dl_on;

  // a horizontally scrolled line (instruction bit 4) fetches the next wider width
  assign nbytes = bytes_of(mode, (instr[4] && dmactl[1:0] != 2'b11) ? dmactl[1:0] + 2'd1 : dmactl[1:0]);
  assign fline  = vcnt + 9'd1;
  assign in_fetch_window = fline >= 9'(FIRST_LINE) && fline < 9'(FIRST_LINE + DISP_LINES);
  assign dl_on  = dmactl[5] && dmactl[1:0] != 2'b00;

  // character row within the glyph for the line being fetched
  always_comb begin
    logic [4:0] r;
    r = (mode == 4'h5 || mode == 4'h7) ? {1'b0, row[4:1]} : row;
    crow = chactl[2] ? ~r[2:0] : r[2:0];
    if (mode == 4'h6 || mode == 4'h7)
      chr_addr = {chbase[7:1], 9'd0} + {7'd0, scr_buf[k][5:0], crow};
    else
      chr_addr = {chbase[7:2], 10'd0} + {6'd0, scr_buf[k][6:0], crow};
  end

  // player/missile address: single-line (DMACTL bit 4) or double-line
  always_comb begin
    if (dmactl[4])
      pm_addr = {pmbase[7:3], 11'd0} + (pmi == 3'd0 ? 16'h0300 : 16'h0300 + {5'd0, pmi, 8'd0}) + {7'd0, fline};
    else
      pm_addr = {pmbase[7:2], 10'd0} + (pmi == 3'd0 ? 16'h0180 : 16'h0180 + {6'd0, pmi, 7'd0}) + {8'd0, fline[8:1]};
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dmactl <= '0; chactl <= '0; hscrol <= '0; vscrol <= '0;
      pmbase <= '0; chbase <= '0; nmien <= '0; wsync <= 1'b0;
    end else begin
      if (cs && we && phi_en) begin
        unique case (addr)
          4'h0: dmactl <= din;
          4'h1: chactl <= din;
          4'h4: hscrol <= din;
          4'h5: vscrol <= din;
          4'h7: pmbase <= din;
          4'h9: chbase <= din;
          4'hA: wsync  <= 1'b1;
          4'hE: nmien  <= din;
          default: ;
        endcase
      end
      if (cc_en && hcnt == 8'(HBLANK_START - 14)) wsync <= 1'b0;
    end
  end
  assign rdy = ~wsync;

  always_comb begin
    unique case (addr)
      4'hB:    dout = vcnt[8:1];
      4'hC:    dout = penh;
      4'hD:    dout = penv;
      4'hF:    dout = {nmist[7:6], 6'b011111};
      default: dout = 8'hFF;
    endcase
  end

  // ---------------------------------------------------------- light pen
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      penh <= '0; penv <= '0; lpen_q <= 1'b1;
    end else if (cc_en) begin
      lpen_q <= lpen_n;
      if (lpen_q && !lpen_n) begin penh <= hcnt; penv <= vcnt[8:1]; end
    end
  end

  // ---------------------------------------------------------- beam counters
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcnt <= '0; vcnt <= '0; cyc <= '0;
    end else begin
      if (phi_en) cyc <= (cyc == 7'(CC_PER_LINE / 2 - 1)) ? 7'd0 : cyc + 7'd1;
      if (cc_en) begin
        if (hcnt == 8'(CC_PER_LINE - 1)) begin
          hcnt <= '0;
          vcnt <= (vcnt == 9'(LINES - 1)) ? 9'd0 : vcnt + 9'd1;
        end else hcnt <= hcnt + 8'd1;
      end
    end
  end

  // ---------------------------------------------------------- DMA sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fs <= F_IDLE; tag <= T_NONE; dma_req <= 1'b0; dma_addr <= '0;
      tidx <= '0; k <= '0; pmi <= '0; instr <= '0; lo_byte <= '0; hi_byte <= '0;
      mode <= '0; row <= '0; rows_total <= 5'd1; need_instr <= 1'b1;
      jvb_wait <= 1'b0; line_fetch <= 1'b0; msc <= '0; dlptr <= '0;
      first_row <= 1'b0; vs_prev <= 1'b0;
      for (int i = 0; i < 5; i++) pm_buf[i] <= '0;
    end else begin
      if (cs && we && phi_en && addr == 4'h2) dlptr[7:0]  <= din;
      if (cs && we && phi_en && addr == 4'h3) dlptr[15:8] <= din;
      if (phi_en) begin
        // capture the byte fetched in the cycle that ends now
        if (dma_req) begin
          unique case (tag)
            T_PM:  pm_buf[tidx[2:0]] <= dma_din;
            T_DL:  instr <= dma_din;
            T_LO:  lo_byte <= dma_din;
            T_HI:  hi_byte <= dma_din;
            T_SCR: scr_buf[tidx] <= dma_din;
            T_CHR: chr_buf[tidx] <= dma_din;
            default: ;
          endcase
        end
        dma_req <= 1'b0;
        tag     <= T_NONE;
        unique case (fs)
          F_IDLE: begin
            if (cyc == 7'd0) begin
              line_fetch <= in_fetch_window;
              if (fline == 9'(FIRST_LINE)) begin
                need_instr <= 1'b1;
                jvb_wait   <= 1'b0;
              end
              if (in_fetch_window) begin
                pmi <= '0;
                fs  <= (dmactl[3:2] != 2'b00) ? F_PM : F_DLCHK;
              end
            end
          end
          F_PM: begin
            if (pmi == 3'd0 ? dmactl[2] : dmactl[3]) begin
              dma_req <= 1'b1; dma_addr <= pm_addr; tag <= T_PM; tidx <= {3'd0, pmi};
            end
            pmi <= pmi + 3'd1;
            if (pmi == 3'd4) fs <= F_DLCHK;
          end
          F_DLCHK: begin
            if (dl_on && need_instr && !jvb_wait) begin
              dma_req <= 1'b1; dma_addr <= dlptr; tag <= T_DL;
              dlptr <= {dlptr[15:10], dlptr[9:0] + 10'd1};
              fs <= F_DLW;
            end else fs <= F_SCRCHK;
          end
          F_DLW: fs <= F_DLDEC;
          F_DLDEC: begin
            need_instr <= 1'b0;
            first_row  <= 1'b1;
            row  <= '0;
            mode <= instr[3:0];
            if (instr[3:0] != 4'h1) vs_prev <= instr[5] && instr[3:0] != 4'h0;
            if (instr[3:0] == 4'h0) begin
              rows_total <= {2'b00, instr[6:4]} + 5'd1;
              fs <= F_DONE;
            end else if (instr[3:0] == 4'h1 || instr[6]) begin
              rows_total <= (instr[3:0] == 4'h1) ? 5'd1 : lines_of(instr[3:0]);
              dma_req <= 1'b1; dma_addr <= dlptr; tag <= T_LO;
              dlptr <= {dlptr[15:10], dlptr[9:0] + 10'd1};
              fs <= (instr[3:0] == 4'h1) ? F_JLO : F_LLO;
            end else begin
              rows_total <= lines_of(instr[3:0]);
              fs <= F_SCRCHK;
            end
            // vertical scroll: the first scrolled mode line starts at row
            // VSCROL, the line after the scrolled region ends there
            if (instr[3:0] >= 4'h2) begin
              if (instr[5] && !vs_prev) row <= vscrol[4:0] & 5'h0F;
              else if (!instr[5] && vs_prev) rows_total <= (vscrol[4:0] & 5'h0F) + 5'd1;
            end
          end
          F_JLO, F_LLO: begin
            dma_req <= 1'b1; dma_addr <= dlptr; tag <= T_HI;
            dlptr <= {dlptr[15:10], dlptr[9:0] + 10'd1};
            fs <= (fs == F_JLO) ? F_JHI : F_LHI;
          end
          F_JHI: fs <= F_JSET;
          F_LHI: fs <= F_LSET;
          F_JSET: begin
            dlptr <= {hi_byte, lo_byte};
            if (instr[6]) jvb_wait <= 1'b1;
            fs <= F_DONE;
          end
          F_LSET: begin
            msc <= {hi_byte, lo_byte};
            fs  <= F_SCRCHK;
          end
          F_SCRCHK: begin
            k <= '0;
            if (!dl_on || jvb_wait || mode < 4'h2) fs <= F_DONE;
            else if (first_row) fs <= F_SCR;
            else if (is_char(mode)) fs <= F_CHR;
            else fs <= F_DONE;
          end
          F_SCR: begin
            dma_req <= 1'b1; dma_addr <= msc; tag <= T_SCR; tidx <= k;
            msc <= {msc[15:12], msc[11:0] + 12'd1};   // 4 KB wrap
            k <= k + 6'd1;
            if (k == nbytes - 6'd1) fs <= F_SCRW;
          end
          F_SCRW: begin
            k  <= '0;
            fs <= is_char(mode) ? F_CHR : F_DONE;
          end
          F_CHR: begin
            dma_req <= 1'b1; dma_addr <= chr_addr; tag <= T_CHR; tidx <= k;
            k <= k + 6'd1;
            if (k == nbytes - 6'd1) fs <= F_DONE;
          end
          default: begin   // F_DONE: wait for the next line
            if (cyc == 7'(CC_PER_LINE / 2 - 1)) begin
              fs <= F_IDLE;
              first_row <= 1'b0;
              if (line_fetch && dl_on && !jvb_wait) begin
                if (row + 5'd1 >= rows_total) need_instr <= 1'b1;
                else row <= row + 5'd1;
              end
            end
          end
        endcase
      end
    end
  end
  assign halt_n = ~dma_req;

  // ---------------------------------------------------------- line hand-over
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dsp_mode <= '0; dsp_row <= '0; dsp_valid <= 1'b0; dsp_dli <= 1'b0; dsp_hs <= 1'b0;
      for (int i = 0; i < 5; i++) pm_gfx[i] <= '0;
    end else if (phi_en && cyc == 7'(CC_PER_LINE / 2 - 1)) begin
      dsp_valid <= line_fetch;
      dsp_mode  <= (line_fetch && dl_on && !jvb_wait) ? mode : 4'h0;
      dsp_row   <= row;
      dsp_hs    <= instr[4] && mode >= 4'h2;
      dsp_dli   <= line_fetch && dl_on && !jvb_wait && instr[7] && (row + 5'd1 >= rows_total);
      for (int i = 0; i < 48; i++) begin
        dsp_buf[i]  <= is_char(mode) ? chr_buf[i] : scr_buf[i];
        dsp_code[i] <= scr_buf[i];
      end
      for (int i = 0; i < 5; i++) pm_gfx[i] <= line_fetch ? pm_buf[i] : 8'h00;
    end
  end

  // ---------------------------------------------------------- NMI
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nmist <= '0; nmi_cnt <= '0;
    end else begin
      if (cs && we && phi_en && addr == 4'hF) nmist <= '0;
      if (cc_en && hcnt == 8'(HBLANK_START) && dsp_valid && dsp_dli) begin
        nmist[7] <= 1'b1;
        if (nmien[7]) nmi_cnt <= 4'd8;
      end else if (cc_en && hcnt == 8'd0 && vcnt == 9'(VBI_LINE)) begin
        nmist[6] <= 1'b1;
        if (nmien[6]) nmi_cnt <= 4'd8;
      end else if (phi_en && nmi_cnt != 4'd0) nmi_cnt <= nmi_cnt - 4'd1;
    end
  end
  assign nmi_n = nmi_cnt == 4'd0;

  // ---------------------------------------------------------- pixel generator
  logic [7:0] left, right_edge, pos;
  logic [5:0] bi, dsp_bytes;
  logic [3:0] off;
  logic [7:0] bdat, code;

  assign dsp_bytes = bytes_of(dsp_mode, 2'd2);
  an_e        an_n;
  logic       hires_n;

  always_comb begin
    unique case (dmactl[1:0])
      2'd1:    begin left = 8'd64; right_edge = 8'd192; end
      2'd3:    begin left = 8'(HBLANK_END); right_edge = 8'(HBLANK_START); end
      default: begin left = 8'(PF_LEFT); right_edge = 8'(PF_LEFT + PF_CC); end
    endcase
    // a scrolled line is a wide line moved right by HSCROL colour clocks
    pos  = dsp_hs ? hcnt - 8'(HBLANK_END) - {4'd0, hscrol[3:0]} : hcnt - left;
    // colour clocks per byte: 4 (40-byte modes), 8 (20-byte) or 16 (10-byte)
    unique case (dsp_bytes)
      6'd40:   begin bi = {2'b00, pos[7:4]} * 6'd4 + {4'd0, pos[3:2]}; off = {2'b00, pos[1:0]}; end
      6'd20:   begin bi = {2'b00, pos[6:3]} + {1'b0, pos[7], 4'd0}; off = {1'b0, pos[2:0]}; end
      default: begin bi = {2'b00, pos[7:4]}; off = pos[3:0]; end
    endcase
    bdat = dsp_buf[bi];
    code = dsp_code[bi];
    if (dsp_mode == 4'h3 && dsp_row >= 5'd8) bdat = 8'h00;
    if ((dsp_mode == 4'h2 || dsp_mode == 4'h3) && code[7]) begin
      if (chactl[0]) bdat = 8'h00;
      if (chactl[1]) bdat = ~bdat;
    end
    hires_n = 1'b0;
    an_n    = AN_BAK;
    if (vcnt < 9'(FIRST_LINE) || vcnt >= 9'(FIRST_LINE + DISP_LINES)) an_n = AN_VSYNC;
    else if (hcnt < 8'(HBLANK_END) || hcnt >= 8'(HBLANK_START)) an_n = AN_HBLANK;
    else if (dsp_valid && hcnt >= left && hcnt < right_edge) begin
      logic [1:0] p2;
      logic       p1;
      p2 = 2'b00;
      p1 = 1'b0;
      unique case (dsp_mode)
        4'h2, 4'h3, 4'hF: begin
          hires_n = 1'b1;
          an_n = an_e'({1'b1, bdat[3'd7 - {off[1:0], 1'b0}], bdat[3'd6 - {off[1:0], 1'b0}]});
        end
        4'h4, 4'h5, 4'hD, 4'hE: begin
          p2 = {bdat[3'd7 - {off[1:0], 1'b0}], bdat[3'd6 - {off[1:0], 1'b0}]};
          if (p2 != 2'b00)
            an_n = an_e'({1'b1, (p2 == 2'b11 && code[7] && dsp_mode <= 4'h5) ? 2'b11 : p2 - 2'd1});
        end
        4'h6, 4'h7: begin
          p1 = bdat[3'd7 - off[2:0]];
          if (p1) an_n = an_e'({1'b1, code[7:6]});
        end
        4'h8: begin
          p2 = {bdat[3'd7 - {off[3:2], 1'b0}], bdat[3'd6 - {off[3:2], 1'b0}]};
          if (p2 != 2'b00) an_n = an_e'({1'b1, p2 - 2'd1});
        end
        4'hA: begin
          p2 = {bdat[3'd7 - {off[2:1], 1'b0}], bdat[3'd6 - {off[2:1], 1'b0}]};
          if (p2 != 2'b00) an_n = an_e'({1'b1, p2 - 2'd1});
        end
        4'h9: begin
          p1 = bdat[3'd7 - off[3:1]];
          if (p1) an_n = AN_PF0;
        end
        4'hB, 4'hC: begin
          p1 = bdat[3'd7 - off[2:0]];
          if (p1) an_n = AN_PF0;
        end
        default: an_n = AN_BAK;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      an <= AN_VSYNC; an_hires <= 1'b0;
    end else if (cc_en) begin
      an <= an_n; an_hires <= hires_n;
    end
  end
endmodule
