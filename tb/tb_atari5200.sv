// End-to-end testbench of the atari5200 console at its default size.
//
// The testbench plays the parts outside the console: a 2 KB BIOS ROM, a
// 32 KB cartridge ROM, a keypad, the pot RC networks and a 25 MHz pixel
// clock. The BIOS holds a small 6502 program, assembled by the testbench
// at time 0 (emit tasks below), that sets up the display like a game:
// display list, colours, a quad-width player, a POKEY tone and timer,
// key and pot scanning, DLI and VBI interrupts, then loops on WSYNC. Its
// NMI handler counts DLIs and VBIs in zero page and reads POT0 during the
// VBI; its IRQ handler counts timer and key interrupts and stores KBCODE.
// The cartridge holds the display list (24 blank lines, 16 mode F lines,
// one mode 2 line with a DLI, 4 mode D lines, JVB) and random screen and
// character data.
//
// Four video frames are run. Each mechanism is counted and a count of zero
// is a failure: ANTIC DMA stalls of the CPU, WSYNC stalls, DLI and VBI NMIs
// taken by the CPU, timer and key IRQs taken, pot scan result, player /
// playfield collision, display-buffer writes, audio level changes, DVI frames
// and their data-enable clocks. The frame contents are checked too: pixels
// of a blank line (background and player colours) and of the first mode F
// line (the two high-resolution colours) are compared with the colour table.
module tb_atari5200;
  logic clk = 1'b0, rst_n = 1'b0, clk_pix = 1'b0, rst_pix_n = 1'b0;
  logic [14:0] cart_addr;
  logic        cart_cs;
  logic [7:0]  cart_data, bios_data;
  logic [10:0] bios_addr;
  logic [3:0]  kp_row_l, kp_col, trig_n = 4'hF;
  logic        lpen_n = 1'b1, sio_out;
  logic [2:0]  consol_n = 3'b111;
  logic [3:0]  consol_out;
  logic        kr2_l = 1'b1, pot_dump;
  logic [7:0]  pot_in;
  logic [5:0]  audio;
  logic [7:0]  vid_r, vid_g, vid_b;
  logic        vid_hsync_n, vid_vsync_n, vid_de;
  logic [15:0] bus_addr;
  logic        cpu_sync, cpu_stalled, collision, frame_start;
  int checks = 0, failures = 0;

  atari5200 dut (.clk, .rst_n, .clk_pix, .rst_pix_n, .cart_addr, .cart_cs, .cart_data,
                 .bios_addr, .bios_data, .kp_row_l, .kp_col, .kr2_l, .pot_in, .pot_dump, .trig_n, .lpen_n,
                 .consol_n, .consol_out, .sio_out, .sio_in(sio_out),
                 .audio, .vid_r, .vid_g, .vid_b, .vid_hsync_n, .vid_vsync_n, .vid_de, .bus_addr,
                 .cpu_sync, .cpu_stalled, .collision, .frame_start);

  // 14.318 MHz master clock (69.84 ns) and 25.175 MHz pixel clock (39.72 ns)
  always #34.92 clk = ~clk;
  always #19.86 clk_pix = ~clk_pix;

  // ---------------------------------------------------------- ROM models
  logic [7:0] bios [2048];
  logic [7:0] cart [32768];
  assign bios_data = bios[bios_addr];
  assign cart_data = cart[cart_addr];

  int pc;
  task automatic emit(input logic [7:0] b); bios[pc - 16'hF800] = b; pc++; endtask
  task automatic emit2(input logic [7:0] op, input logic [7:0] v); emit(op); emit(v); endtask
  task automatic emit3(input logic [7:0] op, input int a); emit(op); emit(8'(a)); emit(8'(a >> 8)); endtask
  task automatic lda_sta(input logic [7:0] v, input int a); emit2(8'hA9, v); emit3(8'h8D, a); endtask
  task automatic vec(input int at, input int a); bios[at - 16'hF800] = 8'(a); bios[at - 16'hF800 + 1] = 8'(a >> 8); endtask

  task automatic build_program();
    int loop, br, done;
    foreach (bios[i]) bios[i] = 8'hEA;
    pc = 16'hF800;
    emit(8'h78); emit(8'hD8); emit2(8'hA2, 8'hFF); emit(8'h9A);      // SEI CLD LDX #$FF TXS
    emit2(8'hA9, 8'h00);                                               // clear the counters
    for (int a = 16'h80; a <= 16'h86; a++) emit2(8'h85, 8'(a));
    lda_sta(8'h00, 16'hD402); lda_sta(8'h40, 16'hD403);                 // DLIST = $4000
    lda_sta(8'h60, 16'hD409);                                          // CHBASE = $6000
    lda_sta(8'h46, 16'hC016); lda_sta(8'h8A, 16'hC017);                 // COLPF0, COLPF1
    lda_sta(8'h24, 16'hC018); lda_sta(8'hC6, 16'hC019);                 // COLPF2, COLPF3
    lda_sta(8'h94, 16'hC01A); lda_sta(8'h3C, 16'hC012);                 // COLBK, COLPM0
    lda_sta(8'd120, 16'hC000); lda_sta(8'hFF, 16'hC00D);                // HPOSP0, GRAFP0
    lda_sta(8'h03, 16'hC008);                                          // SIZEP0 quad
    lda_sta(8'hA8, 16'hE801); lda_sta(8'hFF, 16'hE800);                 // AUDC1, AUDF1
    lda_sta(8'h00, 16'hE808); lda_sta(8'h06, 16'hE80F);                 // AUDCTL, SKCTL
    lda_sta(8'h41, 16'hE80E);                                          // IRQEN timer 1 + key
    emit3(8'h8D, 16'hE809); emit3(8'h8D, 16'hE80B);                    // STIMER, POTGO
    lda_sta(8'hC0, 16'hD40E); lda_sta(8'h22, 16'hD400);                 // NMIEN, DMACTL
    emit(8'h58);                                                       // CLI
    loop = pc;
    emit3(8'h8D, 16'hD40A); emit2(8'hE6, 8'h80); emit3(8'h4C, loop);   // STA WSYNC, INC $80, JMP
    // NMI handler
    vec(16'hFFFA, pc);
    emit(8'h48);                                                       // PHA
    emit3(8'hAD, 16'hD40F); emit3(8'h8D, 16'hD40F);                    // LDA NMIST, STA NMIRES
    br = pc; emit2(8'h30, 8'h00);                                      // BMI dli
    emit2(8'hE6, 8'h82);                                               // INC $82 (VBI)
    emit3(8'hAD, 16'hE800); emit2(8'h85, 8'h86);                       // LDA POT0, STA $86
    emit3(8'h8D, 16'hE80B);                                            // POTGO
    done = pc; emit3(8'h4C, 0);
    bios[br + 1 - 16'hF800] = 8'(pc - (br + 2));
    emit2(8'hE6, 8'h81);                                               // dli: INC $81
    bios[done + 1 - 16'hF800] = 8'(pc); bios[done + 2 - 16'hF800] = 8'(pc >> 8);
    emit(8'h68); emit(8'h40);                                          // PLA RTI
    // IRQ handler
    vec(16'hFFFE, pc);
    emit(8'h48);
    emit3(8'hAD, 16'hE80E); emit2(8'h85, 8'h90);                       // LDA IRQST, STA $90
    emit2(8'h29, 8'h01); emit2(8'hD0, 8'h02); emit2(8'hE6, 8'h83);     // timer: INC $83
    emit2(8'hA5, 8'h90); emit2(8'h29, 8'h40); emit2(8'hD0, 8'h07);
    emit2(8'hE6, 8'h84); emit3(8'hAD, 16'hE809); emit2(8'h85, 8'h85);  // key: INC $84, KBCODE
    lda_sta(8'h00, 16'hE80E); lda_sta(8'h41, 16'hE80E);                 // acknowledge, re-enable
    emit(8'h68); emit(8'h40);
    vec(16'hFFFC, 16'hF800);
  endtask

  task automatic build_cart();
    int p;
    foreach (cart[i]) cart[i] = 8'($urandom);
    p = 0;
    cart[p++] = 8'h70; cart[p++] = 8'h70; cart[p++] = 8'h70;
    cart[p++] = 8'h4F; cart[p++] = 8'h00; cart[p++] = 8'h50;          // LMS $5000 mode F
    for (int i = 0; i < 15; i++) cart[p++] = 8'h0F;
    cart[p++] = 8'h82;                                                 // mode 2 with DLI
    for (int i = 0; i < 4; i++) cart[p++] = 8'h0D;
    cart[p++] = 8'h41; cart[p++] = 8'h00; cart[p++] = 8'h40;          // JVB $4000
    for (int i = 0; i < 40; i++) cart[16'h1280 + i] &= 8'h7F;         // mode 2 screen bytes
  endtask

  // ---------------------------------------------------------- controller models
  // key at row 1, column 2 pulls column 2 low while row 1 is driven low
  bit key_down = 0;
  always_comb begin
    kp_col = 4'b1111;
    if (key_down && !kp_row_l[1]) kp_col[2] = 1'b0;
  end
  localparam int POT_TARGET = 77;
  int since_release = 0;
  always @(posedge clk) if (dut.phi_en) since_release <= pot_dump ? 0 : since_release + 1;
  always_comb begin
    pot_in = 8'h00;
    pot_in[0] = !pot_dump && since_release >= POT_TARGET;
  end

  // ---------------------------------------------------------- colour table
  logic [7:0] lut_in = '0;
  logic [23:0] lut_out, lut [256];
  color_lut u_ref (.color(lut_in), .rgb(lut_out));

  // ---------------------------------------------------------- mechanism counters
  int n_dma = 0, n_wsync = 0, n_nmi_dli = 0, n_nmi_vbi = 0, n_irq = 0, n_buf = 0, n_audio = 0;
  int n_loop = 0, loop0;
  int n_frames = 0, n_de = 0, de_at_start = 0, n_ram_wr = 0;
  logic nmi_q = 1'b1, irq_q = 1'b1;
  logic [5:0] audio_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.phi_en && dut.antic_dma) n_dma++;
    if (dut.phi_en && !dut.antic_rdy && !dut.cpu_halt_n) n_wsync++;
    if (dut.phi_en && dut.bus_we && dut.bus_addr == 16'h0080) n_loop++;
    if (nmi_q && !dut.antic_nmi_n) begin
      if (dut.vcnt >= 200) n_nmi_vbi++; else n_nmi_dli++;
    end
    if (irq_q && !dut.pokey_irq_n) n_irq++;
    nmi_q = dut.antic_nmi_n; irq_q = dut.pokey_irq_n;
    if (dut.buf_we) n_buf++;
    if (audio != audio_q) n_audio++;
    audio_q = audio;
    if (dut.phi_en && dut.bus_we && dut.sel_ram) n_ram_wr++;
  end
  // data-enable clocks are counted from the first frame start on
  always @(posedge clk_pix) if (rst_pix_n) begin
    if (frame_start) begin n_frames++; de_at_start = n_de; end
    if (vid_de && n_frames > 0) n_de++;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic happened(input string what, input int n);
    checks++;
    $display("count %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask
  function automatic logic [23:0] pixel(input int x, input int y);
    return dut.u_buf.mem[y * 320 + x][23:0];
  endfunction

  initial begin
    int bad;
    logic [7:0] bt, zp_vbi0;
    for (int i = 0; i < 256; i++) begin lut_in = 8'(i); #1 lut[i] = lut_out; end
    build_program();
    build_cart();
    repeat (4) @(posedge clk);
    rst_n = 1'b1; rst_pix_n = 1'b1;
    // frame 1 and 2: display running; press the key during frame 2
    repeat (262 * 228 * 4) @(posedge clk);
    key_down = 1;
    repeat (262 * 228 * 4) @(posedge clk);
    key_down = 0;
    zp_vbi0 = dut.u_ram.mem[16'h82];
    loop0 = n_loop;
    repeat (2 * 262 * 228 * 4) @(posedge clk);
    happened("ANTIC DMA stall cycles", n_dma);
    happened("WSYNC stall cycles", n_wsync);
    happened("DLI NMIs", n_nmi_dli);
    happened("VBI NMIs", n_nmi_vbi);
    happened("POKEY IRQs", n_irq);
    happened("DLIs handled by the CPU", dut.u_ram.mem[16'h81]);
    happened("VBIs handled by the CPU", dut.u_ram.mem[16'h82]);
    happened("timer IRQs handled", dut.u_ram.mem[16'h83]);
    happened("key IRQs handled", dut.u_ram.mem[16'h84]);
    happened("WSYNC loop passes", dut.u_ram.mem[16'h80]);
    happened("RAM writes", n_ram_wr);
    happened("display buffer writes", n_buf);
    happened("audio level changes", n_audio);
    happened("DVI frames", n_frames);
    happened("collision output", collision);
    check("VBIs in the last two frames", 8'(dut.u_ram.mem[16'h82] - zp_vbi0), 2);
    // WSYNC holds the loop to one pass per scan line: 524 lines, less
    // the lines whose WSYNC release an interrupt handler ran through.
    // INC zero page writes twice per pass (read-modify-write).
    checks++;
    if ((n_loop - loop0) / 2 < 500 || (n_loop - loop0) / 2 > 524) begin
      failures++; $display("FAIL %0d WSYNC loop passes in two frames", (n_loop - loop0) / 2);
    end
    check("KBCODE of row 1 column 2", dut.u_ram.mem[16'h85][3:0], 4'(~4'b0110));
    checks++;
    if (dut.u_ram.mem[16'h86] < POT_TARGET || dut.u_ram.mem[16'h86] > POT_TARGET + 3) begin
      failures++; $display("FAIL POT0 = %0d for %0d", dut.u_ram.mem[16'h86], POT_TARGET);
    end
    check("DE clocks per DVI frame", de_at_start / (n_frames - 1), 640 * 480);
    // blank line 0: background left, quad-width player at colour clock 120
    check("background pixel", pixel(0, 0), lut[8'h94]);
    check("player pixel", pixel(2 * (120 - 48) + 10, 0), lut[8'h3C]);
    check("pixel right of player", pixel(2 * (120 - 48) + 64, 0), lut[8'h94]);
    // first mode F line (display row 24): two high-resolution colours
    bad = 0;
    for (int x = 0; x < 2 * (120 - 48); x++) begin
      bt = cart[16'h1000 + x / 8];
      if (pixel(x, 24) != (bt[7 - x % 8] ? lut[8'h2A] : lut[8'h24])) bad++;
    end
    check("mode F pixels", bad, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #80000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
