// Atari 5200 console: top level.
//
// The console is four chips on one 8-bit bus: the 6502C CPU, ANTIC (display
// list DMA), GTIA (colour, sprites, collisions) and POKEY (keyboard,
// joystick pots, sound, IRQs), with 16 KB of RAM, the cartridge and the BIOS
// ROM. ANTIC takes the bus for DMA by halting the CPU (HALT) and stalls it
// for WSYNC (its RDY output, merged into HALT here, as the CPU model has no
// separate RDY input). ANTIC's DLI/VBI go to the CPU's NMI, POKEY's IRQ_L to
// its IRQ. Instead of a television signal, GTIA writes pixels into a 320x192
// display buffer that a 640x480 scan-out reads at 25 MHz for an external DVI
// transmitter; the keypad is scanned through keypad_if.
//
// Clocks: `clk` is the 14.318 MHz master clock, four times the 3.58 MHz
// colour clock; the CPU and bus run at 1.79 MHz on the clock enable `phi_en`.
// `clk_pix` is the 25 MHz DVI pixel clock. `rst_n` is a synchronous reset
// for the `clk` domain; the scan-out uses `rst_pix_n`.
// The cartridge and BIOS ROMs are outside this design: their address and
// data buses are ports. The same holds for the controller (keypad rows and
// columns, pot lines, triggers), the light pen, the console key and output
// lines of GTIA's CONSOL, POKEY's serial port, the speaker (6-bit audio
// level) and the DVI transmitter (parallel RGB, syncs, data-enable).
module atari5200
  import atari_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_pix,
  input  logic        rst_pix_n,
  // cartridge, 4000-BFFF
  output logic [14:0] cart_addr,
  output logic        cart_cs,
  input  logic [7:0]  cart_data,
  // BIOS ROM, F800-FFFF
  output logic [10:0] bios_addr,
  input  logic [7:0]  bios_data,
  // controller
  output logic [3:0]  kp_row_l,     // connector pins 5-8
  input  logic [3:0]  kp_col,       // connector pins 1-4
  input  logic        kr2_l,
  input  logic [7:0]  pot_in,
  output logic        pot_dump,
  input  logic [3:0]  trig_n,
  input  logic        lpen_n,       // light pen, to ANTIC
  input  logic [2:0]  consol_n,     // console keys to GTIA, low = pressed
  output logic [3:0]  consol_out,   // GTIA CONSOL output lines
  output logic        sio_out,      // POKEY serial output
  input  logic        sio_in,       // POKEY serial input
  // audio
  output logic [5:0]  audio,
  // video to the DVI transmitter
  output logic [7:0]  vid_r,
  output logic [7:0]  vid_g,
  output logic [7:0]  vid_b,
  output logic        vid_hsync_n,
  output logic        vid_vsync_n,
  output logic        vid_de,
  // observation of the bus
  output logic [15:0] bus_addr,
  output logic        cpu_sync,
  output logic        cpu_stalled,
  output logic        collision,    // GTIA has a collision bit set
  output logic        frame_start   // scan-out starts a frame
);
  logic        cc_en, phi_en, phi2;
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_dout, bus_rdata;
  logic        cpu_rw, cpu_bus_free;
  logic        cpu_halt_n, bus_we;
  logic        antic_dma, antic_halt_n, antic_rdy, antic_nmi_n;
  logic [15:0] antic_addr;
  logic [7:0]  antic_dout, gtia_dout, pokey_dout, ram_dout;
  an_e         an;
  logic        an_hires;
  logic [7:0]  pm_gfx [5];
  logic [8:0]  vcnt;
  logic [7:0]  hcnt;
  logic        sel_ram, sel_cart, sel_gtia, sel_antic, sel_pokey, sel_bios;
  logic        pokey_irq_n, kr1_l;
  logic [5:0]  key_scan_l;
  logic        buf_we;
  logic [15:0] buf_waddr, buf_raddr;
  logic [31:0] buf_wdata, buf_rdata;

  clock_gen u_clk (.clk, .rst_n, .cc_en, .phi_en, .phi2);

  // bus master: ANTIC during its DMA cycles, else the CPU
  assign cpu_halt_n  = antic_halt_n & antic_rdy;
  assign bus_addr    = antic_dma ? antic_addr : cpu_addr;
  assign bus_we      = !antic_dma && cpu_halt_n && !cpu_rw;
  assign cpu_stalled = !cpu_halt_n;

  cpu6502c u_cpu (
    .clk, .rst_n, .ce(phi_en), .halt_n(cpu_halt_n), .nmi_n(antic_nmi_n),
    .irq_n(pokey_irq_n), .din(bus_rdata), .addr(cpu_addr), .dout(cpu_dout),
    .rw(cpu_rw), .sync(cpu_sync), .bus_free(cpu_bus_free)
  );

  mem_map u_map (
    .addr(bus_addr), .sel_ram, .sel_cart, .sel_gtia, .sel_antic, .sel_pokey, .sel_bios,
    .ram_d(ram_dout), .cart_d(cart_data), .gtia_d(gtia_dout), .antic_d(antic_dout),
    .pokey_d(pokey_dout), .bios_d(bios_data), .rdata(bus_rdata)
  );

  ram u_ram (
    .clk, .we(phi_en && bus_we && sel_ram), .addr(bus_addr[13:0]),
    .wdata(cpu_dout), .rdata(ram_dout)
  );

  assign cart_addr = bus_addr[14:0] - 15'h4000;
  assign cart_cs   = sel_cart;
  assign bios_addr = bus_addr[10:0];

  antic u_antic (
    .clk, .rst_n, .cc_en, .phi_en,
    .cs(sel_antic), .we(bus_we), .addr(bus_addr[3:0]), .din(cpu_dout), .dout(antic_dout),
    .dma_req(antic_dma), .dma_addr(antic_addr), .dma_din(bus_rdata),
    .halt_n(antic_halt_n), .rdy(antic_rdy), .nmi_n(antic_nmi_n),
    .an, .an_hires, .pm_gfx, .lpen_n, .vcnt, .hcnt
  );

  gtia u_gtia (
    .clk, .rst_n, .cc_en,
    .cs(sel_gtia), .we(bus_we), .wr_en(phi_en), .addr(bus_addr[4:0]), .din(cpu_dout),
    .dout(gtia_dout), .an, .an_hires, .pm_gfx, .trig_n, .consol_n, .consol_out,
    .buf_we, .buf_addr(buf_waddr), .buf_data(buf_wdata), .collision
  );

  pokey u_pokey (
    .clk, .rst_n, .phi_en,
    .cs(sel_pokey), .we(bus_we), .addr(bus_addr[3:0]), .din(cpu_dout), .dout(pokey_dout),
    .irq_n(pokey_irq_n), .key_scan_l, .kr1_l, .kr2_l, .pot_in, .pot_dump,
    .sod(sio_out), .sid(sio_in), .audio
  );

  keypad_if u_keypad (
    .key_scan_l(key_scan_l[3:0]), .col_in(kp_col), .row_out_l(kp_row_l), .kr1_l
  );

  display_buffer u_buf (
    .wr_clk(clk), .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .rd_clk(clk_pix), .raddr(buf_raddr), .rdata(buf_rdata)
  );

  dvi_scan u_dvi (
    .clk_pix, .rst_n(rst_pix_n), .raddr(buf_raddr), .rdata(buf_rdata),
    .r(vid_r), .g(vid_g), .b(vid_b), .hsync_n(vid_hsync_n), .vsync_n(vid_vsync_n),
    .de(vid_de), .frame_start
  );
endmodule
