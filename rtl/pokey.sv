// POKEY: keyboard, potentiometers, audio, timers and maskable interrupts.
//
// The three functions are separate blocks (pokey_keyscan, pokey_potscan,
// pokey_audio with pokey_poly) that share the memory-mapped register file
// here, as in the report. Register map, by address bits [3:0]:
//   write: 0/2/4/6 AUDF1-4, 1/3/5/7 AUDC1-4, 8 AUDCTL, 9 STIMER,
//          A SKRES, B POTGO, D SEROUT, E IRQEN, F SKCTL
//   read:  0-7 POT0-7, 8 ALLPOT, 9 KBCODE, A RANDOM, D SERIN, E IRQST,
//          F SKSTAT
// Interrupts: IRQST bit 7 BREAK key, 6 other key, 5 serial input ready,
// 4 serial output needed, 3 transmission finished, 2 timer 4, 1 timer 2,
// 0 timer 1. An event sets its IRQST bit to the pending state only while its
// IRQEN bit is 1; writing 0 to an IRQEN bit clears the pending state. IRQ_L
// is low while any bit is pending. Pending is 0 and idle is 1 in IRQST, as
// in the original chip. Bits 5..3 come from the serial port (pokey_serial),
// whose bit clock is audio channel 4.
// SKCTL bit 1 enables key scanning, bit 2 selects the fast pot scan (one
// count per CPU cycle); SKCTL bits 1..0 both 0 hold the polynomial counters
// in their start state. SKSTAT bit 2 is 0 while a key is held, bit 3 is 0
// while SHIFT is held, bit 4 is the serial input line, bit 5 is 0 after a
// serial input overrun and bit 7 is 0 after a frame error (SKRES clears
// both). SKCTL bit 7 forces the serial output low. Keyboard and pot counters step once per scan line,
// every 114 CPU cycles. The console uses 4 of the 6 key scan lines
// (KEY_LINES), which the debounce logic is told about. Register addresses and bit positions are those of
// the original chip; the report names the registers but not their
// addresses. Timing: one bus access per `phi_en`, writes take effect at that
// edge, reads are combinational.
module pokey #(
  parameter int unsigned LINE_CYCLES = 114,  // CPU cycles per scan line
  parameter int unsigned KEY_LINES   = 4     // key scan lines wired to keys
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phi_en,
  // register bus
  input  logic       cs,
  input  logic       we,
  input  logic [3:0] addr,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       irq_n,
  // keyboard
  output logic [5:0] key_scan_l,
  input  logic       kr1_l,
  input  logic       kr2_l,
  // potentiometers
  input  logic [7:0] pot_in,
  output logic       pot_dump,
  // serial port
  output logic       sod,
  input  logic       sid,
  // audio
  output logic [5:0] audio
);
  logic [7:0] audf [4];
  logic [7:0] audc [4];
  logic [7:0] audctl, irqen, irqst, skctl;
  logic [6:0] line_cnt;
  logic       line_tick;
  logic       wr, stimer, potgo;
  logic       p4, p5, p9, p17;
  logic [7:0] random;
  logic [3:0] level [4];
  logic [3:0] pulse;
  logic [7:0] kbcode;
  logic       key_irq, break_irq, key_down, shift_down;
  logic [7:0] pot [8];
  logic [7:0] allpot;
  logic [7:0] serin;
  logic       frame_err, overrun, sid_sync, in_ready, out_needed, out_done;

  assign wr     = cs && we && phi_en;
  assign stimer = wr && addr == 4'h9;
  assign potgo  = wr && addr == 4'hB;

  always_ff @(posedge clk) begin
    if (!rst_n) line_cnt <= '0;
    else if (phi_en) line_cnt <= line_tick ? 7'd0 : line_cnt + 7'd1;
  end
  assign line_tick = phi_en && line_cnt == 7'(LINE_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin audf[i] <= '0; audc[i] <= '0; end
      audctl <= '0; irqen <= '0; skctl <= '0;
    end else if (wr) begin
      unique case (addr)
        4'h0, 4'h2, 4'h4, 4'h6: audf[addr[2:1]] <= din;
        4'h1, 4'h3, 4'h5, 4'h7: audc[addr[2:1]] <= din;
        4'h8: audctl <= din;
        4'hE: irqen  <= din;
        4'hF: skctl  <= din;
        default: ;
      endcase
    end
  end

  // interrupt status: 0 = pending
  always_ff @(posedge clk) begin
    if (!rst_n) irqst <= 8'hFF;
    else begin
      logic [7:0] ev;
      ev = {break_irq, key_irq, in_ready, out_needed, out_done, pulse[3], pulse[1], pulse[0]};
      irqst <= (irqst & ~(ev & irqen)) | ~irqen;
      if (wr && addr == 4'hE) irqst <= irqst | ~din;
    end
  end
  assign irq_n = &irqst;

  pokey_poly u_poly (
    .clk, .rst_n, .en(phi_en), .init(skctl[1:0] == 2'b00), .sel9(audctl[7]),
    .p4, .p5, .p9, .p17, .random
  );

  pokey_audio u_audio (
    .clk, .rst_n, .en(phi_en), .audf, .audc, .audctl, .stimer,
    .p4, .p5, .p_noise(audctl[7] ? p9 : p17), .level, .audio, .pulse
  );

  pokey_keyscan #(.MATCH_BITS(KEY_LINES)) u_keys (
    .clk, .rst_n, .enable(skctl[1]), .tick(line_tick), .kr1_l, .kr2_l,
    .key_scan_l, .kbcode, .key_irq, .break_irq, .key_down, .shift_down
  );

  pokey_potscan u_pots (
    .clk, .rst_n, .tick(skctl[2] ? phi_en : line_tick), .potgo, .pot_in,
    .pot, .allpot, .dump(pot_dump)
  );

  pokey_serial u_serial (
    .clk, .rst_n, .tick(pulse[3]), .serout_wr(wr && addr == 4'hD), .din,
    .skres(wr && addr == 4'hA), .force_break(skctl[7]), .in_pending(!irqst[5]),
    .sod, .sid, .serin, .frame_err, .overrun, .sid_sync, .in_ready, .out_needed, .out_done
  );

  always_comb begin
    unique case (addr)
      4'h0, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7: dout = pot[addr[2:0]];
      4'h8: dout = allpot;
      4'h9: dout = kbcode;
      4'hA: dout = random;
      4'hD: dout = serin;
      4'hE: dout = irqst;
      4'hF: dout = {~frame_err, 1'b1, ~overrun, sid_sync, ~shift_down, ~key_down, 2'b11};
      default: dout = 8'hFF;
    endcase
  end
endmodule
