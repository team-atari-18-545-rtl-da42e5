// Testbench of pokey, the register-level view of POKEY.
// A CPU bus model writes and reads the registers one access per `phi_en`.
// A key matrix model closes one key on the scan lines; an RC model lets each
// pot input reach logic 1 a chosen number of counts after the dump is
// released. Checked: timer 1 interrupt through IRQEN/IRQST and IRQ_L,
// clearing by writing IRQEN, masking, the key interrupt and KBCODE, SKSTAT
// key-down bit, POT0-3 values with the fast scan, ALLPOT, RANDOM changing,
// a SEROUT byte looped back into SERIN with the three serial interrupts,
// and unmapped reads.
module tb_pokey;
  logic clk = 1'b0, rst_n = 1'b0;
  logic phi_en;
  logic cs = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic irq_n, kr1_l, kr2_l, pot_dump, sod;
  logic [5:0] key_scan_l, audio;
  logic [7:0] pot_in;
  int checks = 0, failures = 0;
  int key = -1;
  int pot_target [8];
  int since_release = 0;
  int cyc = 0;

  pokey dut (.clk, .rst_n, .phi_en, .cs, .we, .addr, .din, .dout, .irq_n, .key_scan_l,
             .kr1_l, .kr2_l, .pot_in, .pot_dump, .sod, .sid(sod), .audio);
  always #5 clk = ~clk;
  // one CPU cycle every 8 clocks
  always_ff @(posedge clk) cyc <= (cyc + 1) % 8;
  assign phi_en = cyc == 7;

  logic [5:0] code;
  assign code  = ~key_scan_l;
  assign kr1_l = !(key >= 0 && int'(code) == key);
  assign kr2_l = 1'b1;
  always_ff @(posedge clk) if (phi_en) since_release <= pot_dump ? 0 : since_release + 1;
  always_comb for (int i = 0; i < 8; i++) pot_in[i] = !pot_dump && since_release >= pot_target[i];

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
  task automatic cycles(input int n);
    repeat (n * 8) @(posedge clk);
  endtask

  initial begin
    logic [7:0] d, r0;
    int diff;
    for (int i = 0; i < 8; i++) pot_target[i] = 300;
    pot_target[0] = 10; pot_target[1] = 57; pot_target[2] = 100 + ($urandom % 100); pot_target[3] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    check("idle IRQ_L", irq_n, 1);
    bus_read(4'hE, d); check("IRQST after reset", d, 8'hFF);
    // timer 1: 1.79 MHz clock, AUDF1 = 20
    bus_write(4'h8, 8'h40);
    bus_write(4'h0, 8'd20);
    bus_write(4'hE, 8'h01);
    bus_write(4'h9, 8'h00);
    cycles(30);
    check("timer 1 IRQ_L", irq_n, 0);
    bus_read(4'hE, d); check("IRQST timer 1 pending", d, 8'hFE);
    bus_write(4'hE, 8'h00);
    check("IRQ_L cleared", irq_n, 1);
    cycles(60);
    check("masked timer stays idle", irq_n, 1);
    // keyboard: enable scanning, key interrupt, press key 0x0B
    bus_write(4'hF, 8'h06);
    bus_write(4'hE, 8'h40);
    key = 6'h0B;
    begin
      int n = 0;
      while (irq_n && n < 114 * 200) begin cycles(1); n++; end
    end
    check("key IRQ_L", irq_n, 0);
    bus_read(4'hE, d); check("IRQST key pending", d, 8'hBF);
    bus_read(4'h9, d); check("KBCODE", d[5:0], 6'h0B);
    bus_read(4'hF, d); check("SKSTAT key down", d[2], 0);
    bus_write(4'hE, 8'h00);
    key = -1;
    cycles(114 * 140);
    bus_read(4'hF, d); check("SKSTAT key up", d[2], 1);
    // pots with the fast scan (SKCTL bit 2)
    bus_write(4'hB, 8'h00);
    cycles(2);
    bus_read(4'h8, d); check("ALLPOT during scan", d, 8'hF7);
    cycles(240);
    bus_read(4'h8, d); check("ALLPOT after scan", d, 8'h00);
    for (int i = 0; i < 4; i++) begin
      bus_read(4'(i), d);
      diff = int'(d) - pot_target[i];
      checks++;
      if (diff < 0 || diff > 3) begin failures++; $display("FAIL POT%0d=%0d target %0d", i, d, pot_target[i]); end
    end
    bus_read(4'h7, d); check("uncharged POT7", d, 228);
    // RANDOM changes from read to read
    bus_read(4'hA, r0);
    diff = 0;
    for (int i = 0; i < 8; i++) begin bus_read(4'hA, d); if (d != r0) diff++; r0 = d; end
    checks++;
    if (diff < 6) begin failures++; $display("FAIL RANDOM changed only %0d times", diff); end
    // serial port, output looped back to input, bit clock channel 4 at 64 kHz
    bus_write(4'h6, 8'h00);
    bus_write(4'hE, 8'h38);
    bus_write(4'hD, 8'h96);
    cycles(4);
    bus_read(4'hE, d); check("IRQST serial output needed", d & 8'h38, 8'h28);
    cycles(28 * 2 * 12);
    bus_read(4'hE, d); check("IRQST serial all three pending", d & 8'h38, 8'h00);
    bus_read(4'hD, d); check("SERIN loopback", d, 8'h96);
    bus_read(4'hF, d); check("SKSTAT serial flags and line", d & 8'hB0, 8'hB0);
    bus_write(4'hE, 8'h00);
    bus_read(4'hC, d); check("unmapped read", d, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
