// Testbench of pokey_keyscan. A keypad model pulls KR1_L low while the scan
// lines carry the code of a pressed key. Checked: a held key is reported once
// with its code after the confirming scan cycle (64 ticks after it was first
// seen), key_down follows press and release, two keys together and a key that
// bounces open before confirmation are ignored, KR2_L at code 0x30 raises
// the break interrupt and at 0x10 sets SHIFT in the key code.
module tb_pokey_keyscan;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, tick = 1'b0;
  logic kr1_l, kr2_l;
  logic [5:0] key_scan_l;
  logic [7:0] kbcode;
  logic key_irq, break_irq, key_down, shift_down;
  int checks = 0, failures = 0;
  int keyA = -1, keyB = -1, kr2_code = -1;
  int nirq = 0, nbrk = 0, ticks = 0, first_seen = -1, irq_tick = -1;

  pokey_keyscan dut (.clk, .rst_n, .enable, .tick, .kr1_l, .kr2_l, .key_scan_l, .kbcode,
                     .key_irq, .break_irq, .key_down, .shift_down);
  always #5 clk = ~clk;
  logic [5:0] code;
  assign code  = ~key_scan_l;
  assign kr1_l = !((keyA >= 0 && int'(code) == keyA) || (keyB >= 0 && int'(code) == keyB));
  assign kr2_l = !(kr2_code >= 0 && int'(code) == kr2_code);

  always @(posedge clk) begin
    if (key_irq) begin nirq++; irq_tick = ticks; end
    if (break_irq) nbrk++;
    if (tick && !kr1_l && first_seen < 0) first_seen = ticks;
  end

  task automatic run_ticks(input int n);
    repeat (n) begin
      @(posedge clk); tick <= 1'b1; ticks++;
      @(posedge clk); tick <= 1'b0;
    end
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run_ticks(10);
    nirq = 0; nbrk = 0;
    // single key
    keyA = 6'h05;
    run_ticks(200);
    check("one IRQ for a held key", nirq, 1);
    check("key code", kbcode[5:0], 6'h05);
    check("confirm after one scan cycle", irq_tick - first_seen, 64 + 1);
    check("key down", key_down, 1);
    keyA = -1;
    run_ticks(200);
    check("released", key_down, 0);
    // two keys
    nirq = 0;
    keyA = 6'h03; keyB = 6'h0C;
    run_ticks(300);
    check("two keys ignored", nirq, 0);
    keyA = -1; keyB = -1;
    run_ticks(130);
    // bounce: low once, open before the confirming pass
    while (code != 6'h20) run_ticks(1);
    keyA = 6'h21;
    run_ticks(10);
    keyA = -1;
    run_ticks(200);
    check("bounce ignored", nirq, 0);
    // shift + key
    kr2_code = 6'h10;
    keyA = 6'h0A;
    run_ticks(200);
    check("shifted key IRQ", nirq, 1);
    check("shift bit", kbcode[6], 1);
    check("shifted key code", kbcode[5:0], 6'h0A);
    keyA = -1; kr2_code = -1;
    run_ticks(200);
    // break
    kr2_code = 6'h30;
    run_ticks(200);
    check("break IRQ once", nbrk, 1);
    kr2_code = -1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
