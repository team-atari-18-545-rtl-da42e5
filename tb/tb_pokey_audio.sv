// Testbench of pokey_audio. Pure tones are measured: with 1.79 MHz clocking
// a channel's output must toggle every AUDF+1 cycles, with the 64 kHz base
// every 28*(AUDF+1) cycles, and a joined 16-bit pair every
// AUDF2*256+AUDF1+1 cycles. Volume-only mode must give a constant level,
// noise must give an irregular pattern, the sum must equal the four levels,
// and the divider pulses (timer interrupts) must come at the divider rate.
module tb_pokey_audio;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, stimer = 1'b0;
  logic [7:0] audf [4];
  logic [7:0] audc [4];
  logic [7:0] audctl;
  logic p4, p5, p9, p17;
  logic [7:0] random;
  logic [3:0] level [4];
  logic [5:0] audio;
  logic [3:0] pulse;
  int checks = 0, failures = 0;

  pokey_poly u_poly (.clk, .rst_n, .en, .init(1'b0), .sel9(1'b0), .p4, .p5, .p9, .p17, .random);
  pokey_audio dut (.clk, .rst_n, .en, .audf, .audc, .audctl, .stimer, .p4, .p5, .p_noise(p17),
                   .level, .audio, .pulse);
  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // cycles between the 2nd and 3rd change of a channel's level
  task automatic toggle_period(input int ch, output int per);
    int n = 0, t0 = 0;
    logic [3:0] last;
    last = level[ch];
    per = -1;
    for (int c = 0; c < 200000 && n < 3; c++) begin
      @(posedge clk);
      if (level[ch] != last) begin
        n++;
        if (n == 2) t0 = c;
        if (n == 3) per = c - t0;
        last = level[ch];
      end
    end
  endtask

  initial begin
    int per, npulse, sum_bad, lvl_changes;
    for (int i = 0; i < 4; i++) begin audf[i] = 8'd0; audc[i] = 8'd0; end
    audctl = 8'h00;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // channel 1 at 1.79 MHz, pure tone
    audctl = 8'h40; audf[0] = 8'd9; audc[0] = 8'hAF;
    stimer <= 1'b1; @(posedge clk); stimer <= 1'b0;
    toggle_period(0, per);
    check("1.79 MHz tone half period", per, 10);
    // channel 2 at 64 kHz
    audf[1] = 8'd3; audc[1] = 8'hA8;
    toggle_period(1, per);
    check("64 kHz tone half period", per, 28 * 4);
    // joined 1+2 at 1.79 MHz
    audctl = 8'h50; audf[0] = 8'h10; audf[1] = 8'h02; audc[0] = 8'h00; audc[1] = 8'hAF;
    stimer <= 1'b1; @(posedge clk); stimer <= 1'b0;
    toggle_period(1, per);
    check("16-bit joined half period", per, 2 * 256 + 16 + 1);
    // volume only
    audctl = 8'h00; audc[2] = 8'h18;
    repeat (50) @(posedge clk);
    check("volume only level", level[2], 8);
    // noise on channel 4 at 64 kHz with 17-bit poly
    audf[3] = 8'd0; audc[3] = 8'h0F;
    lvl_changes = 0;
    begin
      int runs [2];
      logic [3:0] l0;
      runs = '{0, 0};
      l0 = level[3];
      for (int c = 0; c < 28 * 400; c++) begin
        @(posedge clk);
        if (level[3] != l0) lvl_changes++;
        l0 = level[3];
      end
    end
    checks++;
    if (lvl_changes < 20 || lvl_changes > 380) begin failures++; $display("FAIL noise changes %0d", lvl_changes); end
    // sum and timer pulses
    sum_bad = 0; npulse = 0;
    audctl = 8'h40; audf[0] = 8'd4; audc[0] = 8'hA4;
    stimer <= 1'b1; @(posedge clk); stimer <= 1'b0;
    for (int c = 0; c < 500; c++) begin
      @(posedge clk);
      if (int'(audio) != int'(level[0]) + int'(level[1]) + int'(level[2]) + int'(level[3])) sum_bad++;
      if (pulse[0]) npulse++;
    end
    check("sum of levels", sum_bad, 0);
    // the window starts one cycle after the restart, so 99 or 100 pulses
    check("timer 1 pulses in 500 cycles", (npulse == 99 || npulse == 100) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
