// Self-checking testbench of the 6502C core.
//
// A short program, assembled byte by byte below, exercises binary and BCD
// arithmetic, a counted loop, indexed addressing with a page crossing,
// indirect modes, the stack, read-modify-write, IRQ and NMI entry through
// the forced BRK, and RTI. The results it stores in zero page are compared
// with values worked out by hand. Instruction lengths in cycles are measured
// between SYNC pulses and compared with the 6502 cycle table. In a second
// part HALT is pulled low at random and the core must neither move its bus
// nor write.
module tb_cpu6502c;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        halt_n = 1'b1;
  logic        nmi_n = 1'b1;
  logic        irq_n = 1'b1;
  logic [7:0]  din;
  logic [15:0] addr;
  logic [7:0]  dout;
  logic        rw, sync, bus_free;
  logic [7:0]  mem [0:65535];
  int          checks = 0, failures = 0;
  int          cyc = 0, last_sync_cyc = 0;
  logic [15:0] last_sync_addr;
  int          len_at [0:65535];
  int          len_max [0:65535];
  int          spin_reads = 0, nmi_timer = -1;
  logic        done;
  logic        random_halt = 1'b0;
  logic [15:0] pc;

  cpu6502c dut (.clk, .rst_n, .ce(1'b1), .halt_n, .nmi_n, .irq_n, .din, .addr, .dout, .rw, .sync, .bus_free);

  assign din = mem[addr];
  always #5 clk = ~clk;

  task automatic b(input logic [7:0] v);
    mem[pc] = v;
    pc = pc + 16'd1;
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [15:0] a_loop, a_bne, a_absx, a_jsr, a_inc, a_asl, a_spin, a_spin2, a_rts, a_pla;

  initial begin
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'h00; len_at[i] = 0; len_max[i] = 0; end
    mem[16'h0400] = 8'h5A;
    mem[16'h0401] = 8'hA5;
    // vectors
    mem[16'hFFFC] = 8'h00; mem[16'hFFFD] = 8'h02;
    mem[16'hFFFE] = 8'h00; mem[16'hFFFF] = 8'h06;
    mem[16'hFFFA] = 8'h00; mem[16'hFFFB] = 8'h07;
    pc = 16'h0200;
    b(8'h18); b(8'hA9); b(8'h05); b(8'h69); b(8'h03); b(8'h85); b(8'h10);      // CLC LDA#5 ADC#3 STA $10
    b(8'hF8); b(8'hA9); b(8'h19); b(8'h18); b(8'h69); b(8'h28); b(8'h85); b(8'h11); // SED LDA#19 CLC ADC#28 STA $11
    b(8'h38); b(8'hA9); b(8'h42); b(8'hE9); b(8'h13); b(8'h85); b(8'h12);      // SEC LDA#42 SBC#13 STA $12
    b(8'hD8); b(8'hA2); b(8'h05); b(8'hA9); b(8'h00);                          // CLD LDX#5 LDA#0
    a_loop = pc;
    b(8'h18); b(8'h69); b(8'h03); b(8'hCA); a_bne = pc; b(8'hD0); b(8'hFA);    // loop: CLC ADC#3 DEX BNE loop
    b(8'h85); b(8'h13);                                                        // STA $13
    b(8'hA2); b(8'hFF); a_absx = pc; b(8'hBD); b(8'h01); b(8'h03);             // LDX#FF LDA $0301,X
    b(8'h85); b(8'h14);                                                        // STA $14
    a_jsr = pc; b(8'h20); b(8'h00); b(8'h05);                                  // JSR $0500
    b(8'h85); b(8'h15);                                                        // STA $15
    b(8'hA9); b(8'h77); b(8'h48); b(8'hA9); b(8'h00); a_pla = pc; b(8'h68); b(8'h85); b(8'h16); // LDA#77 PHA LDA#0 PLA STA $16
    b(8'hA9); b(8'h00); b(8'h85); b(8'h20); b(8'hA9); b(8'h04); b(8'h85); b(8'h21); // pointer $0400 at $20
    b(8'hA0); b(8'h01); b(8'hB1); b(8'h20); b(8'h85); b(8'h17);                // LDY#1 LDA ($20),Y STA $17
    b(8'hA2); b(8'h02); b(8'hA1); b(8'h1E); b(8'h85); b(8'h18);                // LDX#2 LDA ($1E,X) STA $18
    a_inc = pc; b(8'hE6); b(8'h18); a_asl = pc; b(8'h06); b(8'h18);            // INC $18 ASL $18
    b(8'hA9); b(8'h50); b(8'h38); b(8'hE9); b(8'h60); b(8'h85); b(8'h1B);      // LDA#50 SEC SBC#60 STA $1B
    b(8'h08); b(8'h68); b(8'h85); b(8'h1C);                                    // PHP PLA STA $1C
    b(8'h58);                                                                  // CLI
    a_spin = pc; b(8'hA5); b(8'h19); b(8'hF0); b(8'hFC);                       // spin: LDA $19 BEQ spin
    a_spin2 = pc; b(8'hA5); b(8'h1A); b(8'hF0); b(8'hFC);                      // spin2: LDA $1A BEQ spin2
    b(8'h8D); b(8'h01); b(8'hD0);                                              // STA $D001 (end)
    pc = 16'h0500; b(8'hA9); b(8'h3C); a_rts = pc; b(8'h60);                   // sub: LDA#3C RTS
    pc = 16'h0600; b(8'hA9); b(8'h99); b(8'h85); b(8'h19); b(8'h8D); b(8'h00); b(8'hD0); b(8'h40); // IRQ handler
    pc = 16'h0700; b(8'hE6); b(8'h1A); b(8'h40);                               // NMI handler: INC $1A RTI
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  // bus model, SYNC-based cycle measurement and interrupt stimulus
  always @(posedge clk) begin
    if (rst_n) begin
      if (random_halt) halt_n <= ($urandom_range(0, 3) != 0);
      if (halt_n) begin
        cyc <= cyc + 1;
        if (!rw) begin
          mem[addr] <= dout;
          if (addr == 16'hD000) irq_n <= 1'b1;
          if (addr == 16'hD001) done = 1'b1;
          if (addr == 16'h0019) nmi_timer <= 20;
        end
        if (sync) begin
          if (cyc != 0) begin
            len_at[last_sync_addr] <= cyc - last_sync_cyc;
            if (cyc - last_sync_cyc > len_max[last_sync_addr]) len_max[last_sync_addr] <= cyc - last_sync_cyc;
          end
          last_sync_cyc  <= cyc;
          last_sync_addr <= addr;
          if (addr == a_spin) begin
            spin_reads <= spin_reads + 1;
            if (spin_reads == 3) irq_n <= 1'b0;
          end
        end
        if (nmi_timer > 0) nmi_timer <= nmi_timer - 1;
        if (nmi_timer == 3) nmi_n <= 1'b0;
        if (nmi_timer == 1) nmi_n <= 1'b1;
      end
    end
  end

  // while halted the bus must stay still
  logic [15:0] addr_q;
  logic        halted_q = 1'b0;
  always @(posedge clk) begin
    halted_q <= rst_n && !halt_n;
    addr_q   <= addr;
    if (halted_q && random_halt) begin
      checks++;
      if (addr != addr_q && !halt_n) begin failures++; $display("FAIL bus moved while halted"); end
    end
  end

  task automatic run_to_done(input int limit);
    int n = 0;
    while (!done && n < limit) begin @(posedge clk); n++; end
  endtask

  task automatic check_results(input string tag);
    check({tag, " ADC"},        mem[16'h10], 8'h08);
    check({tag, " BCD ADC"},    mem[16'h11], 8'h47);
    check({tag, " BCD SBC"},    mem[16'h12], 8'h29);
    check({tag, " loop"},       mem[16'h13], 8'h0F);
    check({tag, " abs,X"},      mem[16'h14], 8'h5A);
    check({tag, " JSR/RTS"},    mem[16'h15], 8'h3C);
    check({tag, " PHA/PLA"},    mem[16'h16], 8'h77);
    check({tag, " (zp),Y"},     mem[16'h17], 8'hA5);
    check({tag, " RMW"},        mem[16'h18], 8'hB6);
    check({tag, " IRQ"},        mem[16'h19], 8'h99);
    check({tag, " NMI"},        mem[16'h1A], 8'h01);
    check({tag, " SBC"},        mem[16'h1B], 8'hF0);
    check({tag, " PHP"},        mem[16'h1C], 8'hB4);
  endtask

  initial begin
    done = 1'b0;
    @(posedge rst_n);
    run_to_done(20000);
    check("program finished", int'(done), 1);
    check_results("run1");
    check("LDA abs,X page cross cycles", len_at[a_absx], 5);
    check("BNE taken cycles", len_max[a_bne], 3);
    check("BNE not taken cycles", len_at[a_bne], 2);
    check("JSR cycles", len_at[a_jsr], 6);
    check("RTS cycles", len_at[a_rts], 6);
    check("PLA cycles", len_at[a_pla], 4);
    check("INC zp cycles", len_at[a_inc], 5);
    check("ASL zp cycles", len_at[a_asl], 5);
    check("IRQ handler entry (BRK at spin) cycles", len_at[16'h0600] > 0 ? 1 : 0, 1);
    // second run with random HALT
    for (int i = 16'h10; i < 16'h20; i++) mem[i] = 8'h00;
    done = 1'b0; spin_reads = 0; irq_n = 1'b1; nmi_n = 1'b1; nmi_timer = -1;
    rst_n = 1'b0; random_halt = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_to_done(60000);
    random_halt = 1'b0; halt_n = 1'b1;
    check("program finished under HALT", int'(done), 1);
    check_results("run2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
