// Self-checking testbench of the 6502C ALU and decimal adjuster.
//
// Random operands go through every operation. Binary results and flags are
// compared with integer arithmetic done here; decimal ADC and SBC on valid
// BCD operands are compared with the sum or difference of the two decimal
// numbers modulo 100.
module tb_cpu_alu;
  import atari_pkg::*;
  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       cin, dec, c, v, n, z;
  int         checks = 0, failures = 0;

  cpu_alu dut (.op, .a, .b, .cin, .dec, .y, .c, .v, .n, .z);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%s a=%h b=%h cin=%0d: got %0h expected %0h", what, op.name(), a, b, cin, got, exp);
    end
  endtask

  function automatic int bcd(input int v);
    return (v / 10) * 16 + (v % 10);
  endfunction

  initial begin
    int s, sa, sb, da, db;
    for (int i = 0; i < 4000; i++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom); dec = 1'b0;
      op = ALU_ADC; #1;
      s = int'(a) + int'(b) + int'(cin);
      sa = (a > 127) ? int'(a) - 256 : int'(a);
      sb = (b > 127) ? int'(b) - 256 : int'(b);
      check("adc y", y, s % 256); check("adc c", c, s > 255 ? 1 : 0);
      check("adc v", v, (sa + sb + int'(cin) > 127 || sa + sb + int'(cin) < -128) ? 1 : 0);
      check("adc z", z, (s % 256) == 0 ? 1 : 0);
      op = ALU_SBC; #1;
      s = int'(a) - int'(b) - (1 - int'(cin));
      check("sbc y", y, (s + 256) % 256); check("sbc c", c, s >= 0 ? 1 : 0);
      check("sbc v", v, (sa - sb - (1 - int'(cin)) > 127 || sa - sb - (1 - int'(cin)) < -128) ? 1 : 0);
      op = ALU_CMP; #1;
      check("cmp c", c, a >= b ? 1 : 0); check("cmp z", z, a == b ? 1 : 0);
      check("cmp n", n, ((int'(a) - int'(b) + 256) % 256) >= 128 ? 1 : 0);
      op = ALU_AND; #1; check("and", y, int'(a & b));
      op = ALU_OR;  #1; check("or",  y, int'(a | b));
      op = ALU_EOR; #1; check("eor", y, int'(a ^ b)); check("eor n", n, int'(y[7]));
      op = ALU_ASL; #1; check("asl", y, (int'(a) * 2) % 256); check("asl c", c, int'(a) / 128);
      op = ALU_LSR; #1; check("lsr", y, int'(a) / 2); check("lsr c", c, int'(a) % 2);
      op = ALU_ROL; #1; check("rol", y, (int'(a) * 2 + int'(cin)) % 256);
      op = ALU_ROR; #1; check("ror", y, int'(a) / 2 + 128 * int'(cin)); check("ror c", c, int'(a) % 2);
      op = ALU_INC; #1; check("inc", y, (int'(a) + 1) % 256);
      op = ALU_DEC; #1; check("dec", y, (int'(a) + 255) % 256);
      // decimal mode on valid BCD operands
      da = $urandom_range(0, 99); db = $urandom_range(0, 99);
      a = 8'(bcd(da)); b = 8'(bcd(db)); dec = 1'b1;
      op = ALU_ADC; #1;
      check("bcd adc y", y, bcd((da + db + int'(cin)) % 100));
      check("bcd adc c", c, (da + db + int'(cin)) >= 100 ? 1 : 0);
      op = ALU_SBC; #1;
      check("bcd sbc y", y, bcd((da - db - (1 - int'(cin)) + 100) % 100));
      check("bcd sbc c", c, (da - db - (1 - int'(cin))) >= 0 ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
