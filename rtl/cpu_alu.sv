// 6502C arithmetic logic unit with decimal adjuster.
//
// Purely combinational. The binary part forms sum, and, exclusive-or, or and
// the four shifts, increments, decrements and compares, and gives carry,
// overflow, negative and zero. When `dec` is set, ADC and SBC results pass
// through a decimal adjuster that corrects each BCD digit. The adjuster is
// written from the required NMOS 6502 behaviour rather than from the
// transistor schematic, as the report also did: for ADC the N and V flags come
// from the sum after the low-digit correction, for SBC all flags come from
// the binary difference, and Z always comes from the binary result.
//
// Interface: a and b are the operands, cin the carry in (also the bit shifted
// in by ROL/ROR); y, c, v, n, z the result and flags. CMP is a - b with
// carry = no borrow.
module cpu_alu
  import atari_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  input  logic       dec,
  output logic [7:0] y,
  output logic       c,
  output logic       v,
  output logic       n,
  output logic       z
);

  logic [8:0] bin_sum, bin_dif;
  logic [4:0] lo_a, lo_s;
  logic [4:0] hi_a, hi_s;
  logic       hc;
  logic [7:0] dec_y;
  logic       dec_c, dec_v, dec_n;

  assign bin_sum = {1'b0, a} + {1'b0, b} + {8'd0, cin};
  assign bin_dif = {1'b0, a} - {1'b0, b} - {8'd0, ~cin};

  // decimal adjuster
  always_comb begin
    lo_a  = 5'd0;
    hi_a  = 5'd0;
    lo_s  = 5'd0;
    hi_s  = 5'd0;
    hc    = 1'b0;
    dec_y = 8'd0;
    dec_c = 1'b0;
    dec_v = 1'b0;
    dec_n = 1'b0;
    if (op == ALU_ADC) begin
      lo_a = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'd0, cin};
      if (lo_a > 5'd9) lo_a = lo_a + 5'd6;
      hc   = lo_a > 5'd15;
      hi_a = {1'b0, a[7:4]} + {1'b0, b[7:4]} + {4'd0, hc};
      dec_n = hi_a[3];
      dec_v = ~(a[7] ^ b[7]) & (a[7] ^ hi_a[3]);
      if (hi_a > 5'd9) hi_a = hi_a + 5'd6;
      dec_c = hi_a > 5'd15;
      dec_y = {hi_a[3:0], lo_a[3:0]};
    end else begin
      lo_s = {1'b0, a[3:0]} - {1'b0, b[3:0]} - {4'd0, ~cin};
      hc   = lo_s[4];
      if (hc) lo_s = lo_s - 5'd6;
      hi_s = {1'b0, a[7:4]} - {1'b0, b[7:4]} - {4'd0, hc};
      if (hi_s[4]) hi_s = hi_s - 5'd6;
      dec_y = {hi_s[3:0], lo_s[3:0]};
    end
  end

  always_comb begin
    y = 8'd0;
    c = cin;
    v = 1'b0;
    unique case (op)
      ALU_ADC: begin
        y = bin_sum[7:0];
        c = bin_sum[8];
        v = ~(a[7] ^ b[7]) & (a[7] ^ bin_sum[7]);
        if (dec) begin
          y = dec_y;
          c = dec_c;
          v = dec_v;
        end
      end
      ALU_SBC: begin
        y = bin_dif[7:0];
        c = ~bin_dif[8];
        v = (a[7] ^ b[7]) & (a[7] ^ bin_dif[7]);
        if (dec) y = dec_y;
      end
      ALU_CMP: begin
        y = a - b;
        c = a >= b;
      end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_EOR:  y = a ^ b;
      ALU_ASL:  begin y = {a[6:0], 1'b0}; c = a[7]; end
      ALU_LSR:  begin y = {1'b0, a[7:1]}; c = a[0]; end
      ALU_ROL:  begin y = {a[6:0], cin};  c = a[7]; end
      ALU_ROR:  begin y = {cin, a[7:1]};  c = a[0]; end
      ALU_INC:  y = a + 8'd1;
      ALU_DEC:  y = a - 8'd1;
      ALU_PASS: y = b;
      default:  y = b;
    endcase
  end

  // NMOS decimal ADC takes N from the partly adjusted sum; Z stays binary
  assign n = (op == ALU_ADC && dec) ? dec_n
           : (op == ALU_SBC && dec) ? bin_dif[7] : y[7];
  assign z = (op == ALU_ADC && dec) ? (bin_sum[7:0] == 8'd0)
           : (op == ALU_SBC && dec) ? (bin_dif[7:0] == 8'd0)
           : (y == 8'd0);

endmodule
