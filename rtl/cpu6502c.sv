// 6502C processor core.
//
// An 8-bit processor with a 16-bit address bus and the full documented 6502
// instruction set (56 instructions, 13 addressing modes) plus the 6502C HALT
// input. Following the report, control is not a fetch-decode-execute FSM:
// a T-state register `t` counts the cycles of the current instruction and one
// combinational block maps (opcode, T state, flags, pending interrupts) to the
// next value of every register and bus output, standing in for the decode
// ROM and the random control logic together. NMI, IRQ and reset force opcode
// 00 (BRK) into the instruction register; the BRK sequence then loads the
// NMI, reset or IRQ vector. Page crossings of indexed addressing and of taken
// branches add the extra cycle of the original part, from the carry of the
// low-byte addition in the previous cycle.
//
// Timing: one bus cycle per `ce` pulse (the 1.79 MHz phase). `addr`, `dout`
// and `rw` are registers, valid for the whole cycle; `din` is sampled at the
// end of the cycle (the next clk edge with ce=1). `sync` is high in opcode
// fetch cycles. While `halt_n` is low the core does nothing at all, so that
// another master (ANTIC) can use the bus; `bus_free` reports this, one cycle
// late, as the report's redefined RDY output. Reset (`rst_n` low, synchronous)
// runs the reset BRK sequence with the writes suppressed.
//
// Own choices: the T-state register is binary, not one-cold; interrupts are
// sampled in the opcode fetch cycle; undocumented opcodes execute as 2-cycle
// NOPs.
module cpu6502c
  import atari_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        halt_n,
  input  logic        nmi_n,
  input  logic        irq_n,
  input  logic [7:0]  din,
  output logic [15:0] addr,
  output logic [7:0]  dout,
  output logic        rw,        // 1 = read, 0 = write
  output logic        sync,
  output logic        bus_free
);

  typedef enum logic [3:0] {
    M_IMP, M_IMM, M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABSX, M_ABSY,
    M_INDX, M_INDY, M_REL, M_JMP, M_JMPI, M_JSR, M_RTS, M_RTI
  } mode_e;
  typedef enum logic [1:0] {K_READ, K_WRITE, K_RMW, K_CTRL} kind_e;
  typedef enum logic [1:0] {INT_NONE, INT_NMI, INT_IRQ, INT_RES} int_e;
  typedef struct packed {
    mode_e mode;
    kind_e kind;
  } dec_t;

  // ------------------------------------------------------------ registers
  logic [7:0]  a_r, x_r, y_r, s_r;
  logic        fc, fz, fi, fd, fv, fn;
  logic [15:0] pc;
  logic [7:0]  ir;
  logic [2:0]  t;
  logic        acc;          // current cycle is the operand access
  logic [1:0]  rmw;          // read-modify-write stage
  logic [7:0]  adl, adh, bal, tmp;
  logic        pgx;
  int_e        intk;
  logic        nmi_prev, nmi_pend, res_pend;

  logic [15:0] ab_n, pc_n;
  logic [7:0]  a_n, x_n, y_n, s_n, dor_n, ir_n, adl_n, adh_n, bal_n, tmp_n;
  logic        fc_n, fz_n, fi_n, fd_n, fv_n, fn_n, rw_n, acc_n, pgx_n;
  logic [2:0]  t_n;
  logic [1:0]  rmw_n;
  int_e        intk_n;
  logic        nmi_clr, res_clr;

  // ------------------------------------------------------------ decoding
  function automatic dec_t decode(input logic [7:0] op);
    dec_t d;
    logic [2:0] aaa, bbb;
    aaa = op[7:5];
    bbb = op[4:2];
    d.mode = M_IMP;
    d.kind = K_CTRL;
    unique case (op[1:0])
      2'b01: begin
        d.kind = (aaa == 3'd4) ? K_WRITE : K_READ;
        unique case (bbb)
          3'd0: d.mode = M_INDX;
          3'd1: d.mode = M_ZP;
          3'd2: d.mode = (aaa == 3'd4) ? M_IMP : M_IMM;
          3'd3: d.mode = M_ABS;
          3'd4: d.mode = M_INDY;
          3'd5: d.mode = M_ZPX;
          3'd6: d.mode = M_ABSY;
          default: d.mode = M_ABSX;
        endcase
        if (op == 8'h89) d.kind = K_CTRL;
      end
      2'b10: begin
        d.kind = (aaa == 3'd4) ? K_WRITE : (aaa == 3'd5) ? K_READ : K_RMW;
        unique case (bbb)
          3'd0: begin d.mode = M_IMM; if (op != 8'hA2) begin d.mode = M_IMP; d.kind = K_CTRL; end end
          3'd1: d.mode = M_ZP;
          3'd2: begin d.mode = M_IMP; d.kind = K_CTRL; end
          3'd3: d.mode = M_ABS;
          3'd5: d.mode = (aaa == 3'd4 || aaa == 3'd5) ? M_ZPY : M_ZPX;
          3'd6: begin d.mode = M_IMP; d.kind = K_CTRL; end
          3'd7: begin
            d.mode = (aaa == 3'd5) ? M_ABSY : M_ABSX;
            if (aaa == 3'd4) begin d.mode = M_IMP; d.kind = K_CTRL; end
          end
          default: begin d.mode = M_IMP; d.kind = K_CTRL; end
        endcase
      end
      2'b00: begin
        d.kind = K_READ;
        unique case (bbb)
          3'd0: begin
            unique case (aaa)
              3'd0: begin d.mode = M_IMP; d.kind = K_CTRL; end  // BRK
              3'd1: begin d.mode = M_JSR; d.kind = K_CTRL; end
              3'd2: begin d.mode = M_RTI; d.kind = K_CTRL; end
              3'd3: begin d.mode = M_RTS; d.kind = K_CTRL; end
              3'd4: begin d.mode = M_IMP; d.kind = K_CTRL; end
              default: d.mode = M_IMM;                           // LDY CPY CPX #
            endcase
          end
          3'd1: begin
            d.mode = M_ZP;
            if (aaa == 3'd4) d.kind = K_WRITE;
            if (aaa < 3'd1 || aaa == 3'd2 || aaa == 3'd3) begin d.mode = M_IMP; d.kind = K_CTRL; end
          end
          3'd3: begin
            d.mode = M_ABS;
            if (aaa == 3'd4) d.kind = K_WRITE;
            if (aaa == 3'd2) begin d.mode = M_JMP;  d.kind = K_CTRL; end
            if (aaa == 3'd3) begin d.mode = M_JMPI; d.kind = K_CTRL; end
            if (aaa == 3'd0) begin d.mode = M_IMP;  d.kind = K_CTRL; end
          end
          3'd4: begin d.mode = M_REL; d.kind = K_CTRL; end
          3'd5: begin
            d.mode = M_ZPX;
            if (aaa == 3'd4) d.kind = K_WRITE;
            if (aaa != 3'd4 && aaa != 3'd5) begin d.mode = M_IMP; d.kind = K_CTRL; end
          end
          3'd7: begin
            d.mode = M_ABSX;
            if (aaa != 3'd5) begin d.mode = M_IMP; d.kind = K_CTRL; end
          end
          default: begin d.mode = M_IMP; d.kind = K_CTRL; end     // stack, flags, transfers
        endcase
      end
      default: begin d.mode = M_IMP; d.kind = K_CTRL; end
    endcase
    return d;
  endfunction

  dec_t  dcur, dnew;
  assign dcur = decode(ir);

  // ------------------------------------------------------------ ALU
  alu_op_e    alu_op;
  logic [7:0] alu_a, alu_b, alu_y;
  logic       alu_cin, alu_dec, alu_c, alu_v, alu_n, alu_z;

  cpu_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .cin(alu_cin), .dec(alu_dec),
    .y(alu_y), .c(alu_c), .v(alu_v), .n(alu_n), .z(alu_z)
  );

  logic [7:0] pstat;
  assign pstat = {fn, fv, 1'b1, 1'b1, fd, fi, fz, fc};

  // ALU input selection for the operation executed in this cycle
  always_comb begin
    alu_op  = ALU_PASS;
    alu_a   = a_r;
    alu_b   = din;
    alu_cin = fc;
    alu_dec = 1'b0;
    if (rmw != 2'd0) begin
      alu_a = tmp;
      unique case (ir[7:5])
        3'd0: alu_op = ALU_ASL;
        3'd1: alu_op = ALU_ROL;
        3'd2: alu_op = ALU_LSR;
        3'd3: alu_op = ALU_ROR;
        3'd6: alu_op = ALU_DEC;
        default: alu_op = ALU_INC;
      endcase
    end else if (dcur.mode == M_IMP) begin
      unique case (ir)
        8'h0A: alu_op = ALU_ASL;
        8'h2A: alu_op = ALU_ROL;
        8'h4A: alu_op = ALU_LSR;
        8'h6A: alu_op = ALU_ROR;
        8'hCA: begin alu_op = ALU_DEC; alu_a = x_r; end
        8'hE8: begin alu_op = ALU_INC; alu_a = x_r; end
        8'h88: begin alu_op = ALU_DEC; alu_a = y_r; end
        8'hC8: begin alu_op = ALU_INC; alu_a = y_r; end
        8'hAA, 8'hA8: begin alu_op = ALU_PASS; alu_b = a_r; end
        8'h8A, 8'hBA: begin alu_op = ALU_PASS; alu_b = (ir == 8'h8A) ? x_r : s_r; end
        8'h98: begin alu_op = ALU_PASS; alu_b = y_r; end
        default: begin alu_op = ALU_PASS; alu_b = din; end     // PLA
      endcase
    end else begin
      unique case ({ir[1:0], ir[7:5]})
        5'b01_000: alu_op = ALU_OR;
        5'b01_001: alu_op = ALU_AND;
        5'b01_010: alu_op = ALU_EOR;
        5'b01_011: begin alu_op = ALU_ADC; alu_dec = fd; end
        5'b01_110: begin alu_op = ALU_CMP; end
        5'b01_111: begin alu_op = ALU_SBC; alu_dec = fd; end
        5'b00_110: begin alu_op = ALU_CMP; alu_a = y_r; end
        5'b00_111: begin alu_op = ALU_CMP; alu_a = x_r; end
        5'b00_001: alu_op = ALU_AND;                            // BIT
        default:   alu_op = ALU_PASS;                           // loads
      endcase
    end
  end

  // value a store instruction writes
  function automatic logic [7:0] store_val(input logic [7:0] op,
                                           input logic [7:0] av, xv, yv);
    unique case (op[1:0])
      2'b01:   return av;
      2'b10:   return xv;
      default: return yv;
    endcase
  endfunction

  logic [7:0]  idx;
  logic [8:0]  sum_lo;
  logic [15:0] br_tgt, vec;
  logic        br_take;
  logic        int_now;
  logic [7:0]  opc;
  logic [15:0] pc_inc;

  assign pc_inc = pc + 16'd1;

  assign idx = (dcur.mode == M_ZPY || dcur.mode == M_ABSY || dcur.mode == M_INDY) ? y_r : x_r;
  assign int_now = res_pend | nmi_pend | (~irq_n & ~fi);
  assign opc = int_now ? 8'h00 : din;
  assign dnew = decode(opc);

  always_comb begin
    unique case (ir[7:6])
      2'd0:    br_take = fn == ir[5];
      2'd1:    br_take = fv == ir[5];
      2'd2:    br_take = fc == ir[5];
      default: br_take = fz == ir[5];
    endcase
  end
  assign br_tgt = pc + {{8{tmp[7]}}, tmp};
  assign vec = (intk == INT_NMI) ? 16'hFFFA : (intk == INT_RES) ? 16'hFFFC : 16'hFFFE;

  // ------------------------------------------------------------ control
  always_comb begin
    ab_n = addr;  pc_n = pc;  dor_n = dout;  rw_n = 1'b1;
    a_n = a_r;  x_n = x_r;  y_n = y_r;  s_n = s_r;
    fc_n = fc;  fz_n = fz;  fi_n = fi;  fd_n = fd;  fv_n = fv;  fn_n = fn;
    ir_n = ir;  t_n = t + 3'd1;  acc_n = 1'b0;  rmw_n = 2'd0;
    adl_n = adl;  adh_n = adh;  bal_n = bal;  tmp_n = tmp;  pgx_n = pgx;
    intk_n = intk;  nmi_clr = 1'b0;  res_clr = 1'b0;
    sum_lo = {1'b0, adl} + {1'b0, idx};

    if (t == 3'd0) begin
      // ---- opcode fetch (T0): force BRK for a pending interrupt
      ir_n = opc;
      ab_n = pc + 16'd1;
      if (int_now) begin
        ab_n   = pc;
        intk_n = res_pend ? INT_RES : nmi_pend ? INT_NMI : INT_IRQ;
        res_clr = res_pend;
        nmi_clr = nmi_pend & ~res_pend;
      end else begin
        pc_n   = pc + 16'd1;
        intk_n = INT_NONE;
      end
      if (dnew.mode == M_IMM) acc_n = 1'b1;
    end else if (acc) begin
      // ---- operand access cycle
      unique case (dcur.kind)
        K_WRITE: begin
          t_n = 3'd0; ab_n = pc;
        end
        K_RMW: begin
          if (rmw == 2'd0) begin
            tmp_n = din; dor_n = din; rw_n = 1'b0; rmw_n = 2'd1; acc_n = 1'b1; t_n = t;
          end else if (rmw == 2'd1) begin
            dor_n = alu_y; rw_n = 1'b0; rmw_n = 2'd2; acc_n = 1'b1; t_n = t;
            fn_n = alu_n; fz_n = alu_z;
            if (ir[7:6] == 2'b00 || ir[7:6] == 2'b01) fc_n = alu_c;
          end else begin
            t_n = 3'd0; ab_n = pc;
          end
        end
        default: begin   // K_READ
          t_n = 3'd0;
          if (dcur.mode == M_IMM) begin pc_n = pc + 16'd1; ab_n = pc + 16'd1; end
          else ab_n = pc;
          unique case ({ir[1:0], ir[7:5]})
            5'b01_110, 5'b00_110, 5'b00_111: begin fc_n = alu_c; fn_n = alu_n; fz_n = alu_z; end
            5'b01_011, 5'b01_111: begin a_n = alu_y; fc_n = alu_c; fv_n = alu_v; fn_n = alu_n; fz_n = alu_z; end
            5'b10_101: begin x_n = din; fn_n = din[7]; fz_n = din == 8'd0; end
            5'b00_101: begin y_n = din; fn_n = din[7]; fz_n = din == 8'd0; end
            5'b00_001: begin fz_n = alu_z; fn_n = din[7]; fv_n = din[6]; end
            default:   begin a_n = alu_y; fn_n = alu_n; fz_n = alu_z; end
          endcase
        end
      endcase
    end else begin
      // ---- address sequencing, per addressing mode and T state
      unique case (dcur.mode)
        M_ZP: begin
          pc_n = pc + 16'd1; ab_n = {8'h00, din}; acc_n = 1'b1;
        end
        M_ZPX, M_ZPY: begin
          if (t == 3'd1) begin bal_n = din; pc_n = pc + 16'd1; ab_n = {8'h00, din}; end
          else begin ab_n = {8'h00, bal + idx}; acc_n = 1'b1; end
        end
        M_ABS: begin
          if (t == 3'd1) begin adl_n = din; pc_n = pc + 16'd1; ab_n = pc + 16'd1; end
          else begin pc_n = pc + 16'd1; ab_n = {din, adl}; acc_n = 1'b1; end
        end
        M_ABSX, M_ABSY: begin
          if (t == 3'd1) begin adl_n = din; pc_n = pc + 16'd1; ab_n = pc + 16'd1; end
          else if (t == 3'd2) begin
            pc_n = pc + 16'd1; adh_n = din; adl_n = sum_lo[7:0]; pgx_n = sum_lo[8];
            ab_n = {din, sum_lo[7:0]};
            if (!sum_lo[8] && dcur.kind == K_READ) acc_n = 1'b1;
          end else begin
            ab_n = {adh + {7'd0, pgx}, adl}; acc_n = 1'b1;
          end
        end
        M_INDX: begin
          unique case (t)
            3'd1: begin bal_n = din; pc_n = pc + 16'd1; ab_n = {8'h00, din}; end
            3'd2: begin bal_n = bal + x_r; ab_n = {8'h00, bal + x_r}; end
            3'd3: begin adl_n = din; ab_n = {8'h00, bal + 8'd1}; end
            default: begin ab_n = {din, adl}; acc_n = 1'b1; end
          endcase
        end
        M_INDY: begin
          unique case (t)
            3'd1: begin bal_n = din; pc_n = pc + 16'd1; ab_n = {8'h00, din}; end
            3'd2: begin adl_n = din; ab_n = {8'h00, bal + 8'd1}; end
            3'd3: begin
              adh_n = din; adl_n = sum_lo[7:0]; pgx_n = sum_lo[8];
              ab_n = {din, sum_lo[7:0]};
              if (!sum_lo[8] && dcur.kind == K_READ) acc_n = 1'b1;
            end
            default: begin ab_n = {adh + {7'd0, pgx}, adl}; acc_n = 1'b1; end
          endcase
        end
        M_REL: begin
          unique case (t)
            3'd1: begin
              pc_n = pc + 16'd1; tmp_n = din; ab_n = pc + 16'd1;
              if (!br_take) t_n = 3'd0;
            end
            3'd2: begin
              if (br_tgt[15:8] == pc[15:8]) begin pc_n = br_tgt; ab_n = br_tgt; t_n = 3'd0; end
              else begin ab_n = {pc[15:8], br_tgt[7:0]}; pgx_n = 1'b1; end
            end
            default: begin pc_n = br_tgt; ab_n = br_tgt; t_n = 3'd0; end
          endcase
        end
        M_JMP: begin
          if (t == 3'd1) begin adl_n = din; pc_n = pc + 16'd1; ab_n = pc + 16'd1; end
          else begin pc_n = {din, adl}; ab_n = {din, adl}; t_n = 3'd0; end
        end
        M_JMPI: begin
          unique case (t)
            3'd1: begin adl_n = din; pc_n = pc + 16'd1; ab_n = pc + 16'd1; end
            3'd2: begin adh_n = din; ab_n = {din, adl}; end
            3'd3: begin bal_n = din; ab_n = {adh, adl + 8'd1}; end
            default: begin pc_n = {din, bal}; ab_n = {din, bal}; t_n = 3'd0; end
          endcase
        end
        M_JSR: begin
          unique case (t)
            3'd1: begin adl_n = din; pc_n = pc + 16'd1; ab_n = {8'h01, s_r}; end
            3'd2: begin ab_n = {8'h01, s_r}; dor_n = pc[15:8]; rw_n = 1'b0; end
            3'd3: begin s_n = s_r - 8'd1; ab_n = {8'h01, s_r - 8'd1}; dor_n = pc[7:0]; rw_n = 1'b0; end
            3'd4: begin s_n = s_r - 8'd1; ab_n = pc; end
            default: begin pc_n = {din, adl}; ab_n = {din, adl}; t_n = 3'd0; end
          endcase
        end
        M_RTS: begin
          unique case (t)
            3'd1: ab_n = {8'h01, s_r};
            3'd2: begin s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1}; end
            3'd3: begin adl_n = din; s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1}; end
            3'd4: begin pc_n = {din, adl}; ab_n = {din, adl}; end
            default: begin pc_n = pc + 16'd1; ab_n = pc + 16'd1; t_n = 3'd0; end
          endcase
        end
        M_RTI: begin
          unique case (t)
            3'd1: ab_n = {8'h01, s_r};
            3'd2: begin s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1}; end
            3'd3: begin
              {fn_n, fv_n, fd_n, fi_n, fz_n, fc_n} = {din[7:6], din[3:0]};
              s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1};
            end
            3'd4: begin adl_n = din; s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1}; end
            default: begin pc_n = {din, adl}; ab_n = {din, adl}; t_n = 3'd0; end
          endcase
        end
        default: begin   // M_IMP: implied, accumulator, stack and BRK
          if (ir == 8'h00) begin
            unique case (t)
              3'd1: begin
                if (intk == INT_NONE) pc_n = pc + 16'd1;
                ab_n = {8'h01, s_r};
                dor_n = (intk == INT_NONE) ? pc_inc[15:8] : pc[15:8];
                rw_n = intk == INT_RES;
              end
              3'd2: begin
                s_n = s_r - 8'd1; ab_n = {8'h01, s_r - 8'd1}; dor_n = pc[7:0];
                rw_n = intk == INT_RES;
              end
              3'd3: begin
                s_n = s_r - 8'd1; ab_n = {8'h01, s_r - 8'd1};
                dor_n = {pstat[7:5], intk == INT_NONE, pstat[3:0]};
                rw_n = intk == INT_RES;
              end
              3'd4: begin s_n = s_r - 8'd1; ab_n = vec; fi_n = 1'b1; end
              3'd5: begin adl_n = din; ab_n = vec + 16'd1; end
              default: begin pc_n = {din, adl}; ab_n = {din, adl}; t_n = 3'd0; end
            endcase
          end else if (ir == 8'h48 || ir == 8'h08) begin
            if (t == 3'd1) begin
              ab_n = {8'h01, s_r}; rw_n = 1'b0;
              dor_n = (ir == 8'h48) ? a_r : (pstat | 8'h30);
            end else begin s_n = s_r - 8'd1; ab_n = pc; t_n = 3'd0; end
          end else if (ir == 8'h68 || ir == 8'h28) begin
            unique case (t)
              3'd1: ab_n = {8'h01, s_r};
              3'd2: begin s_n = s_r + 8'd1; ab_n = {8'h01, s_r + 8'd1}; end
              default: begin
                ab_n = pc; t_n = 3'd0;
                if (ir == 8'h68) begin a_n = din; fn_n = din[7]; fz_n = din == 8'd0; end
                else {fn_n, fv_n, fd_n, fi_n, fz_n, fc_n} = {din[7:6], din[3:0]};
              end
            endcase
          end else begin
            // two-cycle implied instructions execute here
            ab_n = pc; t_n = 3'd0;
            unique case (ir)
              8'h0A, 8'h2A, 8'h4A, 8'h6A: begin a_n = alu_y; fc_n = alu_c; fn_n = alu_n; fz_n = alu_z; end
              8'hCA, 8'hE8, 8'hAA, 8'hBA: begin x_n = alu_y; fn_n = alu_n; fz_n = alu_z; end
              8'h88, 8'hC8, 8'hA8:        begin y_n = alu_y; fn_n = alu_n; fz_n = alu_z; end
              8'h8A, 8'h98:               begin a_n = alu_y; fn_n = alu_n; fz_n = alu_z; end
              8'h9A: s_n = x_r;
              8'h18: fc_n = 1'b0;
              8'h38: fc_n = 1'b1;
              8'h58: fi_n = 1'b0;
              8'h78: fi_n = 1'b1;
              8'hB8: fv_n = 1'b0;
              8'hD8: fd_n = 1'b0;
              8'hF8: fd_n = 1'b1;
              default: ;
            endcase
          end
        end
      endcase
    end
    if (acc_n && dcur.kind == K_WRITE && t != 3'd0) begin
      rw_n  = 1'b0;
      dor_n = store_val(ir, a_r, x_r, y_r);
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t <= 3'd0; acc <= 1'b0; rmw <= 2'd0; ir <= 8'h00;
      addr <= 16'h0000; pc <= 16'h0000; dout <= 8'h00; rw <= 1'b1;
      a_r <= 8'h00; x_r <= 8'h00; y_r <= 8'h00; s_r <= 8'h00;
      {fn, fv, fd, fi, fz, fc} <= 6'b000100;
      adl <= 8'h00; adh <= 8'h00; bal <= 8'h00; tmp <= 8'h00; pgx <= 1'b0;
      intk <= INT_RES; nmi_prev <= 1'b1; nmi_pend <= 1'b0; res_pend <= 1'b1;
      bus_free <= 1'b0;
    end else if (ce) begin
      bus_free <= ~halt_n;
      // the NMI edge latch also works while halted
      nmi_prev <= nmi_n;
      if (nmi_prev && !nmi_n) nmi_pend <= 1'b1;
      else if (nmi_clr && halt_n) nmi_pend <= 1'b0;
      if (halt_n) begin
        if (res_clr) res_pend <= 1'b0;
        t <= t_n; acc <= acc_n; rmw <= rmw_n; ir <= ir_n;
        addr <= ab_n; pc <= pc_n; dout <= dor_n; rw <= rw_n;
        a_r <= a_n; x_r <= x_n; y_r <= y_n; s_r <= s_n;
        {fn, fv, fd, fi, fz, fc} <= {fn_n, fv_n, fd_n, fi_n, fz_n, fc_n};
        adl <= adl_n; adh <= adh_n; bal <= bal_n; tmp <= tmp_n; pgx <= pgx_n;
        intk <= intk_n;
      end
    end
  end

  assign sync = t == 3'd0;

endmodule
