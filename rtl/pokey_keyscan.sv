// POKEY keyboard scan with debounce.
//
// A 6-bit binary counter steps once per `tick` (once per scan line) and is
// put out, inverted, on the six key scan lines. A key closes the path back to
// KR1_L when the counter holds its code. The debounce state machine follows
// the report:
//   IDLE     KR1_L low: counter -> compare latch, go to CONFIRM.
//   CONFIRM  KR1_L low at another code before the counter comes round to
//            the compare latch: two keys are down, ignore both (IDLE).
//            At the compare code: KR1_L high means bounce (IDLE); KR1_L low
//            means a valid key: code -> key-code latch, key IRQ, go to HELD.
//   HELD     at the compare code KR1_L high: go to RELEASE.
//   RELEASE  at the compare code KR1_L high again: key released (IDLE),
//            low: still held (HELD).
// So a key is taken after two scan cycles low and released after two high.
// KR2_L is not debounced: it is read once per scan cycle at three fixed codes
// for SHIFT (0x10), CONTROL (0x20) and BREAK (0x30); a new BREAK press raises
// the break IRQ. Those three codes are this design's choice. `kbcode` holds
// the 6-bit key code with SHIFT in bit 6 and CONTROL in bit 7.
// MATCH_BITS is the number of scan lines that reach the keys. The console
// wires only 4 of the 6, so one key closes KR1_L at four codes of each
// scan; a hit whose low MATCH_BITS bits equal the compare latch is the same
// key and not a second one. This reading of the two-key rule is this
// design's own.
module pokey_keyscan #(
  parameter int unsigned MATCH_BITS = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       tick,
  input  logic       kr1_l,
  input  logic       kr2_l,
  output logic [5:0] key_scan_l,
  output logic [7:0] kbcode,
  output logic       key_irq,      // one-clk pulse: new key in kbcode
  output logic       break_irq,    // one-clk pulse: BREAK pressed
  output logic       key_down,
  output logic       shift_down
);
  typedef enum logic [1:0] {S_IDLE, S_CONFIRM, S_HELD, S_RELEASE} ks_e;
  ks_e        st;
  logic [5:0] cnt, cmp;
  logic       shift_q, ctrl_q, brk_q;

  assign key_scan_l = ~cnt;
  assign key_down   = (st == S_HELD) || (st == S_RELEASE);
  assign shift_down = shift_q;

  always_ff @(posedge clk) begin
    key_irq   <= 1'b0;
    break_irq <= 1'b0;
    if (!rst_n || !enable) begin
      st <= S_IDLE; cnt <= '0; cmp <= '0; kbcode <= '0;
      shift_q <= 1'b0; ctrl_q <= 1'b0; brk_q <= 1'b0;
    end else if (tick) begin
      cnt <= cnt + 6'd1;
      unique case (cnt)
        6'h10: shift_q <= ~kr2_l;
        6'h20: ctrl_q  <= ~kr2_l;
        6'h30: begin
          brk_q <= ~kr2_l;
          if (!kr2_l && !brk_q) break_irq <= 1'b1;
        end
        default: ;
      endcase
      unique case (st)
        S_IDLE:    if (!kr1_l) begin cmp <= cnt; st <= S_CONFIRM; end
        S_CONFIRM: begin
          if (cnt == cmp) begin
            if (!kr1_l) begin
              kbcode  <= {ctrl_q, shift_q, cnt};
              key_irq <= 1'b1;
              st      <= S_HELD;
            end else st <= S_IDLE;
          end else if (!kr1_l && cnt[MATCH_BITS-1:0] != cmp[MATCH_BITS-1:0]) st <= S_IDLE;
        end
        S_HELD:    if (cnt == cmp && kr1_l) st <= S_RELEASE;
        default:   if (cnt == cmp) st <= kr1_l ? S_IDLE : S_HELD;
      endcase
    end
  end
endmodule
