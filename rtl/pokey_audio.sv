// POKEY audio: four channels of divider, distortion and volume.
//
// Each channel is a divide-by-N counter loaded from AUDFx: it counts down on
// its input clock and, on passing zero, reloads and gives one pulse. That
// pulse clocks the channel's output flip-flop through the distortion logic
// set by AUDCx bits 7..5: unless bit 7 is set, the pulse only takes effect
// when the 5-bit polynomial output is 1; with bit 5 set the flip-flop
// toggles (pure tone), otherwise it takes the 4-bit (bit 6 set) or the
// 17/9-bit polynomial output (noise). The channel level is AUDCx[3:0] when
// the flip-flop is 1, else 0; with AUDCx bit 4 ("volume only") the level is
// AUDCx[3:0] regardless. The four levels add to a 6-bit output.
//
// AUDCTL: bit 0 selects a 15 kHz base clock instead of 64 kHz; bits 6 and 5
// clock channels 1 and 3 at 1.79 MHz; bits 4 and 3 join channels 1+2 and
// 3+4 into 16-bit dividers (output on 2 and 4); bits 2 and 1 add the
// high-pass filters of channel 1 (clocked by channel 3) and channel 2
// (clocked by channel 4); bit 7 (9-bit poly) acts in pokey_poly. The divider
// pulses of channels 1, 2 and 4 are the POKEY timer interrupts. STIMER
// reloads all dividers. The register meanings follow the report; the
// divider period of N+1 input clocks (no extra cycles in 1.79 MHz mode) is a
// simplification chosen here. `en` is the 1.79 MHz CPU cycle enable.
module pokey_audio #(
  parameter int unsigned DIV64K = 28,    // 1.79 MHz cycles per 64 kHz tick
  parameter int unsigned DIV15K = 114    // 1.79 MHz cycles per 15 kHz tick
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] audf [4],
  input  logic [7:0] audc [4],
  input  logic [7:0] audctl,
  input  logic       stimer,
  input  logic       p4,
  input  logic       p5,
  input  logic       p_noise,            // 17-bit or 9-bit polynomial
  output logic [3:0] level [4],
  output logic [5:0] audio,
  output logic [3:0] pulse               // divider underflow, per channel
);
  logic [6:0] base_cnt;
  logic       base_tick;
  logic [7:0] cnt [4];
  logic [3:0] clk_in, zero, outff;
  logic [1:0] hp;

  // base clock: 64 kHz or 15 kHz
  always_ff @(posedge clk) begin
    if (!rst_n) base_cnt <= '0;
    else if (en) base_cnt <= base_tick ? 7'd0 : base_cnt + 7'd1;
  end
  assign base_tick = base_cnt == 7'((audctl[0] ? DIV15K : DIV64K) - 1);

  // channel clocks; a joined upper channel is clocked by its lower partner
  always_comb begin
    clk_in[0] = audctl[6] ? 1'b1 : base_tick;
    clk_in[2] = audctl[5] ? 1'b1 : base_tick;
    clk_in[1] = audctl[4] ? (clk_in[0] && cnt[0] == 8'd0) : base_tick;
    clk_in[3] = audctl[3] ? (clk_in[2] && cnt[2] == 8'd0) : base_tick;
    for (int i = 0; i < 4; i++) zero[i] = clk_in[i] && cnt[i] == 8'd0;
    // a joined pair reloads only when both halves have run out
    if (audctl[4]) zero[0] = clk_in[0] && cnt[0] == 8'd0 && cnt[1] == 8'd0;
    if (audctl[3]) zero[2] = clk_in[2] && cnt[2] == 8'd0 && cnt[3] == 8'd0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
      outff <= '0;
      hp    <= '0;
      pulse <= '0;
    end else begin
      pulse <= '0;
      if (stimer) begin
        for (int i = 0; i < 4; i++) cnt[i] <= audf[i];
      end else if (en) begin
        for (int i = 0; i < 4; i++) begin
          if (clk_in[i]) begin
            if (cnt[i] == 8'd0) begin
              // joined lower half reloads with the pair, otherwise wraps
              if (!((i == 0 && audctl[4]) || (i == 2 && audctl[3])) || zero[i])
                cnt[i] <= audf[i];
              else
                cnt[i] <= 8'hFF;
            end else
              cnt[i] <= cnt[i] - 8'd1;
          end
        end
        for (int i = 0; i < 4; i++) begin
          // the lower half of a joined pair makes no sound of its own
          if (clk_in[i] && cnt[i] == 8'd0 &&
              !((i == 0 && audctl[4]) || (i == 2 && audctl[3])) &&
              !((i == 1 && audctl[4] && cnt[0] != 8'd0) || (i == 3 && audctl[3] && cnt[2] != 8'd0))) begin
            pulse[i] <= 1'b1;
            if (audc[i][7] || p5)
              outff[i] <= audc[i][5] ? ~outff[i] : (audc[i][6] ? p4 : p_noise);
          end
        end
        // high-pass filter flip-flops sample their channel on the partner pulse
        if (zero[2]) hp[0] <= outff[0];
        if (zero[3]) hp[1] <= outff[1];
      end
    end
  end

  always_comb begin
    audio = '0;
    for (int i = 0; i < 4; i++) begin
      logic bit_o;
      bit_o = outff[i];
      if (i == 0 && audctl[2]) bit_o = outff[0] ^ hp[0];
      if (i == 1 && audctl[1]) bit_o = outff[1] ^ hp[1];
      level[i] = (audc[i][4] || bit_o) ? audc[i][3:0] : 4'd0;
      audio = audio + {2'b00, level[i]};
    end
  end
endmodule
