// POKEY polynomial counters: the random number generators of the audio path.
//
// Four linear feedback shift registers step once per enabled cycle
// (1.79 MHz): 4-bit (x^4+x^3+1, period 15), 5-bit (x^5+x^3+1, period 31),
// 9-bit (x^9+x^5+1, period 511) and 17-bit (x^17+x^14+1, period 131071).
// Their output bits gate and replace the tone of each audio channel; the top
// eight bits of the 17-bit (or, with `sel9`, the 9-bit) register form the
// RANDOM register. `init` holds all four at their all-ones start value, as
// POKEY's initialisation mode does. The polynomial lengths follow the report
// (noise "from a polynomial counter", AUDCTL selecting 9 or 17 bits); the tap
// positions are the usual maximal-length ones and are this design's choice.
module pokey_poly (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       init,
  input  logic       sel9,
  output logic       p4,
  output logic       p5,
  output logic       p9,
  output logic       p17,
  output logic [7:0] random
);
  logic [3:0]  r4;
  logic [4:0]  r5;
  logic [8:0]  r9;
  logic [16:0] r17;

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      r4 <= '1; r5 <= '1; r9 <= '1; r17 <= '1;
    end else if (en) begin
      r4  <= {r4[2:0],  r4[3] ^ r4[2]};
      r5  <= {r5[3:0],  r5[4] ^ r5[2]};
      r9  <= {r9[7:0],  r9[8] ^ r9[4]};
      r17 <= {r17[15:0], r17[16] ^ r17[13]};
    end
  end

  assign p4  = r4[3];
  assign p5  = r5[4];
  assign p9  = r9[8];
  assign p17 = r17[16];
  assign random = sel9 ? r9[8:1] : r17[16:9];
endmodule
