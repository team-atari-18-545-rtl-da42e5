// POKEY potentiometer scan.
//
// Eight pot inputs, each with an 8-bit latch, share one binary counter that
// steps once per `tick` (once per scan line). `potgo` starts a scan: the
// counter clears, the dump transistors are released (`dump` low) so the
// external RC networks start charging, and all latches are opened. At each
// tick a pot whose input has reached logic 1 and whose latch is still open
// captures the counter. When the counter reaches 228 the scan ends: open
// latches take 228 and `dump` goes high, grounding the pot lines again.
// `allpot` has a 1 for each pot still counting. The count of 228 and the
// mechanism follow the report; the start value 0 and the end value put into
// pots that never charged are this design's choices.
module pokey_potscan #(
  parameter int unsigned MAX_COUNT = 228
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       potgo,
  input  logic [7:0] pot_in,
  output logic [7:0] pot [8],
  output logic [7:0] allpot,
  output logic       dump
);
  logic [7:0] cnt;
  logic       scanning;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; scanning <= 1'b0; dump <= 1'b1; allpot <= '0;
      for (int i = 0; i < 8; i++) pot[i] <= '0;
    end else if (potgo) begin
      cnt <= '0; scanning <= 1'b1; dump <= 1'b0; allpot <= '1;
    end else if (tick && scanning) begin
      for (int i = 0; i < 8; i++)
        if (allpot[i] && pot_in[i]) begin
          pot[i]    <= cnt;
          allpot[i] <= 1'b0;
        end
      if (cnt == 8'(MAX_COUNT - 1)) begin
        for (int i = 0; i < 8; i++)
          if (allpot[i] && !pot_in[i]) pot[i] <= 8'(MAX_COUNT);
        allpot   <= '0;
        scanning <= 1'b0;
        dump     <= 1'b1;
      end
      cnt <= cnt + 8'd1;
    end
  end
endmodule
