// POKEY serial port: SEROUT/SERIN shift registers and the three serial
// interrupts (serial input ready, serial output needed, transmission
// finished) that the report lists among POKEY's eight IRQs.
//
// How it works: frames are asynchronous, 1 start bit (0), 8 data bits LSB
// first, 1 stop bit (1). Both directions use the bit clock `tick`, which is
// audio channel 4 counting down to zero; one bit lasts two ticks.
// Transmit: a SEROUT write fills a one-byte holding buffer. When the shift
// register is idle, the buffer moves into it and `out_needed` pulses (the
// buffer is free for the next byte). When the last stop bit ends and the
// buffer is empty, `out_done` pulses. SKCTL bit 7 (force break) holds `sod`
// low. Receive: a falling edge on `sid` while idle starts a frame. Bit n
// (start = 0, data 1..8, stop = 9) is sampled at the (2n+1)-th tick after
// the edge, inside the first half of the bit. At the stop bit the byte goes
// to SERIN and `in_ready` pulses. A stop bit of 0 sets the frame error flag;
// a byte arriving while the previous serial input IRQ is still pending
// (`in_pending`) sets the overrun flag. SKRES clears both.
// Interface: one-clock strobes `tick`, `serout_wr` (with `din`) and
// `skres`; outputs `serin`, flags and one-clock IRQ events.
// The report names the three interrupts and nothing else of the port. The
// frame format, the channel 4 clock, the two ticks per bit, the flag
// positions (SKSTAT bit 7 frame error, bit 5 overrun, bit 4 input line) and
// the sampling point are this design's choices, modelled on the original
// chip's asynchronous mode; SKCTL clock modes 1-7 and two-tone are not
// offered.
module pokey_serial (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,        // channel 4 underflow, one clock wide
  input  logic       serout_wr,
  input  logic [7:0] din,
  input  logic       skres,
  input  logic       force_break, // SKCTL bit 7
  input  logic       in_pending,  // serial input IRQ still pending
  output logic       sod,
  input  logic       sid,
  output logic [7:0] serin,
  output logic       frame_err,
  output logic       overrun,
  output logic       sid_sync,
  output logic       in_ready,
  output logic       out_needed,
  output logic       out_done
);
  // ---------------------------------------------------------- transmitter
  logic [7:0] obuf;
  logic       obuf_full;
  logic [9:0] osh;
  logic [3:0] obits;             // bits left in the shift register
  logic       ohalf;             // second tick of the current bit

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      obuf <= '0; obuf_full <= 1'b0; osh <= '1; obits <= '0; ohalf <= 1'b0;
      out_needed <= 1'b0; out_done <= 1'b0;
    end else begin
      out_needed <= 1'b0;
      out_done   <= 1'b0;
      if (obits == 4'd0 && obuf_full) begin
        osh <= {1'b1, obuf, 1'b0};
        obits <= 4'd10; ohalf <= 1'b0;
        obuf_full <= 1'b0;
        out_needed <= 1'b1;
      end else if (obits != 4'd0 && tick) begin
        ohalf <= !ohalf;
        if (ohalf) begin
          osh   <= {1'b1, osh[9:1]};
          obits <= obits - 4'd1;
          if (obits == 4'd1 && !obuf_full) out_done <= 1'b1;
        end
      end
      if (serout_wr) begin obuf <= din; obuf_full <= 1'b1; end
    end
  end
  assign sod = !force_break && (obits == 4'd0 || osh[0]);

  // ---------------------------------------------------------- receiver
  logic [1:0] sid_q;
  logic [4:0] itick;             // ticks since the start edge
  logic       ibusy;
  logic [7:0] ish;

  always_ff @(posedge clk) begin
    if (!rst_n) sid_q <= 2'b11;
    else        sid_q <= {sid_q[0], sid};
  end
  assign sid_sync = sid_q[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      itick <= '0; ibusy <= 1'b0; ish <= '0; serin <= '0;
      frame_err <= 1'b0; overrun <= 1'b0; in_ready <= 1'b0;
    end else begin
      in_ready <= 1'b0;
      if (skres) begin frame_err <= 1'b0; overrun <= 1'b0; end
      if (!ibusy) begin
        if (!sid_q[1]) begin ibusy <= 1'b1; itick <= '0; end
      end else if (tick) begin
        itick <= itick + 5'd1;
        // sample on ticks 1, 3, 5, ... (itick even before the increment)
        if (!itick[0]) begin
          unique case (itick[4:1])
            4'd0: if (sid_q[1]) ibusy <= 1'b0;       // false start
            4'd9: begin
              ibusy    <= 1'b0;
              serin    <= ish;
              in_ready <= 1'b1;
              if (!sid_q[1]) frame_err <= 1'b1;
              if (in_pending) overrun <= 1'b1;
            end
            default: ish <= {sid_q[1], ish[7:1]};
          endcase
        end
      end
    end
  end
endmodule
