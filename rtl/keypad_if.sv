// Keypad matrix interface between POKEY's key scan lines and the controller.
//
// Key scan bits [3:2] choose which of the four row wires (connector pins 5-8)
// is driven low: a one-cold 4-bit output. Key scan bits [1:0] choose which of
// the four column returns (pins 1-4) is routed to POKEY's KR1_L sense input:
// a 4-to-1 select. A pressed key at the selected row and column therefore
// pulls KR1_L low when the scan counter holds its code. This is the circuit
// of the report's I/O-control diagram; only 4 of the 6 scan lines are used.
// Purely combinational; the pressed-key pull-down is in the controller.
module keypad_if (
  input  logic [3:0] key_scan_l,   // POKEY key scan lines, bits 3..0
  input  logic [3:0] col_in,       // pins 1..4 as bits 0..3, low = pulled down
  output logic [3:0] row_out_l,    // pins 5..8 as bits 0..3, one driven low
  output logic       kr1_l
);
  always_comb begin
    row_out_l = 4'b1111;
    row_out_l[key_scan_l[3:2]] = 1'b0;
  end
  assign kr1_l = col_in[key_scan_l[1:0]];
endmodule
