// Testbench of keypad_if. A 4x4 switch matrix is modelled here: a pressed
// key at (row, column) pulls its column low when its row wire is driven low.
// For every key and every scan value, KR1_L must be low exactly when the scan
// value equals {row, column}, and exactly one row wire is driven.
module tb_keypad_if;
  logic [3:0] key_scan_l, col_in, row_out_l;
  logic       kr1_l;
  int checks = 0, failures = 0;
  keypad_if dut (.key_scan_l, .col_in, .row_out_l, .kr1_l);

  initial begin
    for (int key = 0; key < 16; key++) begin
      for (int s = 0; s < 16; s++) begin
        key_scan_l = 4'(s);
        #1;
        col_in = 4'b1111;
        if (!row_out_l[key / 4]) col_in[key % 4] = 1'b0;
        #1;
        checks += 2;
        if (row_out_l != ~(4'b0001 << (s / 4))) begin failures++; $display("FAIL row drive s=%0d", s); end
        if (kr1_l != (s != key)) begin failures++; $display("FAIL kr1 key=%0d s=%0d", key, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
