// Testbench of clock_gen: over 800 master clocks there must be 200 colour
// clock enables and 100 CPU enables, every CPU enable must coincide with a
// colour clock enable, and CPU enables must be exactly 8 clocks apart.
module tb_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0, cc_en, phi_en, phi2;
  int   checks = 0, failures = 0, ncc = 0, nphi = 0, last = -1, bad_gap = 0, bad_co = 0, bad_phi2 = 0;
  clock_gen dut (.clk, .rst_n, .cc_en, .phi_en, .phi2);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(posedge clk);
      if (cc_en) ncc++;
      if (phi_en) begin
        nphi++;
        if (!cc_en) bad_co++;
        if (!phi2) bad_phi2++;
        if (last >= 0 && i - last != 8) bad_gap++;
        last = i;
      end
    end
    checks += 5;
    if (ncc != 200) begin failures++; $display("FAIL cc_en count %0d", ncc); end
    if (nphi != 100) begin failures++; $display("FAIL phi_en count %0d", nphi); end
    if (bad_co != 0) begin failures++; $display("FAIL phi_en without cc_en"); end
    if (bad_gap != 0) begin failures++; $display("FAIL phi_en spacing"); end
    if (bad_phi2 != 0) begin failures++; $display("FAIL phi2 phase"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
