// Testbench of pokey_potscan. Each pot line is an RC network modelled here:
// after POTGO it reads 1 once a pot-specific number of ticks has passed. The
// latched values must equal those numbers, a line that never charges must
// read 228, ALLPOT must show which pots still count, and the dump output
// must be released during the scan and engaged after count 228.
module tb_pokey_potscan;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, potgo = 1'b0;
  logic [7:0] pot_in, allpot;
  logic [7:0] pot [8];
  logic dump;
  int checks = 0, failures = 0, since = 0;
  int charge [8] = '{0, 1, 17, 100, 200, 227, 150, 1000};
  pokey_potscan dut (.clk, .rst_n, .tick, .potgo, .pot_in, .pot, .allpot, .dump);
  always #5 clk = ~clk;
  always_comb for (int i = 0; i < 8; i++) pot_in[i] = !dump && since >= charge[i];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check("dump at rest", dump, 1);
    potgo <= 1'b1; @(posedge clk); potgo <= 1'b0; @(posedge clk);
    check("dump released", dump, 0);
    check("allpot counting", allpot, 8'hFF);
    for (int t = 0; t < 240; t++) begin
      tick <= 1'b1; @(posedge clk); #1; tick <= 1'b0; since++; @(posedge clk);
      if (t == 120) check("allpot mid-scan", allpot, 8'b11110000);
    end
    for (int i = 0; i < 7; i++) check($sformatf("pot %0d", i), pot[i], charge[i]);
    check("pot never charged", pot[7], 228);
    check("dump after scan", dump, 1);
    check("allpot done", allpot, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
