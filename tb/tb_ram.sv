// Testbench of ram: random writes then reads against a copy kept here.
module tb_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [13:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [16384];
  logic       valid [16384];
  int checks = 0, failures = 0;
  ram dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 16384; i++) valid[i] = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      addr = 14'($urandom); wdata = 8'($urandom);
      if ($urandom_range(0, 1)) begin
        we = 1'b1; @(posedge clk); #1; we = 1'b0;
        model[addr] = wdata; valid[addr] = 1'b1;
      end else begin
        #1;
        if (valid[addr]) begin
          checks++;
          if (rdata != model[addr]) begin failures++; $display("FAIL addr %h", addr); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
