// Testbench of mem_map: every 16th address of the 64 KB space is decoded and
// the select and returned data compared with the console map written out
// here as address ranges.
module tb_mem_map;
  logic [15:0] addr;
  logic sel_ram, sel_cart, sel_gtia, sel_antic, sel_pokey, sel_bios;
  logic [7:0] rdata;
  int checks = 0, failures = 0;
  mem_map dut (.addr, .sel_ram, .sel_cart, .sel_gtia, .sel_antic, .sel_pokey, .sel_bios,
               .ram_d(8'h11), .cart_d(8'h22), .gtia_d(8'h33), .antic_d(8'h44),
               .pokey_d(8'h55), .bios_d(8'h66), .rdata);
  initial begin
    for (int a = 0; a < 65536; a += 15) begin
      logic [7:0] exp;
      addr = 16'(a); #1;
      if (a < 'h4000) exp = 8'h11;
      else if (a < 'hC000) exp = 8'h22;
      else if (a < 'hD000) exp = 8'h33;
      else if (a >= 'hD400 && a < 'hD500) exp = 8'h44;
      else if (a >= 'hE800 && a < 'hE900) exp = 8'h55;
      else if (a >= 'hF800) exp = 8'h66;
      else exp = 8'hFF;
      checks++;
      if (rdata != exp) begin failures++; $display("FAIL %h: %h expected %h", addr, rdata, exp); end
      checks++;
      if (int'(sel_ram) + int'(sel_cart) + int'(sel_gtia) + int'(sel_antic) + int'(sel_pokey) + int'(sel_bios) > 1) begin
        failures++; $display("FAIL two selects at %h", addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
