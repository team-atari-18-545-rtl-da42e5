// Testbench of display_buffer, the dual-clock frame store between GTIA and
// the video output. Random words are written on the 14.3 MHz write clock to
// random addresses, including the first and last pixel, and read back on an
// unrelated 25 MHz read clock with one cycle of read latency. A model array
// in the testbench holds the expected contents.
module tb_display_buffer;
  localparam int W = 320, H = 192, N = W * H;
  logic wclk = 1'b0, rclk = 1'b0, we = 1'b0;
  logic [15:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  display_buffer dut (.wr_clk(wclk), .we, .waddr, .wdata, .rd_clk(rclk), .raddr, .rdata);
  always #35 wclk = ~wclk;
  always #20 rclk = ~rclk;

  initial begin
    int a;
    for (int i = 0; i < 400; i++) begin
      @(negedge wclk);
      a = (i == 0) ? 0 : (i == 1) ? N - 1 : int'($urandom % N);
      we = 1'b1; waddr = 16'(a); wdata = $urandom;
      model[a] = wdata;
    end
    @(negedge wclk); we = 1'b0;
    foreach (model[k]) begin
      @(negedge rclk); raddr = 16'(k);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++; $display("FAIL addr %0d: got %h expected %h", k, rdata, model[k]);
      end
    end
    // a write does not disturb a neighbouring word
    @(negedge wclk); we = 1'b1; waddr = 16'd1000; wdata = 32'h00ABCDEF;
    @(negedge wclk); we = 1'b1; waddr = 16'd1001; wdata = 32'h00123456;
    @(negedge wclk); we = 1'b0;
    @(negedge rclk); raddr = 16'd1000; @(posedge rclk); #1;
    checks++; if (rdata !== 32'h00ABCDEF) begin failures++; $display("FAIL neighbour word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
