// Testbench of pokey_poly. The output bit streams are recorded and their
// periods checked: 15, 31, 511 and 131071 steps, and not a proper divisor of
// those. `init` must hold the counters and RANDOM must change when running.
module tb_pokey_poly;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, init = 1'b0, sel9 = 1'b0;
  logic p4, p5, p9, p17;
  logic [7:0] random;
  int checks = 0, failures = 0;
  localparam int N = 131071 + 200;
  logic s4 [N], s5 [N], s9 [N], s17 [N];
  pokey_poly dut (.clk, .rst_n, .en, .init, .sel9, .p4, .p5, .p9, .p17, .random);
  always #5 clk = ~clk;

  function automatic logic has_period(input int which, input int per);
    for (int i = 0; i < 150; i++) begin
      logic a, b;
      unique case (which)
        4: begin a = s4[i]; b = s4[i + per]; end
        5: begin a = s5[i]; b = s5[i + per]; end
        9: begin a = s9[i]; b = s9[i + per]; end
        default: begin a = s17[i]; b = s17[i + per]; end
      endcase
      if (a != b) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] r0;
    int changes;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1; en <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      s4[i] = p4; s5[i] = p5; s9[i] = p9; s17[i] = p17;
      @(posedge clk);
    end
    check("poly4 period 15", has_period(4, 15));
    check("poly4 not 3/5", !has_period(4, 3) && !has_period(4, 5));
    check("poly5 period 31", has_period(5, 31));
    check("poly5 not constant", !has_period(5, 1));
    check("poly9 period 511", has_period(9, 511));
    check("poly9 not 7/73", !has_period(9, 7) && !has_period(9, 73));
    check("poly17 period 131071", has_period(17, 131071));
    check("poly17 not constant", !has_period(17, 1));
    changes = 0;
    r0 = random;
    for (int i = 0; i < 20; i++) begin @(posedge clk); if (random != r0) changes++; r0 = random; end
    check("random changes", changes > 10);
    init <= 1'b1; @(posedge clk); @(posedge clk);
    r0 = random; @(posedge clk);
    check("init holds", random == r0 && random == 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
