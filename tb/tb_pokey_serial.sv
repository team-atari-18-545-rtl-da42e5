// Testbench of pokey_serial. The bit clock `tick` is a one-clock strobe
// every 10 clocks, so a bit lasts 20 clocks. Checks: a SEROUT byte leaves as
// start bit, 8 data bits LSB first and stop bit; `out_needed` comes when the
// buffer empties and `out_done` only after the last byte's stop bit; with the
// output looped back to the input, two bytes arrive in SERIN with one
// `in_ready` each; a stop bit of 0 sets the frame error, a byte arriving
// while the input IRQ is pending sets the overrun, SKRES clears both; force
// break holds the output low.
module tb_pokey_serial;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic serout_wr = 1'b0, skres = 1'b0, force_break = 1'b0, in_pending = 1'b0;
  logic loop = 1'b1, sid_drv = 1'b1;
  logic [7:0] din = '0;
  logic sod, sid, frame_err, overrun, sid_sync, in_ready, out_needed, out_done;
  logic [7:0] serin;
  int checks = 0, failures = 0;
  int n_needed = 0, n_done = 0, n_ready = 0;
  logic [7:0] got [$];

  assign sid = loop ? sod : sid_drv;
  pokey_serial dut (.clk, .rst_n, .tick, .serout_wr, .din, .skres, .force_break, .in_pending,
                    .sod, .sid, .serin, .frame_err, .overrun, .sid_sync, .in_ready,
                    .out_needed, .out_done);
  always #5 clk = ~clk;

  int tc = 0;
  always_ff @(posedge clk) begin
    tc   <= (tc + 1) % 10;
    tick <= (tc == 9);
  end
  always @(posedge clk) begin
    if (out_needed) n_needed <= n_needed + 1;
    if (out_done)   n_done   <= n_done + 1;
    if (in_ready) begin n_ready <= n_ready + 1; got.push_back(serin); end
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic write(input logic [7:0] d);
    @(negedge clk); din = d; serout_wr = 1'b1;
    @(negedge clk); serout_wr = 1'b0;
  endtask
  // drive a frame on the input by hand, 20 clocks per bit
  task automatic send(input logic [7:0] d, input logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin sid_drv = f[i]; repeat (20) @(posedge clk); end
    sid_drv = 1'b1; repeat (40) @(posedge clk);
  endtask

  initial begin
    logic [9:0] frame;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    check("idle line high", sod, 1);
    // one byte: sample the output in the middle of each bit
    write(8'hA5);
    @(negedge sod);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 10; i++) begin frame[i] = sod; repeat (20) @(posedge clk); end
    check("frame start bit", frame[0], 0);
    check("frame data bits", frame[8:1], 8'hA5);
    check("frame stop bit", frame[9], 1);
    repeat (60) @(posedge clk);
    check("out_needed pulses for one byte", n_needed, 1);
    check("out_done pulses for one byte", n_done, 1);
    check("bytes received in loopback", n_ready, 1);
    check("SERIN", serin, 8'hA5);
    check("no frame error", frame_err, 0);
    // two bytes back to back: the second waits in the buffer
    n_needed = 0; n_done = 0; n_ready = 0; got.delete();
    write(8'h3C);
    repeat (5) @(posedge clk);
    write(8'hC3);
    repeat (10) @(posedge clk);
    check("out_needed only once while the buffer is full", n_needed, 1);
    repeat (20 * 10 + 20) @(posedge clk);
    check("out_needed when the second byte starts", n_needed, 2);
    check("no out_done between bytes", n_done, 0);
    repeat (20 * 10 + 40) @(posedge clk);
    check("out_done after the last byte", n_done, 1);
    check("two bytes received", n_ready, 2);
    check("first byte", got.size() > 0 ? got[0] : -1, 8'h3C);
    check("second byte", got.size() > 1 ? got[1] : -1, 8'hC3);
    // frame error and overrun, driven by hand
    loop = 1'b0;
    send(8'h5A, 1'b0);
    check("frame error on stop bit 0", frame_err, 1);
    check("SERIN after bad frame", serin, 8'h5A);
    in_pending = 1'b1;
    send(8'h11, 1'b1);
    check("overrun while input IRQ pending", overrun, 1);
    @(negedge clk); skres = 1'b1; @(negedge clk); skres = 1'b0;
    check("SKRES clears frame error", frame_err, 0);
    check("SKRES clears overrun", overrun, 0);
    check("input line seen", sid_sync, 1);
    // force break
    force_break = 1'b1; @(posedge clk); #1;
    check("force break holds output low", sod, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
