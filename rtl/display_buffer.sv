// Display buffer between GTIA and the DVI scan-out.
//
// A simple dual-port memory with one write port in the console clock domain
// and one registered read port in the 25 MHz pixel clock domain, so that the
// monitor can be refreshed at its own rate while GTIA updates pixels at the
// colour-clock rate. The report sizes it at 320 x 192 pixels of 32 bits
// (24-bit RGB padded for alignment): 61,440 words, 245,760 bytes.
// Read data appears one rd_clk cycle after the address. No reset: the
// contents are whatever GTIA last wrote.
module display_buffer #(
  parameter int unsigned WIDTH  = 320,
  parameter int unsigned HEIGHT = 192,
  parameter int unsigned DW     = 32,
  localparam int unsigned DEPTH = WIDTH * HEIGHT,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wr_clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rd_clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  always_ff @(posedge rd_clk)
    rdata <= mem[raddr];
endmodule
