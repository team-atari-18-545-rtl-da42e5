// Console work RAM.
//
// Single-port memory, 16 KB by default (the size of the original console's
// RAM; the report does not give it). Writes happen at the clk edge when `we`
// is set; reads are asynchronous, so a CPU or DMA cycle that puts an address
// out at its start has the data by its end, like the original static bus.
module ram #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
