// Console memory map: address decoder and read-data multiplexer.
//
// Decodes the 16-bit bus address into one select per device and returns the
// selected device's read data:
//   0000-3FFF RAM, 4000-BFFF cartridge, C000-CFFF GTIA (32 registers,
//   mirrored), D400-D4FF ANTIC (16, mirrored), E800-E8FF POKEY (16,
//   mirrored), F800-FFFF BIOS ROM. Unmapped reads return FF.
// This is the address map of the original console; the report shows a
// memory block in its source tree but does not list the map. Combinational.
module mem_map (
  input  logic [15:0] addr,
  output logic        sel_ram,
  output logic        sel_cart,
  output logic        sel_gtia,
  output logic        sel_antic,
  output logic        sel_pokey,
  output logic        sel_bios,
  input  logic [7:0]  ram_d,
  input  logic [7:0]  cart_d,
  input  logic [7:0]  gtia_d,
  input  logic [7:0]  antic_d,
  input  logic [7:0]  pokey_d,
  input  logic [7:0]  bios_d,
  output logic [7:0]  rdata
);
  always_comb begin
    sel_ram   = addr[15:14] == 2'b00;
    sel_cart  = addr[15:14] == 2'b01 || addr[15:14] == 2'b10;
    sel_gtia  = addr[15:12] == 4'hC;
    sel_antic = addr[15:8] == 8'hD4;
    sel_pokey = addr[15:8] == 8'hE8;
    sel_bios  = addr[15:11] == 5'b11111;
    rdata = sel_ram   ? ram_d
          : sel_cart  ? cart_d
          : sel_gtia  ? gtia_d
          : sel_antic ? antic_d
          : sel_pokey ? pokey_d
          : sel_bios  ? bios_d
          : 8'hFF;
  end
endmodule
