// Shared types and constants of the Atari 5200 console model.
//
// Holds the ALU operation codes of the 6502C, the 3-bit AN codes that ANTIC
// sends to GTIA, the video timing counts shared by ANTIC, GTIA and the
// display buffer, and the console memory map. The memory map and the line and
// frame counts are those of the original NTSC console; the report itself only
// gives the 320x192 visible picture and the 228-count line used by POKEY.
package atari_pkg;

  // ---------------------------------------------------------------- CPU ALU
  typedef enum logic [3:0] {
    ALU_ADC, ALU_SBC, ALU_AND, ALU_OR, ALU_EOR,
    ALU_ASL, ALU_LSR, ALU_ROL, ALU_ROR,
    ALU_INC, ALU_DEC, ALU_CMP, ALU_PASS
  } alu_op_e;

  // ------------------------------------------------------- ANTIC -> GTIA AN
  // AN[2]=1 carries a playfield: AN[1:0] is the playfield number, or in the
  // high-resolution modes (2, 3, F) the two half-colour-clock pixel bits.
  typedef enum logic [2:0] {
    AN_BAK    = 3'b000,
    AN_VSYNC  = 3'b001,
    AN_HBLANK = 3'b010,
    AN_PF0    = 3'b100,
    AN_PF1    = 3'b101,
    AN_PF2    = 3'b110,
    AN_PF3    = 3'b111
  } an_e;

  // ---------------------------------------------------------- video timing
  localparam int unsigned CC_PER_LINE   = 228;  // colour clocks per scan line
  localparam int unsigned LINES         = 262;  // scan lines per frame
  localparam int unsigned FIRST_LINE    = 8;    // first displayed scan line
  localparam int unsigned DISP_LINES    = 192;  // displayed scan lines
  localparam int unsigned HBLANK_END    = 32;   // first colour clock after HBLANK
  localparam int unsigned HBLANK_START  = 224;  // first colour clock of HBLANK
  localparam int unsigned PF_LEFT       = 48;   // left edge of the normal playfield
  localparam int unsigned PF_CC         = 160;  // colour clocks kept in the buffer
  localparam int unsigned VBI_LINE      = 248;  // line that raises the VBI
  localparam int unsigned BUF_W         = 320;  // display buffer width in pixels
  localparam int unsigned BUF_H         = 192;  // display buffer height in pixels

  // ------------------------------------------------------------ memory map
  localparam logic [15:0] RAM_BASE   = 16'h0000;  // 16 KB work RAM
  localparam logic [15:0] CART_BASE  = 16'h4000;  // 32 KB cartridge 4000-BFFF
  localparam logic [15:0] GTIA_BASE  = 16'hC000;  // C000-C0FF, mirrored every 32
  localparam logic [15:0] ANTIC_BASE = 16'hD400;  // D400-D4FF, mirrored every 16
  localparam logic [15:0] POKEY_BASE = 16'hE800;  // E800-E8FF, mirrored every 16
  localparam logic [15:0] BIOS_BASE  = 16'hF800;  // 2 KB BIOS F800-FFFF

endpackage
