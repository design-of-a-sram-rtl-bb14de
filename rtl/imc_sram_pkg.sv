// imc_sram_pkg: sizes and the address map shared by the full butterfly SRAM.
//
// The memory holds 128 words of 8 bits (1 kbit) in four banks of 256 cells.
// Each bank is a 16 x 16 cell array whose columns are shared 2:1 by two
// 8-bit words, so one bank row holds two words.  The 7-bit word address is
// split as follows (the split of bits 4 and 6 is this design's choice; bit 5
// choosing top or bottom and bits 3..0 feeding the row decoder come from the
// bank-enable and row-decoder schematics):
//
//   addr[3:0]  row within the bank (16 word lines)
//   addr[4]    column multiplexer: even (0) or odd (1) column of each pair
//   addr[5]    bank row: top (0) or bottom (1) row decoder
//   addr[6]    bank column: left (0) or right (1) I/O block
`timescale 1ps/1ps
package imc_sram_pkg;

  localparam int unsigned DATA_W  = 8;             // data bus width
  localparam int unsigned ADDR_W  = 7;             // address bus width
  localparam int unsigned ROW_AW  = 4;             // row address bits
  localparam int unsigned ROWS    = 1 << ROW_AW;   // word lines per bank
  localparam int unsigned COL_MUX = 2;             // columns per data bit
  localparam int unsigned BANKS   = 4;

  typedef struct packed {
    logic              side;  // 0 = left banks, 1 = right banks
    logic              bot;   // 0 = top banks, 1 = bottom banks
    logic              col;   // column-multiplexer select
    logic [ROW_AW-1:0] row;   // word line
  } addr_t;

  // Read/write pin encoding, as in the data-bus latch schematic: the write
  // latches open while RW is low and the read path needs RW high.
  typedef enum logic { RW_WRITE = 1'b0, RW_READ = 1'b1 } rw_e;

endpackage
