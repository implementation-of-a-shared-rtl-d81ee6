// atm_pkg: constants shared by the shared-buffer ATM switch.
//
// The switch moves 64-byte cells (an 11-byte routing tag in front of the
// 53-byte ATM cell). Inside the chip a cell travels as eight 64-bit words;
// the shared buffer stores each word with one extra bit that carries, one bit
// per word, the 8-bit address of the next cell of the same output queue.
// The numbers below are the prototype's: 4x4 switch, 128-cell buffer built
// from a 4x4 array of 64-word banks, 80 MHz, 640 Mbit/s per port.
package atm_pkg;
  localparam int unsigned CELL_BYTES     = 64;  // bytes per switched cell
  localparam int unsigned WORD_BITS      = 64;  // cell word width (k)
  localparam int unsigned WORDS_PER_CELL = CELL_BYTES * 8 / WORD_BITS; // 8
  localparam int unsigned AF_W           = 3;   // address fraction: word in cell
  localparam int unsigned CELL_ADDR_W    = 8;   // cell address width
  localparam int unsigned BUF_DATA_W     = WORD_BITS + 1; // k+1 = 65
  localparam int unsigned BUF_ADDR_W     = CELL_ADDR_W + AF_W; // 11
  localparam int unsigned BANK_WORDS     = 64;  // word lines per memory bank
  localparam int unsigned ROUTE_LSB      = 8;   // first bit of the routing fields
  localparam int unsigned PAL_W          = 3;   // port address location width

  // Byte b of cell word w sits at bits [8*b +: 8]; cell byte index is 8*w+b.
  // Bit 0 of word 0 (the first byte received) is the cell indication:
  // 1 for a cell, 0 for an idle cell.
  localparam logic [WORD_BITS-1:0] IDLE_WORD = '0;
endpackage
