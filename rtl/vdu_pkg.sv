// vdu_pkg: types and constants shared by the display unit.
//
// The screen is 512 lines x 512 sections. Every element has an 18-bit
// address, ordered in the sequence in which the interlaced raster visits it:
//   bit 17      field bit (0 = first field, 1 = second field)
//   bits 16..9  line within the field (0..255)
//   bits 8..0   intra-line count, the section along the line (0..511)
// A store word adds a flag bit above the address (bit 18): 1 means the
// change of intensity at that element lasts one section only ("temporary"),
// 0 means it lasts until the next stored address ("permanent"). This
// begin-end+flag word format, the bit positions and the OUT3 action codes
// are taken from the document. The bit-field packing into a struct and the
// helper functions are this design's own.
package vdu_pkg;

  localparam int ADDR_W = 18;      // line count (9) + intra-line count (9)
  localparam int WORD_W = 19;      // flag + address
  localparam int ILC_W  = 9;       // sections per line = 2**ILC_W = 512
  localparam int LINE_W = 8;       // lines per field = 256

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    logic  flag;   // 1 = temporary (one section), 0 = permanent
    addr_t addr;   // screen element
  } word_t;

  localparam word_t WORD_ZERO = '0;

  // OUT3 port codes (octal) that tell the hardware what to do with OUT1/OUT2
  // when the microcomputer halts and raises STP.
  localparam logic [7:0] OUT3_IDLE = 8'o001;  // run display, wait for master
  localparam logic [7:0] OUT3_BASE = 8'o002;  // add OUT1/OUT2 into the base address
  localparam logic [7:0] OUT3_FEED = 8'o004;  // base + OUT1/OUT2 into the store

  // Spread an OUT1/OUT2 modifier over the 18-bit address:
  // OUT1[6:0] -> bits 6..0, OUT2[6:0] -> bits 15..9, OUT2[7] -> bit 17.
  // OUT1[7] is the flag and takes no part in the addition.
  function automatic addr_t modifier(input logic [7:0] out1, input logic [7:0] out2);
    addr_t m;
    m       = '0;
    m[6:0]  = out1[6:0];
    m[15:9] = out2[6:0];
    m[17]   = out2[7];
    return m;
  endfunction

  function automatic logic is_zero(input word_t w);
    return w == WORD_ZERO;
  endfunction

endpackage
