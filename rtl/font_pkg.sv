// font_pkg: types and constants shared by the outline font processor.
//
// Coordinates are 8-bit unsigned pixel positions, which address a 256 x 256
// monochrome image held one pixel per byte in a 64 KB external memory
// (address = {y, x}). The five path operators are encoded one-hot in an
// 8-bit op-code (1, 2, 4, 8, 16) so that decoding is a single bit test.
// Which operator receives which of those five values is this design's own
// choice: they follow the order in which the operators are listed.
package font_pkg;

  localparam int unsigned COORD_W = 8;   // bits per coordinate
  localparam int unsigned ADDR_W  = 16;  // external memory address bits
  localparam int unsigned DATA_W  = 8;   // external memory data bits

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  typedef enum logic [7:0] {
    OP_MOVETO    = 8'h01,
    OP_LINETO    = 8'h02,
    OP_CURVETO   = 8'h04,
    OP_CLOSEPATH = 8'h08,
    OP_FILL      = 8'h10
  } opcode_e;

  // Byte offset of pixel (x, y) in the external image memory.
  function automatic logic [ADDR_W-1:0] pix_addr(coord_t x, coord_t y);
    return {y, x};
  endfunction

endpackage
