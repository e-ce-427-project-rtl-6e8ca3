// kirsch_pkg: types and constants shared by the Kirsch edge detector.
//
// The direction codes are the 3-bit encodings assigned to the eight edge
// directions (E 000, W 001, N 010, S 011, NW 100, SE 101, NE 110, SW 111);
// the mode codes are the o_mode values idle "10", busy "11", reset "01".
// The image is square, IMG_SIZE pixels per side (256 by default), 8 bits per
// pixel, and an edge is reported when the largest derivative exceeds 400.
// The 3x3 convolution table is indexed [m][n] with m the row (0 = top) and
// n the column (0 = left), as in the algorithm description.
package kirsch_pkg;

  localparam int unsigned PIXEL_W   = 8;
  localparam int unsigned DEF_IMG_SIZE  = 256;
  localparam int unsigned DEF_THRESHOLD = 400;

  typedef logic [PIXEL_W-1:0] pixel_t;

  // table[m][n]: m = row of the table, n = column of the table
  typedef pixel_t [2:0][2:0] table_t;

  typedef enum logic [2:0] {
    DIR_E  = 3'b000,
    DIR_W  = 3'b001,
    DIR_N  = 3'b010,
    DIR_S  = 3'b011,
    DIR_NW = 3'b100,
    DIR_SE = 3'b101,
    DIR_NE = 3'b110,
    DIR_SW = 3'b111
  } dir_t;

  typedef enum logic [1:0] {
    MODE_RESET = 2'b01,
    MODE_IDLE  = 2'b10,
    MODE_BUSY  = 2'b11
  } mode_t;

  // Sum of three 8-bit pixels (max 765) and of eight (max 2040).
  typedef logic [9:0]  sum3_t;
  typedef logic [10:0] sum8_t;

endpackage
