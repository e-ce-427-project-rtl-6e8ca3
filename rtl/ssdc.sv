// ssdc: seven-segment display controller of the board top level.
//
// Shows the detector's row count i_row (0-255) on two seven-segment digits
// in hexadecimal and its mode i_mode on two LEDs. Output layout of the
// 16-bit o_sevenseg bus: [6:0] low digit (segments g..a, active low),
// [13:7] high digit, [14] = i_mode[0] (LED G6), [15] = i_mode[1] (LED G7).
// The outputs are registered, so they follow the inputs one cycle later.
// Showing the row count and the mode bits is the controller's stated job;
// the hex display, the bus layout and the output register are this design's.
module ssdc (
  input  logic        i_clock,
  input  logic [7:0]  i_row,
  input  logic [1:0]  i_mode,
  output logic [15:0] o_sevenseg
);

  logic [6:0] seg_lo, seg_hi;

  sevensegment u_lo (.i_digit(i_row[3:0]), .o_segments(seg_lo));
  sevensegment u_hi (.i_digit(i_row[7:4]), .o_segments(seg_hi));

  always_ff @(posedge i_clock) o_sevenseg <= {i_mode[1], i_mode[0], seg_hi, seg_lo};

endmodule
