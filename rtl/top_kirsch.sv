// top_kirsch: board-level system around the Kirsch edge detector.
//
// A PC streams the pixels of a 256 x 256 grey-scale image over a serial
// line (RXFLEX); uw_uart turns each received byte into one pixel for the
// kirsch core and sends each result back on TXFLEX as one byte
// {4'b0000, edge, dir}. ssdc shows the row count of the incoming image on
// two seven-segment digits and the detector mode on two LEDs (o_sevenseg).
// nRST is the reset push button, 1 while pressed; it is brought into the
// clock domain through two flip-flops and resets every block. Those two
// flip-flops power up as ones, so the system also starts in reset at power
// up; verilator notes their initial value next to the clocked assignment
// (PROCASSINIT), which is intended.
//
// Timing: one byte takes 10 * CLKS_PER_BIT cycles on the line (434 cycles
// per bit: 115200 baud from the 50 MHz board clock), far more than the
// eight cycles per pixel the detector needs. A result byte starts leaving
// about five cycles after its pixel has been received.
// The three blocks and their roles follow the board system's description;
// the serial format, result byte and reset synchroniser are this design's.
module top_kirsch #(
  parameter int unsigned IMG_SIZE     = kirsch_pkg::DEF_IMG_SIZE,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic        CLK,
  input  logic        nRST,
  input  logic        RXFLEX,
  output logic        TXFLEX,
  output logic [15:0] o_sevenseg
);

  // Powers up as 11, so the whole system starts in reset until the first
  // two clock edges after the button is seen released.
  logic [1:0] rst_sync = 2'b11;
  logic       reset;

  always_ff @(posedge CLK) rst_sync <= {rst_sync[0], nRST};
  assign reset = rst_sync[1];

  logic [7:0] pixel;
  logic       pixel_valid;
  logic       edge_bit, out_valid;
  logic [2:0] dir;
  logic [1:0] mode;
  logic [7:0] row;

  uw_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .i_clock        (CLK),
    .i_reset        (reset),
    .i_rx           (RXFLEX),
    .o_tx           (TXFLEX),
    .o_pixel        (pixel),
    .o_pixel_valid  (pixel_valid),
    .i_result_valid (out_valid),
    .i_edge         (edge_bit),
    .i_dir          (dir),
    .o_overflow     ()     // cannot occur here: at most one result per received byte
  );

  kirsch #(.IMG_SIZE(IMG_SIZE)) u_kirsch (
    .i_clock (CLK),
    .i_valid (pixel_valid),
    .i_pixel (pixel),
    .i_reset (reset),
    .o_edge  (edge_bit),
    .o_dir   (dir),
    .o_valid (out_valid),
    .o_mode  (mode),
    .o_row   (row)
  );

  ssdc u_ssdc (
    .i_clock    (CLK),
    .i_row      (row),
    .i_mode     (mode),
    .o_sevenseg (o_sevenseg)
  );

endmodule
