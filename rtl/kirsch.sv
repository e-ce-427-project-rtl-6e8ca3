// kirsch: Kirsch edge detector for a stream of 8-bit grey-scale pixels.
//
// Pixels of an IMG_SIZE x IMG_SIZE image (256 x 256 by default) arrive in
// raster order, one per i_valid pulse, at most one every eight cycles. For
// every pixel not on the image border the detector reports whether it lies
// on an edge (o_edge) and, if so, the direction towards the brighter side
// (o_dir: E 000, W 001, N 010, S 011, NW 100, SE 101, NE 110, SW 111; 000
// when there is no edge), with a one-cycle o_valid pulse:
// (IMG_SIZE-2)^2 results per image. o_mode shows reset "01", idle "10" or
// busy "11"; o_row is the row of the most recent pixel.
//
// Structure: kirsch_ctrl counts rows and columns and runs the mode state
// machine; kirsch_rowbuf keeps the last three image rows in three
// 256 x 8 memories used in rotation, writing the new pixel and reading the
// two pixels above it in the same cycle; kirsch_window holds the 3x3
// convolution table; kirsch_edge_calc computes the derivatives, the
// maximum, the threshold test and the direction.
//
// Timing: the pixel that completes a table arrives in cycle t (the first
// such pixel is row 2, column 2); its result appears with o_valid in cycle
// t+4 (latency 4), independent of the gap between pixels. Consecutive
// pixels may arrive as close as every cycle in this pipeline; the required
// minimum spacing of eight cycles is therefore met with margin.
// The interface, modes, direction codes, arithmetic and memory organisation
// follow the detector's requirements; the pipeline is this design's.
module kirsch
  import kirsch_pkg::*;
#(
  parameter int unsigned IMG_SIZE  = kirsch_pkg::DEF_IMG_SIZE,
  parameter int unsigned THRESHOLD = kirsch_pkg::DEF_THRESHOLD,
  localparam int unsigned AW       = $clog2(IMG_SIZE)
) (
  input  logic       i_clock,
  input  logic       i_valid,
  input  pixel_t     i_pixel,
  input  logic       i_reset,
  output logic       o_edge,
  output logic [2:0] o_dir,
  output logic       o_valid,
  output logic [1:0] o_mode,
  output logic [7:0] o_row
);

  mode_t         mode;
  logic          we, table_ok, last_pixel;
  logic [AW-1:0] col;
  logic [1:0]    wsel;
  logic          done;

  kirsch_ctrl #(.IMG_SIZE(IMG_SIZE)) u_ctrl (
    .i_clock      (i_clock),
    .i_reset      (i_reset),
    .i_valid      (i_valid),
    .i_done       (done),
    .o_mode       (mode),
    .o_row        (o_row),
    .o_we         (we),
    .o_col        (col),
    .o_wsel       (wsel),
    .o_table_ok   (table_ok),
    .o_last_pixel (last_pixel)
  );

  // Stage 0 -> 1: memory access in flight, pixel and flags registered.
  pixel_t above2, above1, pixel_q;
  logic   p1_shift, p1_ok, p1_last;

  kirsch_rowbuf #(.IMG_SIZE(IMG_SIZE)) u_rowbuf (
    .i_clock  (i_clock),
    .i_we     (we),
    .i_col    (col),
    .i_wsel   (wsel),
    .i_pixel  (i_pixel),
    .o_above2 (above2),
    .o_above1 (above1)
  );

  always_ff @(posedge i_clock) begin
    if (i_reset) p1_shift <= 1'b0;
    else         p1_shift <= we;
    pixel_q <= i_pixel;
    p1_ok   <= table_ok;
    p1_last <= last_pixel;
  end

  // Stage 1 -> 2: new column enters the convolution table.
  table_t tbl;
  logic   p2_valid, p2_last;

  kirsch_window u_window (
    .i_clock (i_clock),
    .i_shift (p1_shift),
    .i_top   (above2),
    .i_mid   (above1),
    .i_bot   (pixel_q),
    .o_table (tbl)
  );

  always_ff @(posedge i_clock) begin
    if (i_reset) p2_valid <= 1'b0;
    else         p2_valid <= p1_shift && p1_ok;
    p2_last <= p1_last;
  end

  // Stages 2 -> 4: derivatives, maximum, threshold.
  dir_t dir;
  logic out_last;

  kirsch_edge_calc #(.THRESHOLD(THRESHOLD)) u_calc (
    .i_clock (i_clock),
    .i_reset (i_reset),
    .i_valid (p2_valid),
    .i_last  (p2_last),
    .i_table (tbl),
    .o_valid (o_valid),
    .o_last  (out_last),
    .o_edge  (o_edge),
    .o_dir   (dir)
  );

  assign o_dir  = dir;
  assign o_mode = mode;
  assign done   = o_valid && out_last;

endmodule
