// kirsch_rowbuf: the three-row circular image buffer of the Kirsch detector.
//
// Three kirsch_ram instances each hold one image row. Incoming pixels of
// image row r go into the memory selected by i_wsel (r mod 3 when driven by
// kirsch_ctrl), at address i_col; when a row is full the next row reuses
// the oldest memory, so physical row 0 becomes virtual row 3, 6, ... . In
// the same cycle as the write, the other two memories are read at the same
// column, so the pixels above the new one (rows r-2 and r-1) are fetched in
// parallel with the write and no extra cycle is spent on memory access.
//
// Timing: i_we/i_col/i_wsel/i_pixel in cycle t; o_above2 (row r-2) and
// o_above1 (row r-1) of column i_col are valid in cycle t+1.
// The three-memory organisation follows the detector's description; the
// parallel read/write scheme is this design's choice.
module kirsch_rowbuf
  import kirsch_pkg::*;
#(
  parameter int unsigned IMG_SIZE = kirsch_pkg::DEF_IMG_SIZE,
  localparam int unsigned AW      = $clog2(IMG_SIZE)
) (
  input  logic          i_clock,
  input  logic          i_we,
  input  logic [AW-1:0] i_col,
  input  logic [1:0]    i_wsel,
  input  pixel_t        i_pixel,
  output pixel_t        o_above2,
  output pixel_t        o_above1
);

  pixel_t     rdata [3];
  logic [1:0] wsel_q;

  for (genvar k = 0; k < 3; k++) begin : g_row
    kirsch_ram #(.DEPTH(IMG_SIZE), .WIDTH(PIXEL_W)) u_ram (
      .i_clock (i_clock),
      .i_we    (i_we && (i_wsel == 2'(k))),
      .i_addr  (i_col),
      .i_wdata (i_pixel),
      .o_rdata (rdata[k])
    );
  end

  always_ff @(posedge i_clock) wsel_q <= i_wsel;

  // Memory k+1 (mod 3) holds the row written two rows ago, k+2 (mod 3) the
  // previous row.
  always_comb begin
    unique case (wsel_q)
      2'd0:    begin o_above2 = rdata[1]; o_above1 = rdata[2]; end
      2'd1:    begin o_above2 = rdata[2]; o_above1 = rdata[0]; end
      default: begin o_above2 = rdata[0]; o_above1 = rdata[1]; end
    endcase
  end

endmodule
