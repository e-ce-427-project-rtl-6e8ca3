// kirsch_ctrl: mode state machine and pixel bookkeeping of the detector.
//
// Mode: reset ("01") in the cycle after i_reset is sampled high and for as
// long as it stays high; idle ("10") in the cycle after it is sampled low;
// busy ("11") from the cycle after the first pixel of an image until the
// cycle after the result of the image's last table leaves the pipeline
// (i_done), then idle again. The state register powers up as all zeros,
// which is the idle state, and is also given that initial value so that
// simulation starts like the FPGA; lint reports the initial value next to
// the clocked assignment (PROCASSINIT), which is intended.
//
// Pixel bookkeeping: a column and a row counter give the image position of
// the pixel on i_valid. That pixel is written at column o_col of row memory
// o_wsel, which steps 0, 1, 2, 0, ... with each new row, so memory k holds
// virtual rows k, k+3, k+6, ... . o_table_ok marks a pixel that completes a
// 3x3 table (row >= 2 and column >= 2), o_last_pixel the final pixel of the
// image; both are combinational from the counters, for the pixel now on
// i_valid. o_row holds the row of the most recently received pixel and is 0
// after reset. After the last pixel all counters return to 0, ready for the
// next image. Pixels are ignored while i_reset is high.
//
// The mode codes, their timing, o_row and the row-rotation scheme follow
// the detector's requirements; the counter structure is this design's.
module kirsch_ctrl
  import kirsch_pkg::*;
#(
  parameter int unsigned IMG_SIZE = kirsch_pkg::DEF_IMG_SIZE,
  localparam int unsigned AW      = $clog2(IMG_SIZE)
) (
  input  logic          i_clock,
  input  logic          i_reset,
  input  logic          i_valid,
  input  logic          i_done,
  output mode_t         o_mode,
  output logic [7:0]    o_row,
  output logic          o_we,
  output logic [AW-1:0] o_col,
  output logic [1:0]    o_wsel,
  output logic          o_table_ok,
  output logic          o_last_pixel
);

  if (IMG_SIZE < 3 || IMG_SIZE > 256) begin : g_bad_size
    $error("kirsch_ctrl: IMG_SIZE must be between 3 and 256");
  end

  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,   // also the power-up state
    ST_BUSY  = 2'd1,
    ST_RESET = 2'd2
  } state_t;

  localparam logic [AW-1:0] LAST = AW'(IMG_SIZE - 1);

  state_t        state = ST_IDLE;
  logic [AW-1:0] row_cnt, col_cnt;
  logic [1:0]    wsel;
  logic          accept;

  assign accept = i_valid && !i_reset;

  always_ff @(posedge i_clock) begin
    if (i_reset) begin
      state <= ST_RESET;
    end else begin
      unique case (state)
        ST_RESET: state <= accept ? ST_BUSY : ST_IDLE;
        ST_IDLE:  if (accept) state <= ST_BUSY;
        ST_BUSY:  if (i_done) state <= ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge i_clock) begin
    if (i_reset) begin
      row_cnt <= '0;
      col_cnt <= '0;
      wsel    <= '0;
      o_row   <= '0;
    end else if (accept) begin
      o_row <= 8'(row_cnt);
      if (col_cnt == LAST) begin
        col_cnt <= '0;
        if (row_cnt == LAST) begin
          row_cnt <= '0;
          wsel    <= '0;
        end else begin
          row_cnt <= row_cnt + 1'b1;
          wsel    <= (wsel == 2'd2) ? 2'd0 : wsel + 2'd1;
        end
      end else begin
        col_cnt <= col_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (state)
      ST_BUSY:  o_mode = MODE_BUSY;
      ST_RESET: o_mode = MODE_RESET;
      default:  o_mode = MODE_IDLE;
    endcase
  end

  assign o_we         = accept;
  assign o_col        = col_cnt;
  assign o_wsel       = wsel;
  assign o_table_ok   = (row_cnt >= AW'(2)) && (col_cnt >= AW'(2));
  assign o_last_pixel = (row_cnt == LAST) && (col_cnt == LAST);

endmodule
