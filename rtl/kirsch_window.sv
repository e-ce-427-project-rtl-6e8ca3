// kirsch_window: the 3x3 convolution table.
//
// Nine pixel registers arranged as table[m][n] (m = row, n = column). When
// i_shift is 1 the table moves one pixel to the right across the image:
// every row shifts left by one column and the new right-hand column
// {i_top, i_mid, i_bot} (image rows r-2, r-1, r at the current column)
// enters at n = 2. The table is valid one cycle after the shift. Datapath
// registers are not reset; the controller decides when a table is complete.
module kirsch_window
  import kirsch_pkg::*;
(
  input  logic   i_clock,
  input  logic   i_shift,
  input  pixel_t i_top,
  input  pixel_t i_mid,
  input  pixel_t i_bot,
  output table_t o_table
);

  always_ff @(posedge i_clock) begin
    if (i_shift) begin
      for (int m = 0; m < 3; m++) begin
        o_table[m][0] <= o_table[m][1];
        o_table[m][1] <= o_table[m][2];
      end
      o_table[0][2] <= i_top;
      o_table[1][2] <= i_mid;
      o_table[2][2] <= i_bot;
    end
  end

endmodule
