// kirsch_rowbuf_tb: testbench of the three-row circular buffer.
//
// Streams a 16-column image of 12 rows into the buffer with the write
// memory rotating 0, 1, 2 per row, and checks for every pixel of row 2 or
// later that the two outputs, one cycle later, are the pixels of the two
// rows above at the same column.
module kirsch_rowbuf_tb;
  import kirsch_pkg::*;
  localparam int N = 16, ROWS = 12;
  int checks = 0, failures = 0, n_wrap = 0;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [3:0] col = '0;
  logic [1:0] wsel = '0;
  pixel_t pix = '0, above2, above1;
  pixel_t img [ROWS][N];

  kirsch_rowbuf #(.IMG_SIZE(N)) dut (
    .i_clock(clk), .i_we(we), .i_col(col), .i_wsel(wsel), .i_pixel(pix),
    .o_above2(above2), .o_above1(above1));

  always #5 clk = ~clk;

  initial begin
    foreach (img[r, c]) img[r][c] = pixel_t'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      if (r > 0 && r % 3 == 0) n_wrap++;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        we = 1'b1; col = 4'(c); wsel = 2'(r % 3); pix = img[r][c];
        @(negedge clk);
        we = 1'b0;
        col = 4'($urandom); wsel = 2'($urandom_range(2, 0));  // must not disturb the read
        if (r >= 2) begin
          checks += 2;
          if (above2 !== img[r-2][c] || above1 !== img[r-1][c]) begin
            failures++;
            $display("FAIL row %0d col %0d: got %h %h expected %h %h", r, c,
                     above2, above1, img[r-2][c], img[r-1][c]);
          end
        end
        repeat ($urandom_range(3, 0)) @(negedge clk);
      end
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
