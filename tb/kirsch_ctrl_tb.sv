// kirsch_ctrl_tb: testbench of the mode state machine and the counters.
//
// Uses 8 x 8 images. For every pixel it checks the write column, the row
// memory selected (image row mod 3), the table-complete and last-pixel flags
// and, one cycle later, o_row. It checks o_mode: reset "01" the cycle after
// reset is sampled and while it is held, idle "10" after release, busy "11"
// after the first pixel, idle again the cycle after i_done. It also sends
// pixels during reset (must be ignored) and restarts after a reset in the
// middle of an image.
module kirsch_ctrl_tb;
  import kirsch_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  int n_busy = 0, n_idle = 0, n_reset = 0, n_ok = 0, n_last = 0;
  logic clk = 1'b0, rst = 1'b0, valid = 1'b0, done = 1'b0;
  mode_t mode;
  logic [7:0] row;
  logic we, table_ok, last_pixel;
  logic [2:0] col;
  logic [1:0] wsel;

  kirsch_ctrl #(.IMG_SIZE(N)) dut (
    .i_clock(clk), .i_reset(rst), .i_valid(valid), .i_done(done),
    .o_mode(mode), .o_row(row), .o_we(we), .o_col(col), .o_wsel(wsel),
    .o_table_ok(table_ok), .o_last_pixel(last_pixel));

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, expv, $time);
    end
  endtask

  // Send one pixel at image position (r, c); checks are made while i_valid is high.
  task automatic pixel(input int r, input int c);
    @(negedge clk);
    valid = 1'b1;
    #1;
    expect_eq(int'(we), 1, "we");
    expect_eq(int'(col), c, "column");
    expect_eq(int'(wsel), r % 3, "row memory");
    expect_eq(int'(table_ok), int'(r >= 2 && c >= 2), "table complete");
    expect_eq(int'(last_pixel), int'(r == N - 1 && c == N - 1), "last pixel");
    if (table_ok) n_ok++;
    if (last_pixel) n_last++;
    @(negedge clk);
    valid = 1'b0;
    expect_eq(int'(row), r, "o_row");
    expect_eq(int'(mode), int'(MODE_BUSY), "busy while receiving");
    repeat ($urandom_range(8, 6)) @(negedge clk);
  endtask

  task automatic do_reset(input int cycles);
    @(negedge clk);
    rst = 1'b1;
    valid = 1'b1;          // a pixel during reset must be ignored
    #1 expect_eq(int'(we), 0, "no write during reset");
    @(negedge clk);
    valid = 1'b0;
    expect_eq(int'(mode), int'(MODE_RESET), "reset mode next cycle");
    repeat (cycles - 1) begin
      @(negedge clk);
      expect_eq(int'(mode), int'(MODE_RESET), "reset mode held");
    end
    n_reset++;
    rst = 1'b0;
    @(negedge clk);
    expect_eq(int'(mode), int'(MODE_IDLE), "idle after reset");
    expect_eq(int'(row), 0, "o_row cleared");
  endtask

  task automatic finish_image();
    // the pipeline reports its last result a few cycles later
    repeat (3) @(negedge clk);
    expect_eq(int'(mode), int'(MODE_BUSY), "busy until done");
    done = 1'b1;
    @(negedge clk);
    done = 1'b0;
    expect_eq(int'(mode), int'(MODE_IDLE), "idle after done");
    n_idle++;
  endtask

  initial begin
    do_reset(5);
    expect_eq(int'(mode), int'(MODE_IDLE), "idle");
    for (int k = 0; k < 30; k++) pixel(k / N, k % N);   // abandoned image
    do_reset(6);
    for (int im = 0; im < 2; im++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          pixel(r, c);
          if (r == 0 && c == 0) n_busy++;
        end
      finish_image();
      repeat (4) @(negedge clk);
      expect_eq(int'(mode), int'(MODE_IDLE), "stays idle");
    end
    expect_eq(n_ok, 2 * (N - 2) * (N - 2) + 10, "tables counted");  // abandoned image: 6 + 4
    expect_eq(n_last, 2, "last pixels");
    checks++;
    if (n_busy == 0 || n_idle == 0 || n_reset < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
