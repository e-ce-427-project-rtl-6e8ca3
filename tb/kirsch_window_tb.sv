// kirsch_window_tb: testbench of the 3x3 convolution table.
//
// Shifts random columns into the table, with random idle cycles in
// between, and checks after every shift that the table holds the last three
// columns in order (oldest at n = 0) and that it holds still without i_shift.
module kirsch_window_tb;
  import kirsch_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic shift = 1'b0;
  pixel_t top = '0, mid = '0, bot = '0;
  table_t tbl;
  pixel_t hist [$];   // columns as {top, mid, bot}, three bytes each

  kirsch_window dut (.i_clock(clk), .i_shift(shift), .i_top(top), .i_mid(mid), .i_bot(bot), .o_table(tbl));

  always #5 clk = ~clk;

  task automatic check_table();
    int base;
    base = hist.size() - 9;
    for (int n = 0; n < 3; n++)
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (tbl[m][n] !== hist[base + 3 * n + m]) begin
          failures++;
          $display("FAIL table[%0d][%0d] = %h expected %h", m, n, tbl[m][n], hist[base + 3 * n + m]);
        end
      end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      shift = 1'b1;
      top = pixel_t'($urandom); mid = pixel_t'($urandom); bot = pixel_t'($urandom);
      hist.push_back(top); hist.push_back(mid); hist.push_back(bot);
      @(negedge clk);
      shift = 1'b0;
      top = pixel_t'($urandom); mid = pixel_t'($urandom); bot = pixel_t'($urandom);
      if (k >= 2) check_table();
      repeat ($urandom_range(2, 0)) @(negedge clk);
      if (k >= 2) check_table();
    end
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
