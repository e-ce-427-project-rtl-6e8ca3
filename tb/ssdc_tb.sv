// ssdc_tb: testbench of the display controller. For every row value and
// random mode it checks, one cycle later, both digits of the row in hex
// and the two mode LEDs.
module ssdc_tb;
  import seg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0] row = '0;
  logic [1:0] mode = '0;
  logic [15:0] seg;

  ssdc dut (.i_clock(clk), .i_row(row), .i_mode(mode), .o_sevenseg(seg));

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < 256; k++) begin
      logic [15:0] e;
      @(negedge clk);
      row = 8'(k); mode = 2'($urandom);
      e = {mode[1], mode[0], seg_ref(row[7:4]), seg_ref(row[3:0])};
      @(negedge clk);
      checks++;
      if (seg !== e) begin
        failures++;
        $display("FAIL row %0d mode %b: got %b expected %b", row, mode, seg, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
