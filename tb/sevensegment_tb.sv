// sevensegment_tb: testbench of the hex digit decoder; all sixteen digits
// are compared with the reference patterns of seg_ref_pkg, twice.
module sevensegment_tb;
  import seg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] digit = '0;
  logic [6:0] seg;

  sevensegment dut (.i_digit(digit), .o_segments(seg));

  initial begin
    for (int k = 0; k < 32; k++) begin
      digit = 4'(k);
      #1;
      checks++;
      if (seg !== seg_ref(digit)) begin
        failures++;
        $display("FAIL digit %h: got %b expected %b", digit, seg, seg_ref(digit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
