// top_kirsch_tb: end-to-end test of the board-level system on 16 x 16
// images at 4 clock cycles per serial bit: an image abandoned by a reset,
// then two full images, all results checked through the serial line and the
// display (see top_env).
module top_kirsch_tb;
  logic CLK, nRST, RXFLEX, TXFLEX;
  logic [15:0] o_sevenseg;
  int checks, failures;
  bit done;

  top_kirsch #(.IMG_SIZE(16), .CLKS_PER_BIT(4)) dut (
    .CLK(CLK), .nRST(nRST), .RXFLEX(RXFLEX), .TXFLEX(TXFLEX), .o_sevenseg(o_sevenseg));

  top_env #(.IMG_SIZE(16), .CLKS_PER_BIT(4), .N_IMAGES(2), .RESET_TEST(1'b1), .MAX_CYCLES(2_000_000)) env (
    .CLK(CLK), .nRST(nRST), .RXFLEX(RXFLEX), .TXFLEX(TXFLEX), .o_sevenseg(o_sevenseg),
    .checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
