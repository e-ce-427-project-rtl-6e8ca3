// top_kirsch_full_tb: the board-level system with every parameter at its
// default: one full 256 x 256 image sent over the serial line at 434 clock
// cycles per bit (115200 baud at 50 MHz), all 64516 results checked
// through the serial line and the display (see top_env).
module top_kirsch_full_tb;
  logic CLK, nRST, RXFLEX, TXFLEX;
  logic [15:0] o_sevenseg;
  int checks, failures;
  bit done;

  top_kirsch dut (.CLK(CLK), .nRST(nRST), .RXFLEX(RXFLEX), .TXFLEX(TXFLEX), .o_sevenseg(o_sevenseg));

  top_env #(.IMG_SIZE(256), .CLKS_PER_BIT(434), .N_IMAGES(1), .RESET_TEST(1'b0), .MAX_CYCLES(320_000_000)) env (
    .CLK(CLK), .nRST(nRST), .RXFLEX(RXFLEX), .TXFLEX(TXFLEX), .o_sevenseg(o_sevenseg),
    .checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
