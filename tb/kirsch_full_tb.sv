// kirsch_full_tb: the kirsch core at its full 256 x 256 image size.
//
// Runs kirsch_env with the core's default image size: one full image of
// 65536 pixels, giving 64516 results, all checked against the reference
// model, including latency, o_row and o_mode.
module kirsch_full_tb;
  int checks, failures;
  bit done;

  kirsch_env #(.IMG_SIZE(256), .N_IMAGES(1), .RESET_TEST(1'b0), .MAX_CYCLES(20_000_000)) env (
    .checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
