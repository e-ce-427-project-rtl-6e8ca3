// kirsch_tb: testbench of the kirsch core on small images.
//
// Runs kirsch_env on 32 x 32 pixel images: one image abandoned half way by
// a reset, then three complete images, with results, latency, o_row and
// o_mode checked against the reference model.
module kirsch_tb;
  int checks, failures;
  bit done;

  kirsch_env #(.IMG_SIZE(32), .N_IMAGES(3), .RESET_TEST(1'b1), .MAX_CYCLES(2_000_000)) env (
    .checks(checks), .failures(failures), .done(done));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
