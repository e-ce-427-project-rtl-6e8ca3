// uart_tx_tb: testbench of the serial transmitter.
//
// Starts 200 random bytes at 8 clock cycles per bit and decodes o_tx
// independently: the start bit must follow i_start by one cycle, every bit
// must last exactly 8 cycles (checked at the middle and at both ends),
// the data must come LSB first and the stop bit must be 1. o_busy must be
// high for exactly 80 cycles, and an i_start while busy must be ignored.
module uart_tx_tb;
  localparam int C = 8;
  int checks = 0, failures = 0, n_ignored = 0;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] din = '0;
  logic tx, busy;

  uart_tx #(.CLKS_PER_BIT(C)) dut (.i_clock(clk), .i_reset(rst), .i_start(start), .i_data(din), .o_tx(tx), .o_busy(busy));

  always #5 clk = ~clk;

  task automatic expect_bit(input logic v, input string what);
    checks++;
    if (tx !== v) begin failures++; $display("FAIL %s: tx=%b expected %b at %0t", what, tx, v, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_bit(1'b1, "idle");
    for (int k = 0; k < 200; k++) begin
      logic [9:0] f;
      int busy_cycles;
      din = 8'($urandom);
      f = {1'b1, din, 1'b0};
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      busy_cycles = 0;
      for (int i = 0; i < 10; i++) begin
        for (int j = 0; j < C; j++) begin
          if (j == 0 || j == C / 2 || j == C - 1) expect_bit(f[i], "frame bit");
          if (busy) busy_cycles++;
          if (i == 4 && j == 2) begin
            start = 1'b1; din = ~din;          // must be ignored
            n_ignored++;
          end else begin
            start = 1'b0;
          end
          @(negedge clk);
        end
      end
      checks++;
      if (busy_cycles != 10 * C || busy) begin
        failures++;
        $display("FAIL busy for %0d cycles", busy_cycles);
      end
      expect_bit(1'b1, "idle after stop");
      repeat ($urandom_range(4, 0)) @(negedge clk);
    end
    checks++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
