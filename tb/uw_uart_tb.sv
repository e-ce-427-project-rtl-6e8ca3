// uw_uart_tb: testbench of the serial link controller.
//
// At 6 clock cycles per bit it sends 150 random pixel bytes on the receive
// line and checks each o_pixel/o_pixel_valid. Meanwhile results are fed in
// groups of one to four on consecutive cycles (so they must wait in the
// buffer), and the transmit line is decoded independently: every result
// must come back, in order, as the byte {0000, edge, dir}.
module uw_uart_tb;
  localparam int C = 6;
  int checks = 0, failures = 0, n_queued = 0;
  logic clk = 1'b0, rst = 1'b1, rx = 1'b1;
  logic tx;
  logic [7:0] pixel;
  logic pixel_valid, overflow;
  logic res_valid = 1'b0, res_edge = 1'b0;
  logic [2:0] res_dir = '0;
  logic [7:0] pix_q [$], res_q [$];

  uw_uart #(.CLKS_PER_BIT(C)) dut (
    .i_clock(clk), .i_reset(rst), .i_rx(rx), .o_tx(tx),
    .o_pixel(pixel), .o_pixel_valid(pixel_valid),
    .i_result_valid(res_valid), .i_edge(res_edge), .i_dir(res_dir), .o_overflow(overflow));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pixel_valid) begin
      checks++;
      if (pix_q.size() == 0 || pixel !== pix_q[0]) begin
        failures++;
        $display("FAIL pixel %h", pixel);
      end
      if (pix_q.size() != 0) void'(pix_q.pop_front());
    end
    if (overflow) begin failures++; $display("FAIL overflow"); end
  end

  // transmit-line decoder
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (C / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (C) @(posedge clk);
        b[i] = tx;
      end
      repeat (C) @(posedge clk);
      checks += 2;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      if (res_q.size() == 0 || b !== res_q[0]) begin
        failures++;
        $display("FAIL result byte %h expected %h", b, (res_q.size() != 0) ? res_q[0] : 8'h00);
      end
      if (res_q.size() != 0) void'(res_q.pop_front());
    end
  end

  // result source: bursts of 1-4 results, then a pause long enough to drain
  initial begin
    @(negedge rst);
    repeat (10) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      int n;
      n = int'($urandom_range(4, 1));
      if (n > 1) n_queued++;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        res_valid = 1'b1;
        res_edge = 1'($urandom);
        res_dir = 3'($urandom);
        res_q.push_back({4'b0000, res_edge, res_dir});
      end
      @(negedge clk);
      res_valid = 1'b0;
      repeat (n * 10 * C + $urandom_range(20, 0)) @(negedge clk);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 150; k++) begin
      logic [9:0] f;
      f = {1'b1, 8'($urandom), 1'b0};
      pix_q.push_back(f[8:1]);
      for (int i = 0; i < 10; i++) begin
        rx = f[i];
        repeat (C) @(negedge clk);
      end
      rx = 1'b1;
      repeat ($urandom_range(6, 0)) @(negedge clk);
    end
    wait (res_q.size() == 0);
    repeat (20 * C) @(negedge clk);
    checks += 3;
    if (pix_q.size() != 0) begin failures++; $display("FAIL pixels missing"); end
    if (res_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    if (n_queued == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
